// ecu_ft_top -- programmable-logic part of a secure and dependable ECU pair: the sending
// node's and the receiving node's fault-tolerant cryptographic modules, side by side.
//
// In a vehicle the sender's secure payload travels from its cryptographic module over the
// internal bus to its application processor, over the CAN FD bus (one 48-byte frame) to the
// receiving ECU's processor, and over that ECU's internal bus into its cryptographic module.
// The processors, CAN FD controllers and buses are outside this RTL, so the sender's
// `tx_payload*` outputs and the receiver's `rx_payload*` inputs are ports of this top; a
// system connects them through its CAN FD path (a testbench can connect them directly, or
// alter a frame on the way to exercise the integrity check).
//
// Each node has its own keys (`*_key_aes` = AES key K2, `*_key_mac` = HMAC key K1), its own
// reconfiguration sub-system and its own fault-emulation inputs (tx_fi_*, rx_fi_*). See
// ft_cm_sender and ft_cm_receiver for the protocol and timing of each side.
module ecu_ft_top
  import ecu_pkg::*;
#(
  parameter int unsigned NUM_SOFT_ERR  = 3,
  parameter int unsigned RECONF_CYCLES = 1_000_000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // sending node
  input  logic [AES_W-1:0]     tx_key_aes,
  input  logic [AES_W-1:0]     tx_key_mac,
  input  logic                 tx_msg_valid,
  input  logic [MSG_W-1:0]     tx_msg,
  output logic                 tx_msg_ready,
  output logic                 tx_payload_valid,
  output logic [PAYLOAD_W-1:0] tx_payload,
  output logic [CTR_W-1:0]     tx_payload_ctr,
  output logic                 tx_degraded,
  output logic                 tx_fail,
  input  logic [2:0]           tx_fi_aes,
  input  logic [2:0]           tx_fi_mac,
  input  logic [2:0]           tx_fi_cmp,
  input  logic [1:0]           tx_fi_scv,
  output logic [NFN-1:0]       tx_out1,
  output logic [NFN-1:0]       tx_out2,
  output logic [NRC-1:0]       tx_reconf_active,
  output logic [NFN-1:0]       tx_cmp_disagree,
  output scfh_events_t         tx_events,
  // receiving node
  input  logic [AES_W-1:0]     rx_key_aes,
  input  logic [AES_W-1:0]     rx_key_mac,
  input  logic                 rx_payload_valid,
  input  logic [PAYLOAD_W-1:0] rx_payload,
  output logic                 rx_payload_ready,
  output logic                 rx_valid,
  output logic [MSG_W-1:0]     rx_msg,
  output logic [CTR_W-1:0]     rx_ctr,
  output logic                 rx_auth_ok,
  output logic                 rx_fresh,
  output logic                 rx_degraded,
  output logic                 rx_fail,
  input  logic [2:0]           rx_fi_aes,
  input  logic [2:0]           rx_fi_mac,
  input  logic [2:0]           rx_fi_cmp,
  input  logic [1:0]           rx_fi_scv,
  output logic [NFN-1:0]       rx_out1,
  output logic [NFN-1:0]       rx_out2,
  output logic [NRC-1:0]       rx_reconf_active,
  output logic [NFN-1:0]       rx_cmp_disagree,
  output scfh_events_t         rx_events
);

  ft_cm_sender #(.NUM_SOFT_ERR(NUM_SOFT_ERR), .RECONF_CYCLES(RECONF_CYCLES)) u_sender (
    .clk, .rst_n, .key_aes(tx_key_aes), .key_mac(tx_key_mac),
    .msg_valid(tx_msg_valid), .msg(tx_msg), .msg_ready(tx_msg_ready),
    .payload_valid(tx_payload_valid), .payload(tx_payload), .payload_ctr(tx_payload_ctr),
    .payload_degraded(tx_degraded), .send_fail(tx_fail),
    .fi_aes(tx_fi_aes), .fi_mac(tx_fi_mac), .fi_cmp(tx_fi_cmp), .fi_scv(tx_fi_scv),
    .out1(tx_out1), .out2(tx_out2), .reconf_active(tx_reconf_active),
    .cmp_disagree(tx_cmp_disagree), .events(tx_events));

  ft_cm_receiver #(.NUM_SOFT_ERR(NUM_SOFT_ERR), .RECONF_CYCLES(RECONF_CYCLES)) u_receiver (
    .clk, .rst_n, .key_aes(rx_key_aes), .key_mac(rx_key_mac),
    .payload_valid(rx_payload_valid), .payload(rx_payload), .payload_ready(rx_payload_ready),
    .rx_valid, .rx_msg, .rx_ctr, .rx_auth_ok, .rx_fresh, .rx_degraded, .rx_fail,
    .fi_aes(rx_fi_aes), .fi_mac(rx_fi_mac), .fi_cmp(rx_fi_cmp), .fi_scv(rx_fi_scv),
    .out1(rx_out1), .out2(rx_out2), .reconf_active(rx_reconf_active),
    .cmp_disagree(rx_cmp_disagree), .events(rx_events));

endmodule

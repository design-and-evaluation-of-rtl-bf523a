// tb_ecu_ft_top_full -- the sender / receiver pair at its default parameters (NUM_SOFT_ERR = 3,
// a reconfiguration of 1,000,000 cycles = 20 ms at 50 MHz), through one complete fault cycle:
// a fault-free message; a permanent fault in the sender's second AES copy, recovered through
// the spare while that copy is reconfigured; a message sent during the reconfiguration; and a
// message after the copy has returned to service. Each payload is compared with the
// independently computed reference and must be accepted by the receiver; the reconfiguration
// must last the full 1,000,000 cycles.
module tb_ecu_ft_top_full;
  import ecu_pkg::*;
  import tb_vectors_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_msg_valid = 1'b0, tx_msg_ready, tx_payload_valid, tx_degraded, tx_fail;
  logic [MSG_W-1:0] tx_msg = '0;
  logic [PAYLOAD_W-1:0] tx_payload;
  logic [CTR_W-1:0] tx_payload_ctr;
  logic [2:0] tx_fi_aes = '0;
  logic [NFN-1:0] tx_out1, tx_out2, tx_cmp_disagree;
  logic [NRC-1:0] tx_reconf_active;
  scfh_events_t tx_events;
  logic rx_payload_valid = 1'b0, rx_payload_ready;
  logic [PAYLOAD_W-1:0] rx_payload = '0;
  logic rx_valid, rx_auth_ok, rx_fresh, rx_degraded, rx_fail;
  logic [MSG_W-1:0] rx_msg;
  logic [CTR_W-1:0] rx_ctr;
  logic [NFN-1:0] rx_out1, rx_out2, rx_cmp_disagree;
  logic [NRC-1:0] rx_reconf_active;
  scfh_events_t rx_events;

  ecu_ft_top dut (
    .clk, .rst_n, .tx_key_aes(K_AES), .tx_key_mac(K_MAC), .tx_msg_valid, .tx_msg, .tx_msg_ready,
    .tx_payload_valid, .tx_payload, .tx_payload_ctr, .tx_degraded, .tx_fail,
    .tx_fi_aes, .tx_fi_mac(3'b0), .tx_fi_cmp(3'b0), .tx_fi_scv(2'b0), .tx_out1, .tx_out2,
    .tx_reconf_active, .tx_cmp_disagree, .tx_events,
    .rx_key_aes(K_AES), .rx_key_mac(K_MAC), .rx_payload_valid, .rx_payload, .rx_payload_ready,
    .rx_valid, .rx_msg, .rx_ctr, .rx_auth_ok, .rx_fresh, .rx_degraded, .rx_fail,
    .rx_fi_aes(3'b0), .rx_fi_mac(3'b0), .rx_fi_cmp(3'b0), .rx_fi_scv(2'b0), .rx_out1, .rx_out2,
    .rx_reconf_active, .rx_cmp_disagree, .rx_events);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int next_ctr = 0;
  task automatic transfer();
    logic [PAYLOAD_W-1:0] p;
    @(negedge clk);
    while (!tx_msg_ready) @(negedge clk);
    tx_msg = msg_of(next_ctr);
    tx_msg_valid = 1'b1;
    @(negedge clk);
    tx_msg_valid = 1'b0;
    while (!tx_payload_valid && !tx_fail) @(negedge clk);
    check(tx_payload_valid && tx_payload == expected_payload(next_ctr),
          $sformatf("payload of message %0d", next_ctr));
    p = tx_payload;
    @(negedge clk);
    while (!rx_payload_ready) @(negedge clk);
    rx_payload = p;
    rx_payload_valid = 1'b1;
    @(negedge clk);
    rx_payload_valid = 1'b0;
    while (!rx_valid && !rx_fail) @(negedge clk);
    check(rx_valid && rx_auth_ok && rx_fresh && rx_msg == msg_of(next_ctr) &&
          rx_ctr == CTR_W'(next_ctr), $sformatf("message %0d received", next_ctr));
    next_ctr++;
  endtask

  longint t0, t1;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    transfer();
    tx_fi_aes[SRC_M2] = 1'b1;
    transfer();
    check(tx_out2 == 2'b01 && tx_reconf_active == (NRC'(1) << RC_AES2),
          "second AES copy replaced by the spare and under reconfiguration");
    transfer();
    check(tx_reconf_active != '0, "message sent during reconfiguration");
    t0 = $time;
    while (tx_reconf_active != '0) @(negedge clk);
    t1 = $time;
    tx_fi_aes = '0;
    check((t1 - t0) / 20 > 990_000, $sformatf("reconfiguration lasted %0d more cycles", (t1 - t0) / 20));
    transfer();
    check(tx_out2 == '0, "second AES copy back in service");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

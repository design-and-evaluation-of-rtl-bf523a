// ft_cm_sender -- fault-tolerant cryptographic module of the sending ECU ("encrypt-and-MAC").
//
// A message M (64 bits) accepted on `msg_valid` while `msg_ready` is high is extended with the
// 64-bit anti-replay counter C into the 128-bit block M||C (M in the upper half). The block
// is AES-128 encrypted under `key_aes` and, in parallel, authenticated with the SHA-3 HMAC
// under `key_mac`. Each function runs on a DMR pair plus a spare; two input interfaces feed
// three comparators in TMR, a Berger-checked self-checking voter (SCV) votes on them, and the
// self-checking fault handler (SCFH) recomputes, activates spares, localises faulty copies and
// asks the reconfiguration sub-system to rewrite them (see scfh). On success the 384-bit
// secure payload {HMAC (256), ciphertext (128)} is presented with a one-cycle
// `payload_valid`, together with the counter used, and C is incremented. If the fault
// handler cannot recover, `send_fail` pulses instead and C is not incremented.
//
// Timing with no fault: the HMAC's 96 cycles dominate the AES's 10; `payload_valid` rises 101
// clock edges after the edge that accepted `msg_valid`. Each recomputation adds 99 cycles.
//
// Ports named fi_* emulate faults (fi_aes/fi_mac per copy M1, M2, MS; fi_cmp per comparator;
// fi_scv inside the voter) and are test hooks of this implementation. Copy c's fault input
// inverts result bit c, so faults in different copies give different wrong results. `reconf_active` shows
// which copy is being rewritten; `out1`/`out2` which copies are out of service;
// `cmp_disagree` that the three comparators are not unanimous (one was outvoted). The counter
// starts at 0 after reset (the document does not say how it is initialised).
module ft_cm_sender
  import ecu_pkg::*;
#(
  parameter int unsigned NUM_SOFT_ERR  = 3,
  parameter int unsigned RECONF_CYCLES = 1_000_000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AES_W-1:0]     key_aes,
  input  logic [AES_W-1:0]     key_mac,
  input  logic                 msg_valid,
  input  logic [MSG_W-1:0]     msg,
  output logic                 msg_ready,
  output logic                 payload_valid,
  output logic [PAYLOAD_W-1:0] payload,
  output logic [CTR_W-1:0]     payload_ctr,
  output logic                 payload_degraded,
  output logic                 send_fail,
  input  logic [2:0]           fi_aes,
  input  logic [2:0]           fi_mac,
  input  logic [2:0]           fi_cmp,
  input  logic [1:0]           fi_scv,
  output logic [NFN-1:0]       out1,
  output logic [NFN-1:0]       out2,
  output logic [NRC-1:0]       reconf_active,
  output logic [NFN-1:0]       cmp_disagree,
  output scfh_events_t         events
);

  logic [CTR_W-1:0]       ctr;
  logic [AES_W-1:0]       block;          // M || C
  logic                   job_start, job_busy, job_done, job_ok, job_degraded;
  logic [AES_W-1:0]       out_aes;
  logic [MAC_W-1:0]       out_mac;
  logic [2:0][NFN-1:0]    start_mod, done_mod;
  logic [2:0][AES_W-1:0]  res_aes;
  logic [2:0][MAC_W-1:0]  res_mac;
  src_t [NFN-1:0]         sel_a, sel_b;
  logic [AES_W-1:0]       a_aes, b_aes;
  logic [MAC_W-1:0]       a_mac, b_mac;
  logic [2:0][NFN-1:0]    cmp_eq;
  logic [NFN-1:0]         vote;
  logic                   scv_fault;
  logic [NRC-1:0]         reconf_req, reconf_done;

  // ---- message intake and counter --------------------------------------------------------
  assign msg_ready = !job_busy && !job_start && !job_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctr           <= '0;
      block         <= '0;
      job_start     <= 1'b0;
      payload_valid <= 1'b0;
      payload       <= '0;
      payload_ctr   <= '0;
      payload_degraded <= 1'b0;
      send_fail     <= 1'b0;
    end else begin
      job_start     <= 1'b0;
      payload_valid <= 1'b0;
      send_fail     <= 1'b0;
      if (msg_valid && msg_ready) begin
        block     <= {msg, ctr};
        job_start <= 1'b1;
      end
      if (job_done) begin
        if (job_ok) begin
          payload          <= {out_mac, out_aes};
          payload_ctr      <= ctr;
          payload_degraded <= job_degraded;
          payload_valid    <= 1'b1;
          ctr              <= ctr + 1'b1;
        end else begin
          send_fail <= 1'b1;
        end
      end
    end
  end

  // ---- the three copies of each function (M1, M2, spare MS) ------------------------------
  for (genvar c = 0; c < 3; c++) begin : g_copy
    aes128_enc #(.FI_BIT(c)) u_aes (
      .clk, .rst_n, .start(start_mod[c][FN_AES]), .key(key_aes), .din(block),
      .fault_inj(fi_aes[c]), .busy(), .done(done_mod[c][FN_AES]), .dout(res_aes[c]));
    hmac_sha3_256 #(.FI_BIT(c)) u_mac (
      .clk, .rst_n, .start(start_mod[c][FN_MAC]), .key(key_mac), .msg(block),
      .fault_inj(fi_mac[c]), .busy(), .done(done_mod[c][FN_MAC]), .digest(res_mac[c]));
  end

  // ---- input interfaces, comparators in TMR, self-checking voter --------------------------
  input_interface u_if_a (.aes_in(res_aes), .mac_in(res_mac),
                          .sel_aes(sel_a[FN_AES]), .sel_mac(sel_a[FN_MAC]),
                          .aes_out(a_aes), .mac_out(a_mac));
  input_interface u_if_b (.aes_in(res_aes), .mac_in(res_mac),
                          .sel_aes(sel_b[FN_AES]), .sel_mac(sel_b[FN_MAC]),
                          .aes_out(b_aes), .mac_out(b_mac));

  for (genvar k = 0; k < 3; k++) begin : g_cmp
    dmr_comparator u_cmp (.a_aes, .b_aes, .a_mac, .b_mac, .fault_inj(fi_cmp[k]), .eq(cmp_eq[k]));
  end

  berger_scv u_scv (.c0(cmp_eq[0]), .c1(cmp_eq[1]), .c2(cmp_eq[2]), .fault_inj(fi_scv),
                    .vote, .disagree(cmp_disagree), .scv_fault);

  // ---- fault handler and reconfiguration sub-system ---------------------------------------
  scfh #(.NUM_SOFT_ERR(NUM_SOFT_ERR)) u_scfh (
    .clk, .rst_n, .job_start, .job_mask(NFN'(2'b11)), .job_busy, .job_done, .job_ok, .job_fail(),
    .job_degraded, .out_aes, .out_mac, .start_mod, .done_mod, .res_aes, .res_mac, .sel_a, .sel_b,
    .vote, .scv_fault, .reconf_req, .reconf_done, .out1, .out2, .events);

  reconfig_ctrl #(.RECONF_CYCLES(RECONF_CYCLES)) u_reconf (
    .clk, .rst_n, .req(reconf_req), .done(reconf_done), .active(reconf_active),
    .pending(), .busy());

endmodule

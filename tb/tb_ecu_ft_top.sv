// tb_ecu_ft_top -- end-to-end test of the sender / receiver pair.
//
// The sender's secure payload is carried to the receiver by the testbench, standing in for the
// internal buses, processors and CAN FD link. Every message M(i) must arrive with its counter,
// authentic and fresh, and every payload must equal the independently computed reference
// (tb_vectors_pkg). Faults are injected on both nodes so that each mechanism of the design
// happens at least once; the testbench counts them and fails a mechanism that never occurred:
// recomputation, spare activation, M1 / M2 / both localised faulty, partial reconfiguration
// and return to service, comparator outvoted, voter self-flag, degraded (spare-only) result,
// unrecoverable fault, integrity failure of an altered frame, and replay detection.
// Reconfiguration time is shortened to 500 cycles.
module tb_ecu_ft_top;
  import ecu_pkg::*;
  import tb_vectors_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_msg_valid = 1'b0, tx_msg_ready, tx_payload_valid, tx_degraded, tx_fail;
  logic [MSG_W-1:0] tx_msg = '0;
  logic [PAYLOAD_W-1:0] tx_payload;
  logic [CTR_W-1:0] tx_payload_ctr;
  logic [2:0] tx_fi_aes = '0, tx_fi_mac = '0, tx_fi_cmp = '0;
  logic [1:0] tx_fi_scv = '0;
  logic [NFN-1:0] tx_out1, tx_out2, tx_cmp_disagree;
  logic [NRC-1:0] tx_reconf_active;
  scfh_events_t tx_events;
  logic rx_payload_valid = 1'b0, rx_payload_ready;
  logic [PAYLOAD_W-1:0] rx_payload = '0;
  logic rx_valid, rx_auth_ok, rx_fresh, rx_degraded, rx_fail;
  logic [MSG_W-1:0] rx_msg;
  logic [CTR_W-1:0] rx_ctr;
  logic [2:0] rx_fi_aes = '0, rx_fi_mac = '0, rx_fi_cmp = '0;
  logic [1:0] rx_fi_scv = '0;
  logic [NFN-1:0] rx_out1, rx_out2, rx_cmp_disagree;
  logic [NRC-1:0] rx_reconf_active;
  scfh_events_t rx_events;

  ecu_ft_top #(.NUM_SOFT_ERR(3), .RECONF_CYCLES(500)) dut (
    .clk, .rst_n, .tx_key_aes(K_AES), .tx_key_mac(K_MAC), .tx_msg_valid, .tx_msg, .tx_msg_ready,
    .tx_payload_valid, .tx_payload, .tx_payload_ctr, .tx_degraded, .tx_fail,
    .tx_fi_aes, .tx_fi_mac, .tx_fi_cmp, .tx_fi_scv, .tx_out1, .tx_out2, .tx_reconf_active,
    .tx_cmp_disagree, .tx_events,
    .rx_key_aes(K_AES), .rx_key_mac(K_MAC), .rx_payload_valid, .rx_payload, .rx_payload_ready,
    .rx_valid, .rx_msg, .rx_ctr, .rx_auth_ok, .rx_fresh, .rx_degraded, .rx_fail,
    .rx_fi_aes, .rx_fi_mac, .rx_fi_cmp, .rx_fi_scv, .rx_out1, .rx_out2, .rx_reconf_active,
    .rx_cmp_disagree, .rx_events);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters (both nodes) ----------------------------------------------------
  typedef enum int {
    EV_RECOMPUTE, EV_SPARE, EV_M1, EV_M2, EV_BOTH, EV_SCV, EV_RESTORED, EV_UNREC,
    EV_OUTVOTED, EV_DEGRADED, EV_AUTH_FAIL, EV_REPLAY, EV_RECONF, NEV
  } ev_e;
  int n_ev [NEV];
  string ev_name [NEV] = '{"recomputation", "spare activation", "M1 localised", "M2 localised",
    "both localised", "voter self-flag", "return to service", "unrecoverable fault",
    "comparator outvoted", "degraded result", "integrity failure", "replay detected",
    "partial reconfiguration"};
  logic [NRC-1:0] tx_ra_q = '0, rx_ra_q = '0;

  initial foreach (n_ev[i]) n_ev[i] = 0;
  always @(posedge clk) if (rst_n) begin
    n_ev[EV_RECOMPUTE] += tx_events.recompute + rx_events.recompute;
    n_ev[EV_SPARE]     += tx_events.spare_on + rx_events.spare_on;
    n_ev[EV_M1]        += tx_events.m1_faulty + rx_events.m1_faulty;
    n_ev[EV_M2]        += tx_events.m2_faulty + rx_events.m2_faulty;
    n_ev[EV_BOTH]      += tx_events.both_faulty + rx_events.both_faulty;
    n_ev[EV_SCV]       += tx_events.scv_fault + rx_events.scv_fault;
    n_ev[EV_RESTORED]  += tx_events.restored + rx_events.restored;
    n_ev[EV_UNREC]     += tx_events.unrecoverable + rx_events.unrecoverable;
    n_ev[EV_OUTVOTED]  += (tx_payload_valid && |tx_cmp_disagree) + (rx_valid && |rx_cmp_disagree);
    n_ev[EV_DEGRADED]  += (tx_payload_valid && tx_degraded) + (rx_valid && rx_degraded);
    n_ev[EV_AUTH_FAIL] += (rx_valid && !rx_auth_ok);
    n_ev[EV_REPLAY]    += (rx_valid && rx_auth_ok && !rx_fresh);
    n_ev[EV_RECONF]    += $countones(tx_reconf_active & ~tx_ra_q) + $countones(rx_reconf_active & ~rx_ra_q);
    tx_ra_q <= tx_reconf_active;
    rx_ra_q <= rx_reconf_active;
  end

  // ---- one message end to end -------------------------------------------------------------
  int next_ctr = 0;
  logic [PAYLOAD_W-1:0] last_good;

  task automatic deliver(input logic [PAYLOAD_W-1:0] p);
    @(negedge clk);
    while (!rx_payload_ready) @(negedge clk);
    rx_payload = p;
    rx_payload_valid = 1'b1;
    @(negedge clk);
    rx_payload_valid = 1'b0;
    while (!rx_valid && !rx_fail) @(negedge clk);
  endtask

  // send M(next_ctr); `tamper` alters the frame on the way; returns whether the sender succeeded
  task automatic transfer(input bit tamper, output bit sent);
    logic [PAYLOAD_W-1:0] p;
    @(negedge clk);
    while (!tx_msg_ready) @(negedge clk);
    tx_msg = msg_of(next_ctr);
    tx_msg_valid = 1'b1;
    @(negedge clk);
    tx_msg_valid = 1'b0;
    while (!tx_payload_valid && !tx_fail) @(negedge clk);
    sent = tx_payload_valid;
    if (!sent) return;
    p = tx_payload;
    check(p == expected_payload(next_ctr), $sformatf("payload of message %0d", next_ctr));
    check(tx_payload_ctr == CTR_W'(next_ctr), "sender counter");
    deliver(tamper ? (p ^ (PAYLOAD_W'(1) << 200)) : p);
    if (tamper) begin
      check(rx_valid && !rx_auth_ok, "altered frame rejected");
    end else begin
      check(rx_valid && rx_auth_ok && rx_fresh, $sformatf("message %0d accepted", next_ctr));
      check(rx_msg == msg_of(next_ctr) && rx_ctr == CTR_W'(next_ctr),
            $sformatf("message %0d content", next_ctr));
      last_good = p;
    end
    next_ctr++;
  endtask

  task automatic wait_reconf();
    while (tx_reconf_active != '0 || rx_reconf_active != '0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  bit sent;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    transfer(0, sent);                                    // fault-free

    tx_fi_aes[SRC_M1] = 1'b1;                             // sender transient
    fork
      transfer(0, sent);
      begin
        while (!tx_events.mismatch) @(negedge clk);
        tx_fi_aes[SRC_M1] = 1'b0;
      end
    join

    rx_fi_mac[SRC_M2] = 1'b1;                             // receiver transient
    fork
      transfer(0, sent);
      begin
        while (!rx_events.mismatch) @(negedge clk);
        rx_fi_mac[SRC_M2] = 1'b0;
      end
    join

    tx_fi_mac[SRC_M1] = 1'b1;                             // sender permanent, M1
    transfer(0, sent);
    rx_fi_aes[SRC_M2] = 1'b1;                             // receiver permanent, M2
    transfer(0, sent);

    tx_fi_cmp[0] = 1'b1;                                  // faulty comparator / voter
    rx_fi_scv = 2'b01;
    transfer(0, sent);
    tx_fi_cmp[0] = 1'b0;
    rx_fi_scv = 2'b00;

    rx_fi_mac[SRC_M1] = 1'b1;                             // receiver: both HMAC copies
    rx_fi_mac[SRC_M2] = 1'b1;
    transfer(0, sent);
    check(rx_degraded, "receiver result from the spare alone is marked degraded");

    wait_reconf();                                        // reconfiguration heals the copies
    tx_fi_mac = '0; rx_fi_mac = '0; rx_fi_aes = '0;
    transfer(0, sent);
    check(tx_out1 == '0 && tx_out2 == '0 && rx_out1 == '0 && rx_out2 == '0, "all copies in service");

    transfer(1, sent);                                    // altered frame
    deliver(last_good);                                   // replay of an old frame
    check(rx_valid && rx_auth_ok && !rx_fresh, "replayed frame flagged stale");

    tx_fi_aes[SRC_M1] = 1'b1;                             // sender: fault, then a second one
    transfer(0, sent);
    tx_fi_aes[SRC_M2] = 1'b1;
    transfer(0, sent);
    check(!sent, "second fault with the spare in use stops the send");
    tx_fi_aes[SRC_M2] = 1'b0;
    wait_reconf();
    tx_fi_aes = '0;
    transfer(0, sent);
    check(sent, "sending resumes after reconfiguration");

    foreach (n_ev[i]) begin
      $display("mechanism %-24s %0d", ev_name[i], n_ev[i]);
      check(n_ev[i] > 0, $sformatf("mechanism '%s' never happened", ev_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

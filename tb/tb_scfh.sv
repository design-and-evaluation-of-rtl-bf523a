// tb_scfh -- scenario test of the fault handler against behavioural copies.
//
// The three copies of each function are modelled in the testbench: a start produces a `done`
// a fixed number of cycles later (AES 4, HMAC 7) with a known-good result, XORed with an
// injected error pattern (permanent per copy, or transient for the next computation only).
// The vote is computed by the testbench from the copies selected by sel_a / sel_b, as the
// comparators would. Scenarios: fault-free; transient fault cured by recomputation; permanent
// fault in M2 (spare takes over, reconfiguration requested, copy restored); permanent faults
// in both M1 and M2 (spare alone, degraded); a second fault while the spare is in use
// (unrecoverable); a faulty voter (handler falls back to its own comparison). Each scenario
// checks the job outcome, delivered result, status bits, reconfiguration requests and the
// number of computations started.
module tb_scfh;
  import ecu_pkg::*;
  localparam int unsigned NSE = 3;
  localparam int LAT [NFN] = '{4, 7};

  logic clk = 1'b0, rst_n = 1'b0;
  logic job_start = 1'b0;
  logic [NFN-1:0] job_mask = '0;
  logic job_busy, job_done, job_ok, job_fail, job_degraded;
  logic [AES_W-1:0] out_aes;
  logic [MAC_W-1:0] out_mac;
  logic [2:0][NFN-1:0] start_mod, done_mod = '0;
  logic [2:0][AES_W-1:0] res_aes = '0;
  logic [2:0][MAC_W-1:0] res_mac = '0;
  src_t [NFN-1:0] sel_a, sel_b;
  logic [NFN-1:0] vote;
  logic scv_fault = 1'b0;
  logic [NRC-1:0] reconf_req, reconf_done = '0;
  logic [NFN-1:0] out1, out2;
  scfh_events_t events;

  scfh #(.NUM_SOFT_ERR(NSE)) dut (.*);

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- behavioural copies --------------------------------------------------------------
  logic [AES_W-1:0] gold_aes;
  logic [MAC_W-1:0] gold_mac;
  logic [2:0][NFN-1:0] perm = '0, trans = '0;   // error injected as result bit 0 / bit 1
  int busy_cnt [3][NFN];
  int starts [3][NFN];
  logic [2:0][NFN-1:0] err_now = '0;
  logic force_bad_vote = 1'b0;

  initial foreach (busy_cnt[c, f]) begin busy_cnt[c][f] = 0; starts[c][f] = 0; end

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 3; c++)
      for (int f = 0; f < NFN; f++) begin
        done_mod[c][f] <= 1'b0;
        if (start_mod[c][f]) begin
          busy_cnt[c][f] <= LAT[f];
          starts[c][f]++;
          err_now[c][f] <= perm[c][f] | trans[c][f];
          trans[c][f] <= 1'b0;
        end else if (busy_cnt[c][f] > 0) begin
          busy_cnt[c][f] <= busy_cnt[c][f] - 1;
          if (busy_cnt[c][f] == 1) begin
            done_mod[c][f] <= 1'b1;
            if (f == FN_AES) res_aes[c] <= gold_aes ^ (err_now[c][f] ? AES_W'(1 << c) : '0);
            else             res_mac[c] <= gold_mac ^ (err_now[c][f] ? MAC_W'(1 << c) : '0);
          end
        end
      end
  end

  // comparators as seen through the input interfaces
  always_comb begin
    vote[FN_AES] = (res_aes[sel_a[FN_AES]] == res_aes[sel_b[FN_AES]]);
    vote[FN_MAC] = (res_mac[sel_a[FN_MAC]] == res_mac[sel_b[FN_MAC]]);
    if (force_bad_vote) vote = ~vote;
  end

  // ---- event and request bookkeeping ---------------------------------------------------
  int n_recompute = 0, n_spare = 0, n_m1 = 0, n_m2 = 0, n_both = 0, n_scv = 0, n_restore = 0,
      n_unrec = 0;
  logic [NRC-1:0] req_seen = '0;
  always @(posedge clk) if (rst_n) begin
    n_recompute += events.recompute;
    n_spare     += events.spare_on;
    n_m1        += events.m1_faulty;
    n_m2        += events.m2_faulty;
    n_both      += events.both_faulty;
    n_scv       += events.scv_fault;
    n_restore   += events.restored;
    n_unrec     += events.unrecoverable;
    req_seen    |= reconf_req;
  end

  function automatic int total_starts();
    int s = 0;
    foreach (starts[c, f]) s += starts[c][f];
    return s;
  endfunction

  // run one job; returns outcome flags
  task automatic run_job(input logic [NFN-1:0] m, output bit ok, output bit fail, output bit deg);
    for (int w = 0; w < 4; w++) gold_aes[32*w +: 32] = $urandom;
    for (int w = 0; w < 8; w++) gold_mac[32*w +: 32] = $urandom;
    @(negedge clk);
    job_mask = m; job_start = 1'b1;
    @(negedge clk);
    job_start = 1'b0;
    while (!job_done) @(negedge clk);
    ok = job_ok; fail = job_fail; deg = job_degraded;
    if (ok) begin
      if (m[FN_AES]) check(out_aes == gold_aes, "delivered AES result is the fault-free one");
      if (m[FN_MAC]) check(out_mac == gold_mac, "delivered HMAC result is the fault-free one");
    end
    @(negedge clk);
  endtask

  task automatic finish_reconf(input logic [NRC-1:0] which);
    @(negedge clk);
    reconf_done = which;
    @(negedge clk);
    reconf_done = '0;
    repeat (2) @(negedge clk);
  endtask

  bit ok, fail, deg;
  int s0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. fault-free: one computation on M1 and M2 of both functions
    s0 = total_starts();
    run_job(2'b11, ok, fail, deg);
    check(ok && !fail && !deg, "fault-free job succeeds");
    check(total_starts() - s0 == 4, "fault-free job starts the 4 DMR copies once");
    check(starts[SRC_MS][FN_AES] == 0 && starts[SRC_MS][FN_MAC] == 0, "spares stay idle");

    // 2. transient fault in M1's AES: one recomputation of both functions cures it
    s0 = total_starts();
    trans[SRC_M1][FN_AES] = 1'b1;
    run_job(2'b11, ok, fail, deg);
    check(ok && !deg, "transient fault recovered");
    check(n_recompute == 1 && n_spare == 0, "exactly one recomputation, no spare");
    check(total_starts() - s0 == 8, "recomputation reruns both DMR pairs");
    check(out1 == '0 && out2 == '0, "no copy taken out of service");

    // 3. permanent fault in M2's HMAC: NSE computations, then the spare localises it
    s0 = total_starts();
    perm[SRC_M2][FN_MAC] = 1'b1;
    run_job(2'b11, ok, fail, deg);
    check(ok && !deg, "permanent M2 fault recovered through the spare");
    check(n_recompute == 1 + (NSE - 1), "NUM_SOFT_ERR - 1 recomputations before the spare");
    check(n_spare == 1 && n_m2 == 1, "spare activated and M2 found faulty");
    check(total_starts() - s0 == 4 * NSE + 1, "NSE DMR rounds plus one spare computation");
    check(out2 == 2'b10 && out1 == '0, "M2 of the HMAC out of service");
    check(req_seen == (NRC'(1) << RC_MAC2), "reconfiguration of M2 HMAC requested");
    // next job runs the HMAC on M1 + spare, fault-free
    s0 = total_starts();
    run_job(2'b11, ok, fail, deg);
    check(ok && !deg, "job on M1 + spare succeeds");
    check(sel_b[FN_MAC] == SRC_MS && sel_b[FN_AES] == SRC_M2, "HMAC side B now the spare");
    check(starts[SRC_M2][FN_MAC] == 1 + 2 + NSE, "faulty M2 HMAC no longer started");
    // reconfiguration finishes: the copy returns to service (fault removed)
    perm[SRC_M2][FN_MAC] = 1'b0;
    finish_reconf(NRC'(1) << RC_MAC2);
    check(out2 == '0 && n_restore == 1, "M2 HMAC restored after reconfiguration");

    // 4. both AES copies permanently faulty: spare alone, degraded
    perm[SRC_M1][FN_AES] = 1'b1;
    perm[SRC_M2][FN_AES] = 1'b1;
    req_seen = '0;
    run_job(2'b11, ok, fail, deg);
    check(ok && deg, "both faulty: spare result delivered, marked degraded");
    check(n_both == 1, "both copies localised as faulty");
    check(out1 == 2'b01 && out2 == 2'b01, "both AES copies out of service");
    check(req_seen == ((NRC'(1) << RC_AES1) | (NRC'(1) << RC_AES2)), "both AES copies sent to reconfiguration");
    run_job(2'b01, ok, fail, deg);
    check(ok && deg, "spare-only AES job is degraded");
    perm[SRC_M1][FN_AES] = 1'b0;
    perm[SRC_M2][FN_AES] = 1'b0;
    finish_reconf((NRC'(1) << RC_AES1) | (NRC'(1) << RC_AES2));
    check(out1 == '0 && out2 == '0, "AES copies restored");

    // 5. M1 AES faulty, then M2 AES faulty while the spare stands in: unrecoverable
    perm[SRC_M1][FN_AES] = 1'b1;
    run_job(2'b01, ok, fail, deg);
    check(ok && n_m1 == 1 && out1 == 2'b01, "M1 AES localised");
    perm[SRC_M2][FN_AES] = 1'b1;
    run_job(2'b01, ok, fail, deg);
    check(!ok && fail && n_unrec == 1, "second fault with spare in use is reported");
    perm = '0;
    finish_reconf(NRC'(1) << RC_AES1);
    check(out1 == '0, "M1 AES restored");

    // 6. voter flags itself and gives a wrong vote: handler uses its own comparison
    scv_fault = 1'b1;
    force_bad_vote = 1'b1;
    s0 = total_starts();
    run_job(2'b11, ok, fail, deg);
    check(ok && n_scv >= 1, "faulty voter detected, job still succeeds");
    check(total_starts() - s0 == 4, "no needless recomputation with a faulty voter");
    scv_fault = 1'b0;
    force_bad_vote = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// scfh -- self-checking fault handler: the controller of the fault-tolerant cryptographic
// module, running the detect / recompute / spare / localise / reconfigure procedure.
//
// Each function (AES, HMAC) has three copies: the DMR pair M1, M2 and a spare MS. Per function
// two status bits say whether M1 (`out1`) or M2 (`out2`) is out of service; the spare stands
// in for the missing copy, so the comparator sides are A = out1 ? MS : M1 and
// B = out2 ? MS : M2 (`sel_a`, `sel_b`). With both out, the spare runs alone.
//
// A job (`job_start`, functions in `job_mask`, inputs already on the copies' ports) runs as:
//   1. start the in-service copies of every function in the mask; wait for all `done`s;
//      every result is kept in a buffer (one entry per copy and function);
//   2. read the self-checking voter. If it flags itself (`scv_fault`), the handler compares
//      the buffered A and B results itself instead;
//   3. all functions agree: deliver side A's result, job done;
//   4. a disagreement: if fewer than NUM_SOFT_ERR computations were made, recompute on the
//      same copies with the same inputs and go to 2;
//   5. otherwise start the spare of each disagreeing function (possible only while that
//      function is still in plain DMR) and compare its result with the buffered M1 and M2
//      results: the copy that differs from the spare is faulty and taken out of service;
//      if both differ, both are. Each faulty copy is sent to the reconfiguration sub-system
//      (`reconf_req`), and the spare's result is delivered;
//   6. a disagreement with the spare already in use cannot be localised: the job ends with
//      `job_fail` and nothing is delivered.
// A copy returns to service when its `reconf_done` arrives (applied between jobs).
// `job_done` pulses once per job with `job_ok`, `job_fail` and `job_degraded` (some result
// came from the spare alone, unchecked) valid in the same cycle; `out_aes` / `out_mac` hold
// the last delivered results. `events` pulses once per mechanism used (see ecu_pkg).
//
// From the document: DMR plus spare per function, the NUM_SOFT_ERR recomputation bound with
// the count starting at 1, spare activation, localisation against the buffered results,
// partial reconfiguration, continuing on the spare while reconfiguring. This design's
// choices: the result after the last allowed recomputation is still checked; only the
// spares of disagreeing functions are started; the handler's own comparison as fallback for a
// faulty voter; failure when no spare is left. NUM_SOFT_ERR = 3 is an assumed default; the
// document derives it per application from the deadline slack.
module scfh
  import ecu_pkg::*;
#(
  parameter int unsigned NUM_SOFT_ERR = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  // job control
  input  logic                job_start,
  input  logic [NFN-1:0]      job_mask,
  output logic                job_busy,
  output logic                job_done,
  output logic                job_ok,
  output logic                job_fail,
  output logic                job_degraded,
  output logic [AES_W-1:0]    out_aes,
  output logic [MAC_W-1:0]    out_mac,
  // copies: starts, completions and results, indexed [function] / src_t
  output logic [2:0][NFN-1:0] start_mod,
  input  logic [2:0][NFN-1:0] done_mod,
  input  logic [2:0][AES_W-1:0] res_aes,
  input  logic [2:0][MAC_W-1:0] res_mac,
  // input interfaces and voter
  output src_t [NFN-1:0]      sel_a,
  output src_t [NFN-1:0]      sel_b,
  input  logic [NFN-1:0]      vote,
  input  logic                scv_fault,
  // reconfiguration sub-system
  output logic [NRC-1:0]      reconf_req,
  input  logic [NRC-1:0]      reconf_done,
  output logic [NFN-1:0]      out1,
  output logic [NFN-1:0]      out2,
  output scfh_events_t        events
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_VOTE, S_SPARE_WAIT, S_LOCAL} state_e;
  state_e st;

  logic [2:0][AES_W-1:0] buf_aes;       // result buffer, one entry per copy
  logic [2:0][MAC_W-1:0] buf_mac;
  logic [2:0][NFN-1:0]   pend;          // started copies not yet done
  logic [NFN-1:0]        mask, spare_set;
  logic [NFN-1:0]        restore1, restore2;  // reconfiguration finished, apply when idle
  logic [NFN-1:0]        rd1, rd2;
  assign rd1 = {reconf_done[RC_MAC1], reconf_done[RC_AES1]};
  assign rd2 = {reconf_done[RC_MAC2], reconf_done[RC_AES2]};
  int unsigned           count;         // computations made in this job (starts at 1)

  // comparator side selection
  always_comb begin
    for (int f = 0; f < NFN; f++) begin
      sel_a[f] = out1[f] ? SRC_MS : SRC_M1;
      sel_b[f] = out2[f] ? SRC_MS : SRC_M2;
    end
  end

  // which copies run for the functions in m
  function automatic logic [2:0][NFN-1:0] launch(input logic [NFN-1:0] m,
                                                input logic [NFN-1:0] o1,
                                                input logic [NFN-1:0] o2);
    logic [2:0][NFN-1:0] s;
    s[SRC_M1] = m & ~o1;
    s[SRC_M2] = m & ~o2;
    s[SRC_MS] = m & (o1 | o2);
    return s;
  endfunction

  // per-function agreement of sides A and B, from the voter or from the buffer
  logic [NFN-1:0] single, own_eq, agree;
  always_comb begin
    for (int f = 0; f < NFN; f++) single[f] = out1[f] & out2[f];
    own_eq[FN_AES] = (buf_aes[sel_a[FN_AES]] == buf_aes[sel_b[FN_AES]]);
    own_eq[FN_MAC] = (buf_mac[sel_a[FN_MAC]] == buf_mac[sel_b[FN_MAC]]);
    agree = single | (scv_fault ? own_eq : vote);
  end

  logic [NFN-1:0] mism;
  assign mism = mask & ~agree;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      buf_aes      <= '0;
      buf_mac      <= '0;
      pend         <= '0;
      mask         <= '0;
      spare_set    <= '0;
      restore1     <= '0;
      restore2     <= '0;
      count        <= '0;
      out1         <= '0;
      out2         <= '0;
      out_aes      <= '0;
      out_mac      <= '0;
      start_mod    <= '0;
      reconf_req   <= '0;
      job_done     <= 1'b0;
      job_ok       <= 1'b0;
      job_fail     <= 1'b0;
      job_degraded <= 1'b0;
      events       <= '0;
    end else begin
      start_mod  <= '0;
      reconf_req <= '0;
      job_done   <= 1'b0;
      events     <= '0;

      for (int c = 0; c < 3; c++) begin
        if (done_mod[c][FN_AES]) buf_aes[c] <= res_aes[c];
        if (done_mod[c][FN_MAC]) buf_mac[c] <= res_mac[c];
      end

      if (st != S_IDLE) begin
        restore1 <= restore1 | rd1;
        restore2 <= restore2 | rd2;
      end

      unique case (st)
        S_IDLE: begin
          logic [NFN-1:0] o1n, o2n;
          o1n = out1 & ~(restore1 | rd1);
          o2n = out2 & ~(restore2 | rd2);
          out1     <= o1n;
          out2     <= o2n;
          restore1 <= '0;
          restore2 <= '0;
          events.restored <= ((restore1 | restore2 | rd1 | rd2) != '0);
          if (job_start) begin
            mask         <= job_mask;
            count        <= 1;
            job_degraded <= 1'b0;
            start_mod    <= launch(job_mask, o1n, o2n);
            pend         <= launch(job_mask, o1n, o2n);
            st           <= S_WAIT;
          end
        end

        S_WAIT, S_SPARE_WAIT: begin
          pend <= pend & ~done_mod;
          if ((pend & ~done_mod) == '0) st <= (st == S_WAIT) ? S_VOTE : S_LOCAL;
        end

        S_VOTE: begin
          events.scv_fault <= scv_fault;
          if (mism == '0) begin
            if (mask[FN_AES]) out_aes <= buf_aes[sel_a[FN_AES]];
            if (mask[FN_MAC]) out_mac <= buf_mac[sel_a[FN_MAC]];
            job_degraded <= |(mask & single);
            job_ok       <= 1'b1;
            job_fail     <= 1'b0;
            job_done     <= 1'b1;
            st           <= S_IDLE;
          end else begin
            events.mismatch <= 1'b1;
            if (count < NUM_SOFT_ERR) begin
              count            <= count + 1;
              events.recompute <= 1'b1;
              start_mod        <= launch(mask, out1, out2);
              pend             <= launch(mask, out1, out2);
              st               <= S_WAIT;
            end else if ((mism & (out1 | out2)) != '0) begin
              events.unrecoverable <= 1'b1;
              job_ok   <= 1'b0;
              job_fail <= 1'b1;
              job_done <= 1'b1;
              st       <= S_IDLE;
            end else begin
              events.spare_on     <= 1'b1;
              spare_set           <= mism;
              start_mod[SRC_MS]   <= mism;
              pend                <= '0;
              pend[SRC_MS]        <= mism;
              // functions that agreed deliver their DMR result now
              if (mask[FN_AES] && !mism[FN_AES]) out_aes <= buf_aes[sel_a[FN_AES]];
              if (mask[FN_MAC] && !mism[FN_MAC]) out_mac <= buf_mac[sel_a[FN_MAC]];
              st <= S_SPARE_WAIT;
            end
          end
        end

        S_LOCAL: begin
          logic [NFN-1:0] eq1, eq2;
          eq1[FN_AES] = (buf_aes[SRC_MS] == buf_aes[SRC_M1]);
          eq2[FN_AES] = (buf_aes[SRC_MS] == buf_aes[SRC_M2]);
          eq1[FN_MAC] = (buf_mac[SRC_MS] == buf_mac[SRC_M1]);
          eq2[FN_MAC] = (buf_mac[SRC_MS] == buf_mac[SRC_M2]);
          for (int f = 0; f < NFN; f++) begin
            if (spare_set[f]) begin
              if (!eq1[f]) begin
                out1[f] <= 1'b1;
                reconf_req[(f == FN_AES) ? RC_AES1 : RC_MAC1] <= 1'b1;
              end
              if (!eq2[f]) begin
                out2[f] <= 1'b1;
                reconf_req[(f == FN_AES) ? RC_AES2 : RC_MAC2] <= 1'b1;
              end
            end
          end
          events.m1_faulty   <= |(spare_set & ~eq1 & eq2);
          events.m2_faulty   <= |(spare_set & eq1 & ~eq2);
          events.both_faulty <= |(spare_set & ~eq1 & ~eq2);
          if (spare_set[FN_AES]) out_aes <= buf_aes[SRC_MS];
          if (spare_set[FN_MAC]) out_mac <= buf_mac[SRC_MS];
          job_degraded <= |(spare_set & ~eq1 & ~eq2);
          job_ok       <= 1'b1;
          job_fail     <= 1'b0;
          job_done     <= 1'b1;
          st           <= S_IDLE;
        end

        default: st <= S_IDLE;
      endcase
    end
  end

  assign job_busy = (st != S_IDLE);

  // a copy that is out of service is never started
  a_m1_idle: assert property (@(posedge clk) disable iff (!rst_n) (start_mod[SRC_M1] & out1) == '0)
    else $error("scfh: started M1 while out of service");
  a_m2_idle: assert property (@(posedge clk) disable iff (!rst_n) (start_mod[SRC_M2] & out2) == '0)
    else $error("scfh: started M2 while out of service");

endmodule

// tb_reconfig_ctrl -- checks the reconfiguration sequencer with a short rewrite time:
// one request completes exactly RECONF_CYCLES after it becomes active, simultaneous and
// overlapping requests are served one at a time lowest position first, and every request
// gets exactly one `done`.
module tb_reconfig_ctrl;
  import ecu_pkg::*;
  localparam int unsigned RC = 37;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NRC-1:0] req = '0, done, active, pending;
  logic busy;
  int checks = 0, failures = 0;
  int done_cnt [NRC];
  int t_active, t_done;

  reconfig_ctrl #(.RECONF_CYCLES(RC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int i = 0; i < NRC; i++) if (done[i]) done_cnt[i]++;
  end

  task automatic pulse(input logic [NRC-1:0] r);
    @(negedge clk);
    req = r;
    @(negedge clk);
    req = '0;
  endtask

  task automatic wait_done(input int idx, output int when);
    while (!done[idx]) @(negedge clk);
    when = cyc;
    @(negedge clk);
  endtask

  initial begin
    foreach (done_cnt[i]) done_cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // single request, timed
    pulse(4'b0100);
    check(active == 4'b0100 && busy, "request becomes active on the next cycle");
    t_active = cyc;
    wait_done(2, t_done);
    check(t_done - t_active == RC, $sformatf("rewrite took %0d cycles, want %0d", t_done - t_active, RC));
    check(!busy, "idle after done");
    // two at once plus one arriving later
    pulse(4'b1010);
    check(active == 4'b0010, "lowest of simultaneous requests first");
    repeat (5) @(negedge clk);
    pulse(4'b0001);
    check(pending == 4'b1011, "late request kept pending");
    wait_done(1, t_done);
    check(active == 4'b0001, "then the lowest pending");
    wait_done(0, t_done);
    wait_done(3, t_done);
    repeat (3) @(negedge clk);
    check(done_cnt[0] == 1 && done_cnt[1] == 1 && done_cnt[2] == 1 && done_cnt[3] == 1,
          "one done per request");
    check(pending == '0 && !busy, "all served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

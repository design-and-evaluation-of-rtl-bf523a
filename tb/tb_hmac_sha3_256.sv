// tb_hmac_sha3_256 -- self-checking test of hmac_sha3_256.
//
// Expected digests are HMAC-SHA3-256 values computed with an independent implementation for
// three key/message pairs (all-zero, counting key, FIPS-197-style key). Checks the 96-cycle
// latency, that inputs are sampled only on start, and the fault-emulation input.
module tb_hmac_sha3_256;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, fault_inj = 1'b0;
  logic [127:0] key = '0, msg = '0;
  logic [255:0] digest;
  logic busy, done;
  int checks = 0, failures = 0;

  hmac_sha3_256 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_vec(input logic [127:0] k, input logic [127:0] m, input logic [255:0] d);
    int cyc = 0;
    @(negedge clk);
    key = k; msg = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    msg = ~m;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(digest == d, $sformatf("key %h msg %h: got %h want %h", k, m, digest, d));
    check(cyc == 96, $sformatf("latency %0d cycles, want 96", cyc));
    fault_inj = 1'b1;
    #1 check(digest == (d ^ 256'h1), "fault injection must flip digest bit 0");
    fault_inj = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_vec(128'h0, 128'h0,
            256'h00b496853fb797ec78a4d29d20aef15286bb55cf2ba9a06776ea7624e6a3f17b);
    run_vec(128'h000102030405060708090a0b0c0d0e0f, 128'h0123456789abcdeffedcba9876543210,
            256'haeb0b792e5d3ee834c73cb74e0af02b1fc9ba89cf863b54ae0382550d9bffd53);
    run_vec(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a,
            256'h58bf55eb5a421c2263e9f7cad603c4579e504bbe8e7ec72676a6a2f7183d4d44);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

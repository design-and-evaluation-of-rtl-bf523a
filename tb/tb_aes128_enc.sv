// tb_aes128_enc -- self-checking test of aes128_enc: AES-128 encryption of nine known blocks.
//
// Expected values are the FIPS-197 example (key 000102..0f) and further key/plaintext pairs
// computed with an independent AES-128 implementation. Each run also checks the 10-cycle
// start-to-done latency and that the fault-emulation input corrupts the output.
module tb_aes128_enc;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, fault_inj = 1'b0;
  logic [127:0] key = '0, din = '0, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  aes128_enc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic run_vec(input logic [127:0] k, input logic [127:0] x, input logic [127:0] y);
    int cyc = 0;
    @(negedge clk);
    key = k; din = x; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    key = ~k; din = ~x;   // inputs must only be sampled on start
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(dout == y, $sformatf("key %h in %h: got %h want %h", k, x, dout, y));
    check(cyc == 10, $sformatf("latency %0d cycles, want 10", cyc));
    fault_inj = 1'b1;
    #1 check(dout == (y ^ 128'h1), "fault injection must flip output bit 0");
    fault_inj = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_vec(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run_vec(128'h000102030405060708090a0b0c0d0e0f, 128'h6bc1bee22e409f96e93d7e117393172a, 128'h47c58d5e21caaf840d015b7d9b910981);
    run_vec(128'h000102030405060708090a0b0c0d0e0f, 128'h0123456789abcdeffedcba9876543210, 128'h868d79bd49a5681cfae908ad51300ba0);
    run_vec(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h00112233445566778899aabbccddeeff, 128'h8df4e9aac5c7573a27d8d055d6e4d64b);
    run_vec(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a, 128'h3ad77bb40d7a3660a89ecaf32466ef97);
    run_vec(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0123456789abcdeffedcba9876543210, 128'h526c1accc320c5226c25617c107d07b3);
    run_vec(128'h00112233445566778899aabbccddeeff, 128'h00112233445566778899aabbccddeeff, 128'h62f679be2bf0d931641e039ca3401bb2);
    run_vec(128'h00112233445566778899aabbccddeeff, 128'h6bc1bee22e409f96e93d7e117393172a, 128'h0f377420bbe1ae3118f9517ec1ce6822);
    run_vec(128'h00112233445566778899aabbccddeeff, 128'h0123456789abcdeffedcba9876543210, 128'h5be121322e8737863d5b8229a71db4b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

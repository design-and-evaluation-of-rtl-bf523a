// tb_dmr_comparator -- checks the per-function equality outputs for equal values, values
// differing in one random bit of either function, and the comparator fault-emulation input.
module tb_dmr_comparator;
  import ecu_pkg::*;
  logic [AES_W-1:0] a_aes, b_aes;
  logic [MAC_W-1:0] a_mac, b_mac;
  logic fault_inj = 1'b0;
  logic [NFN-1:0] eq;
  int checks = 0, failures = 0;

  dmr_comparator dut (.*);

  task automatic expect_eq(input logic [NFN-1:0] want, input string what);
    #1;
    checks++;
    if (eq !== want) begin
      failures++;
      $display("FAIL: %s: eq=%b want %b", what, eq, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 100; it++) begin
      for (int w = 0; w < 4; w++) a_aes[32*w +: 32] = $urandom;
      for (int w = 0; w < 8; w++) a_mac[32*w +: 32] = $urandom;
      b_aes = a_aes; b_mac = a_mac;
      fault_inj = 1'b0;
      expect_eq(2'b11, "equal");
      b_aes[$urandom_range(127)] ^= 1'b1;
      expect_eq(2'b10, "AES differs");
      b_aes = a_aes;
      b_mac[$urandom_range(255)] ^= 1'b1;
      expect_eq(2'b01, "HMAC differs");
      fault_inj = 1'b1;
      expect_eq(2'b10, "HMAC differs, faulty comparator");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_berger_scv -- exhaustive test of the self-checking voter: for every combination of the
// three comparator words and every emulated internal fault, the vote must be the 2-of-3
// majority, `disagree` must flag non-unanimous inputs, and `scv_fault` must be raised exactly
// when an internal fault is emulated.
module tb_berger_scv;
  import ecu_pkg::*;
  logic [NFN-1:0] c0, c1, c2, vote, disagree;
  logic [1:0] fault_inj;
  logic scv_fault;
  int checks = 0, failures = 0;

  berger_scv dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++)
      for (int fi = 0; fi < 4; fi++) begin
        logic [NFN-1:0] maj, dis;
        {c0, c1, c2} = 6'(v);
        fault_inj = 2'(fi);
        #1;
        maj = (c0 & c1) | (c0 & c2) | (c1 & c2);
        dis = (c0 ^ c1) | (c1 ^ c2);
        checks++;
        if (scv_fault !== (fi != 0)) begin
          failures++;
          $display("FAIL: v=%b fi=%0d scv_fault=%b", v, fi, scv_fault);
        end
        checks++;
        if (disagree !== dis) begin
          failures++;
          $display("FAIL: v=%b disagree=%b want %b", v, disagree, dis);
        end
        if (fi == 0) begin
          checks++;
          if (vote !== maj) begin
            failures++;
            $display("FAIL: v=%b vote=%b want %b", v, vote, maj);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

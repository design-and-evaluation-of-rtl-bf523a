// tb_input_interface -- checks that each select value routes the chosen copy's AES and HMAC
// results, independently per function, over random data.
module tb_input_interface;
  import ecu_pkg::*;
  logic [2:0][AES_W-1:0] aes_in;
  logic [2:0][MAC_W-1:0] mac_in;
  src_t sel_aes, sel_mac;
  logic [AES_W-1:0] aes_out;
  logic [MAC_W-1:0] mac_out;
  int checks = 0, failures = 0;

  input_interface dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 50; it++) begin
      for (int c = 0; c < 3; c++) begin
        for (int w = 0; w < 4; w++) aes_in[c][32*w +: 32] = $urandom;
        for (int w = 0; w < 8; w++) mac_in[c][32*w +: 32] = $urandom;
      end
      for (int a = 0; a < 3; a++)
        for (int m = 0; m < 3; m++) begin
          sel_aes = src_t'(a);
          sel_mac = src_t'(m);
          #1;
          checks++;
          if (aes_out !== aes_in[a] || mac_out !== mac_in[m]) begin
            failures++;
            $display("FAIL: sel_aes=%0d sel_mac=%0d", a, m);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

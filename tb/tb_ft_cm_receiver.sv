// tb_ft_cm_receiver -- self-checking test of the receiving FT CM.
//
// Feeds the independently computed secure payloads of tb_vectors_pkg and checks that the
// receiver recovers M(i) and C = i with the integrity check passing and the counter fresh;
// that a replayed payload is flagged stale; that a payload altered in the HMAC or in the
// ciphertext fails the integrity check; and that faults in the decryption and HMAC copies are
// recovered (transient: recomputation; permanent: spare and reconfiguration). Also checks the
// fault-free latency. Reconfiguration time is shortened to 200 cycles.
module tb_ft_cm_receiver;
  import ecu_pkg::*;
  import tb_vectors_pkg::*;
  localparam int unsigned RCY = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic payload_valid = 1'b0, payload_ready;
  logic [PAYLOAD_W-1:0] payload = '0;
  logic rx_valid, rx_auth_ok, rx_fresh, rx_degraded, rx_fail;
  logic [MSG_W-1:0] rx_msg;
  logic [CTR_W-1:0] rx_ctr;
  logic [2:0] fi_aes = '0, fi_mac = '0, fi_cmp = '0;
  logic [1:0] fi_scv = '0;
  logic [NFN-1:0] out1, out2, cmp_disagree;
  logic [NRC-1:0] reconf_active;
  scfh_events_t events;

  ft_cm_receiver #(.NUM_SOFT_ERR(3), .RECONF_CYCLES(RCY)) dut (
    .clk, .rst_n, .key_aes(K_AES), .key_mac(K_MAC), .payload_valid, .payload, .payload_ready,
    .rx_valid, .rx_msg, .rx_ctr, .rx_auth_ok, .rx_fresh, .rx_degraded, .rx_fail,
    .fi_aes, .fi_mac, .fi_cmp, .fi_scv, .out1, .out2, .reconf_active, .cmp_disagree, .events);

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

  int n_recompute = 0, n_spare = 0, n_m2 = 0, n_restored = 0;
  always @(posedge clk) if (rst_n) begin
    n_recompute += events.recompute;
    n_spare     += events.spare_on;
    n_m2        += events.m2_faulty;
    n_restored  += events.restored;
  end

  task automatic receive(input logic [PAYLOAD_W-1:0] p, output int lat);
    @(negedge clk);
    while (!payload_ready) @(negedge clk);
    payload = p;
    payload_valid = 1'b1;
    @(negedge clk);
    payload_valid = 1'b0;
    lat = 0;
    while (!rx_valid && !rx_fail) begin
      @(negedge clk);
      lat++;
    end
  endtask

  task automatic expect_good(input int i, input string what);
    check(rx_valid && rx_auth_ok && rx_fresh, $sformatf("%s: accepted", what));
    check(rx_msg == msg_of(i) && rx_ctr == CTR_W'(i),
          $sformatf("%s: got M=%h C=%0d want M=%h C=%0d", what, rx_msg, rx_ctr, msg_of(i), i));
  endtask

  int lat;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 3; i++) begin
      receive(expected_payload(i), lat);
      expect_good(i, $sformatf("payload %0d", i));
      check(lat == 126, $sformatf("fault-free latency %0d, want 126", lat));
    end

    // replay of an old payload: authentic but stale
    receive(expected_payload(1), lat);
    check(rx_valid && rx_auth_ok && !rx_fresh, "replayed payload flagged stale");

    // altered HMAC, altered ciphertext
    receive(expected_payload(3) ^ (PAYLOAD_W'(1) << 300), lat);
    check(rx_valid && !rx_auth_ok, "altered HMAC rejected");
    receive(expected_payload(3) ^ (PAYLOAD_W'(1) << 5), lat);
    check(rx_valid && !rx_auth_ok, "altered ciphertext rejected");
    receive(expected_payload(3), lat);
    expect_good(3, "payload 3 after rejected copies");

    // transient fault in the first decryption copy
    fi_aes[SRC_M1] = 1'b1;
    fork
      receive(expected_payload(4), lat);
      begin
        while (!events.mismatch) @(negedge clk);
        fi_aes[SRC_M1] = 1'b0;
      end
    join
    expect_good(4, "transient decryption fault");
    check(n_recompute == 1 && n_spare == 0, "one recomputation");

    // permanent fault in the second HMAC copy
    fi_mac[SRC_M2] = 1'b1;
    receive(expected_payload(5), lat);
    expect_good(5, "permanent HMAC fault");
    check(n_spare == 1 && n_m2 == 1 && out2 == 2'b10, "M2 HMAC localised and replaced");
    receive(expected_payload(6), lat);
    expect_good(6, "while reconfiguring");
    while (reconf_active != '0) @(negedge clk);
    fi_mac[SRC_M2] = 1'b0;
    receive(expected_payload(7), lat);
    expect_good(7, "after reconfiguration");
    check(out2 == '0 && n_restored == 1, "M2 HMAC restored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

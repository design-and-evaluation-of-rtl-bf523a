// tb_ft_cm_sender -- self-checking test of the sending FT CM.
//
// Sends messages M(i) and compares every secure payload with the independently computed
// {HMAC, ciphertext} of M(i)||C (tb_vectors_pkg), where C counts successful sends. Checks the
// 101-cycle fault-free latency, and drives the fault-emulation inputs through each recovery
// path: transient fault (recomputation), permanent fault in M1 (spare, localisation,
// reconfiguration, restore), faulty comparator (outvoted), faulty voter (self-flag), both
// copies faulty (degraded, spare alone), and a second fault while the spare is in use (send
// fails, counter not advanced). Reconfiguration time is shortened to 300 cycles.
module tb_ft_cm_sender;
  import ecu_pkg::*;
  import tb_vectors_pkg::*;
  localparam int unsigned RCY = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic msg_valid = 1'b0, msg_ready;
  logic [MSG_W-1:0] msg = '0;
  logic payload_valid, payload_degraded, send_fail;
  logic [PAYLOAD_W-1:0] payload;
  logic [CTR_W-1:0] payload_ctr;
  logic [2:0] fi_aes = '0, fi_mac = '0, fi_cmp = '0;
  logic [1:0] fi_scv = '0;
  logic [NFN-1:0] out1, out2, cmp_disagree;
  logic [NRC-1:0] reconf_active;
  scfh_events_t events;

  ft_cm_sender #(.NUM_SOFT_ERR(3), .RECONF_CYCLES(RCY)) dut (
    .clk, .rst_n, .key_aes(K_AES), .key_mac(K_MAC), .msg_valid, .msg, .msg_ready,
    .payload_valid, .payload, .payload_ctr, .payload_degraded, .send_fail,
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_recompute = 0, n_spare = 0, n_m1 = 0, n_m2 = 0, n_both = 0, n_scv = 0, n_restored = 0,
      n_unrec = 0, n_disagree = 0;
  always @(posedge clk) if (rst_n) begin
    n_recompute += events.recompute;
    n_spare     += events.spare_on;
    n_m1        += events.m1_faulty;
    n_m2        += events.m2_faulty;
    n_both      += events.both_faulty;
    n_scv       += events.scv_fault;
    n_restored  += events.restored;
    n_unrec     += events.unrecoverable;
    n_disagree  += (|cmp_disagree);
  end

  int next_ctr = 0;

  // send M(next_ctr); returns latency in cycles and outcome
  task automatic send(output int lat, output bit ok, output bit deg);
    @(negedge clk);
    while (!msg_ready) @(negedge clk);
    msg = msg_of(next_ctr);
    msg_valid = 1'b1;
    @(negedge clk);
    msg_valid = 1'b0;
    lat = 0;   // clock edges after the one that accepted the message
    while (!payload_valid && !send_fail) begin
      @(negedge clk);
      lat++;
    end
    ok = payload_valid;
    deg = payload_degraded;
    if (ok) begin
      check(payload == expected_payload(next_ctr),
            $sformatf("payload %0d: got %h want %h", next_ctr, payload, expected_payload(next_ctr)));
      check(payload_ctr == CTR_W'(next_ctr), "payload counter");
      next_ctr++;
    end
  endtask

  // clear the emulated fault of a copy once its reconfiguration has finished
  task automatic wait_reconf_idle();
    while (reconf_active != '0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  int lat;
  bit ok, deg;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // fault-free messages and latency
    for (int i = 0; i < 3; i++) begin
      send(lat, ok, deg);
      check(ok && !deg, "fault-free send");
      check(lat == 101, $sformatf("fault-free latency %0d, want 101", lat));
    end

    // transient fault in M2's AES during the first computation only
    fi_aes[SRC_M2] = 1'b1;
    fork
      send(lat, ok, deg);
      begin
        while (!events.mismatch) @(negedge clk);
        fi_aes[SRC_M2] = 1'b0;
      end
    join
    check(ok && n_recompute == 1 && n_spare == 0, "transient fault cured by one recomputation");
    check(lat == 101 + 99, $sformatf("one recomputation costs 99 cycles (latency %0d)", lat));

    // permanent fault in M1's HMAC
    fi_mac[SRC_M1] = 1'b1;
    send(lat, ok, deg);
    check(ok && !deg && n_spare == 1 && n_m1 == 1, "permanent M1 fault localised");
    check(out1 == 2'b10, "M1 HMAC out of service");
    check(reconf_active == (NRC'(1) << RC_MAC1), "M1 HMAC being reconfigured");
    send(lat, ok, deg);
    check(ok && lat == 101, "send on spare + M2 while reconfiguring");
    wait_reconf_idle();
    fi_mac[SRC_M1] = 1'b0;
    send(lat, ok, deg);
    check(ok && out1 == '0 && n_restored == 1, "M1 HMAC back in service");

    // comparator 2 faulty: outvoted, no recomputation
    fi_cmp[2] = 1'b1;
    send(lat, ok, deg);
    check(ok && lat == 101 && n_recompute == 1 + 2, "faulty comparator outvoted");
    check(n_disagree > 0, "comparator disagreement seen");
    fi_cmp[2] = 1'b0;

    // voter internal fault: flagged, handler compares itself
    fi_scv = 2'b10;
    send(lat, ok, deg);
    check(ok && lat == 101 && n_scv >= 1, "voter fault flagged, send unaffected");
    fi_scv = 2'b00;

    // both AES copies faulty: spare alone, degraded
    fi_aes[SRC_M1] = 1'b1;
    fi_aes[SRC_M2] = 1'b1;
    send(lat, ok, deg);
    check(ok && deg && n_both == 1 && out1 == 2'b01 && out2 == 2'b01, "both AES copies localised");
    wait_reconf_idle();
    fi_aes[SRC_M1] = 1'b0;
    fi_aes[SRC_M2] = 1'b0;
    send(lat, ok, deg);
    check(ok && !deg && out1 == '0 && out2 == '0, "AES pair restored");

    // second fault while the spare stands in: the send fails, counter unchanged
    fi_aes[SRC_M1] = 1'b1;
    send(lat, ok, deg);
    check(ok && out1 == 2'b01, "M1 AES localised");
    fi_aes[SRC_M2] = 1'b1;
    send(lat, ok, deg);
    check(!ok && n_unrec == 1, "unrecoverable fault reported");
    fi_aes[SRC_M2] = 1'b0;
    wait_reconf_idle();
    fi_aes[SRC_M1] = 1'b0;
    send(lat, ok, deg);
    check(ok && !deg, "recovered after reconfiguration; counter continues");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

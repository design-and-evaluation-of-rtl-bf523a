// tb_table2_timing -- node computation times of the sender / receiver pair at its default
// parameters, measured against the published FPGA timing budgets (Table 2 figures at a
// 50 MHz clock: sender 4.90 us fault-free and 6.53 us fault-tolerant, receiver 9.00 us and
// 10.63 us, i.e. 245, 326, 450 and 531 cycles).
//
// Cases: (1) no fault; (2) one soft error in the sender's HMAC copy M1, held for the first
// computation only, so one recomputation cures it; (3) one soft error in the receiver's
// decryption copy M1 and then one in its HMAC copy M2, one recomputation each; (4) a permanent
// fault in the sender's AES copy M1: NUM_SOFT_ERR computations, then the spare localises it
// (the worst case of a single fault in the AES); (5) a permanent fault in the sender's HMAC
// copy M2, the slower function, whose spare run sets the longest single-fault time. Each latency is counted in clock edges from the edge
// that accepts the input to the output pulse. Every payload must equal the independently
// computed reference and be accepted by the receiver. The exact cycle counts follow this
// implementation's schedule (10-cycle AES encryption, 20-cycle decryption, 96-cycle HMAC);
// the budgets come from the published measurements.
module tb_table2_timing;
  import ecu_pkg::*;
  import tb_vectors_pkg::*;

  localparam int BUDGET_TX_NFT = 245, BUDGET_TX_FT = 326;
  localparam int BUDGET_RX_NFT = 450, BUDGET_RX_FT = 531;
  localparam int DP_MAX_CYCLES = 400_000;   // 8 ms pure-delay limit at 50 MHz

  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_msg_valid = 1'b0, tx_msg_ready, tx_payload_valid, tx_degraded, tx_fail;
  logic [MSG_W-1:0] tx_msg = '0;
  logic [PAYLOAD_W-1:0] tx_payload;
  logic [CTR_W-1:0] tx_payload_ctr;
  logic [2:0] tx_fi_aes = '0, tx_fi_mac = '0, rx_fi_aes = '0, rx_fi_mac = '0;
  logic tx_fi_mac_perm = 1'b0;
  logic [NFN-1:0] tx_out1, tx_out2, tx_cmp_disagree;
  logic [NRC-1:0] tx_reconf_active;
  scfh_events_t tx_events;
  logic rx_payload_valid = 1'b0, rx_payload_ready;
  logic [PAYLOAD_W-1:0] rx_payload = '0;
  logic rx_valid, rx_auth_ok, rx_fresh, rx_degraded, rx_fail;
  logic [MSG_W-1:0] rx_msg;
  logic [CTR_W-1:0] rx_ctr;
  logic [NFN-1:0] rx_out1, rx_out2, rx_cmp_disagree;
  logic [NRC-1:0] rx_reconf_active;
  scfh_events_t rx_events;

  ecu_ft_top dut (
    .clk, .rst_n, .tx_key_aes(K_AES), .tx_key_mac(K_MAC), .tx_msg_valid, .tx_msg, .tx_msg_ready,
    .tx_payload_valid, .tx_payload, .tx_payload_ctr, .tx_degraded, .tx_fail,
    .tx_fi_aes, .tx_fi_mac, .tx_fi_cmp(3'b0), .tx_fi_scv(2'b0), .tx_out1, .tx_out2,
    .tx_reconf_active, .tx_cmp_disagree, .tx_events,
    .rx_key_aes(K_AES), .rx_key_mac(K_MAC), .rx_payload_valid, .rx_payload, .rx_payload_ready,
    .rx_valid, .rx_msg, .rx_ctr, .rx_auth_ok, .rx_fresh, .rx_degraded, .rx_fail,
    .rx_fi_aes, .rx_fi_mac, .rx_fi_cmp(3'b0), .rx_fi_scv(2'b0), .rx_out1, .rx_out2,
    .rx_reconf_active, .rx_cmp_disagree, .rx_events);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock edges since reset release
  int cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // soft errors: a fault input set before a computation is cleared at the first recompute
  always @(posedge clk) if (rst_n) begin
    if (tx_fi_mac_perm)          tx_fi_mac <= 3'b010;
    else if (tx_events.recompute) tx_fi_mac <= '0;
    if (rx_events.recompute) begin
      if (rx_fi_aes != '0) rx_fi_aes <= '0;
      else                 rx_fi_mac <= '0;
    end
  end


  int next_ctr = 0;
  task automatic transfer(output int tx_lat, output int rx_lat);
    logic [PAYLOAD_W-1:0] p;
    int t0;
    @(negedge clk);
    while (!tx_msg_ready) @(negedge clk);
    tx_msg = msg_of(next_ctr);
    tx_msg_valid = 1'b1;
    @(negedge clk);
    t0 = cyc;
    tx_msg_valid = 1'b0;
    while (!tx_payload_valid && !tx_fail) @(negedge clk);
    tx_lat = cyc - t0;
    check(tx_payload_valid && tx_payload == expected_payload(next_ctr),
          $sformatf("payload of message %0d", next_ctr));
    p = tx_payload;
    @(negedge clk);
    while (!rx_payload_ready) @(negedge clk);
    rx_payload = p;
    rx_payload_valid = 1'b1;
    @(negedge clk);
    t0 = cyc;
    rx_payload_valid = 1'b0;
    while (!rx_valid && !rx_fail) @(negedge clk);
    rx_lat = cyc - t0;
    check(rx_valid && rx_auth_ok && rx_fresh && rx_msg == msg_of(next_ctr) &&
          rx_ctr == CTR_W'(next_ctr), $sformatf("message %0d received", next_ctr));
    next_ctr++;
  endtask

  int tl, rl;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. no fault
    transfer(tl, rl);
    $display("no fault: sender %0d cycles (budget %0d), receiver %0d cycles (budget %0d)",
             tl, BUDGET_TX_NFT, rl, BUDGET_RX_NFT);
    check(tl == 101 && tl <= BUDGET_TX_NFT, "fault-free sender time");
    check(rl == 126 && rl <= BUDGET_RX_NFT, "fault-free receiver time");

    // 2. one soft error in the sender
    tx_fi_mac = 3'b001;
    transfer(tl, rl);
    $display("sender soft error: sender %0d cycles (budget %0d)", tl, BUDGET_TX_FT);
    check(tl == 101 + 99 && tl <= BUDGET_TX_FT, "sender time with one recomputation");
    check(tx_out1 == '0 && tx_out2 == '0, "soft error leaves every copy in service");

    // 3. one soft error in each receiver stage
    rx_fi_aes = 3'b001;
    rx_fi_mac = 3'b010;
    transfer(tl, rl);
    $display("receiver soft errors: receiver %0d cycles (budget %0d)", rl, BUDGET_RX_FT);
    check(rl == 248 && rl <= BUDGET_RX_FT, "receiver time with two recomputations");
    check(rx_fi_aes == '0 && rx_fi_mac == '0, "both receiver soft errors were seen");

    // 4. permanent fault in the sender's AES copy M1: worst case of a single fault
    tx_fi_aes = 3'b001;
    transfer(tl, rl);
    $display("sender permanent fault: sender %0d cycles (%0d recomputations + spare)",
             tl, 3 - 1);
    check(tl == 312 && tl <= DP_MAX_CYCLES, "sender worst case within the pure-delay limit");
    check(tx_out1 == 2'b01 && tx_reconf_active != '0, "faulty copy replaced and being reconfigured");

    // 5. permanent fault in the sender's HMAC copy M2 as well: the slower function's spare
    tx_fi_aes = '0;
    tx_fi_mac_perm = 1'b1;
    transfer(tl, rl);
    $display("sender permanent HMAC fault: sender %0d cycles", tl);
    check(tl == 398 && tl <= DP_MAX_CYCLES, "sender HMAC worst case within the pure-delay limit");
    check(tx_out2 == 2'b10, "faulty HMAC copy M2 replaced by the spare");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

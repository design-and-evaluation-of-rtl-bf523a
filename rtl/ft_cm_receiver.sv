// ft_cm_receiver -- fault-tolerant cryptographic module of the receiving ECU.
//
// A 384-bit secure payload accepted on `payload_valid` while `payload_ready` is high is split
// into the received HMAC (upper 256 bits) and the ciphertext (lower 128 bits). The ciphertext
// is decrypted by the AES-128 decryption DMR pair under `key_aes`; once the fault handler has
// a checked plaintext M||C, the SHA-3 HMAC DMR pair recomputes the HMAC of M||C under
// `key_mac`, and the integrity comparator checks it against the received HMAC. Both stages use
// the same fault-tolerance machinery as the sender: spares, three comparators in TMR, the
// Berger-checked voter and the fault handler (scfh) with reconfiguration requests.
//
// Result, one `rx_valid` pulse per payload: `rx_msg` = M, `rx_ctr` = C, `rx_auth_ok` = the
// HMACs match (integrity and origin confirmed), `rx_fresh` = C is larger than the counter of
// the last accepted message (replay check), `rx_degraded` = some result came from a spare
// alone. A message counts as accepted when both `rx_auth_ok` and `rx_fresh` are set; only an
// accepted message advances the stored counter. `rx_fail` pulses instead when a fault could
// not be recovered. With no fault `rx_valid` rises 126 clock edges after the edge that accepted
// the payload (20 for decryption, 96 for the HMAC, the rest control).
//
// The document runs the decryption check and the HMAC in parallel; here the HMAC starts after
// the decryption has been checked (a few cycles later), so the HMAC copies always work on a
// verified plaintext. The freshness rule (strictly increasing counter) is this design's reading
// of the document's statement that the counter defeats replay. fi_* ports are fault-emulation
// test hooks, as in ft_cm_sender.
module ft_cm_receiver
  import ecu_pkg::*;
#(
  parameter int unsigned NUM_SOFT_ERR  = 3,
  parameter int unsigned RECONF_CYCLES = 1_000_000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AES_W-1:0]     key_aes,
  input  logic [AES_W-1:0]     key_mac,
  input  logic                 payload_valid,
  input  logic [PAYLOAD_W-1:0] payload,
  output logic                 payload_ready,
  output logic                 rx_valid,
  output logic [MSG_W-1:0]     rx_msg,
  output logic [CTR_W-1:0]     rx_ctr,
  output logic                 rx_auth_ok,
  output logic                 rx_fresh,
  output logic                 rx_degraded,
  output logic                 rx_fail,
  input  logic [2:0]           fi_aes,
  input  logic [2:0]           fi_mac,
  input  logic [2:0]           fi_cmp,
  input  logic [1:0]           fi_scv,
  output logic [NFN-1:0]       out1,
  output logic [NFN-1:0]       out2,
  output logic [NRC-1:0]       reconf_active,
  output logic [NFN-1:0]       cmp_disagree,
  output scfh_events_t         events
);

  typedef enum logic [1:0] {R_IDLE, R_DEC, R_MAC} rstate_e;
  rstate_e                rst;
  logic [AES_W-1:0]       ct;             // received ciphertext
  logic [MAC_W-1:0]       mac_rx;         // received HMAC
  logic [AES_W-1:0]       pt;             // checked plaintext M || C
  logic [CTR_W-1:0]       last_ctr;       // counter of the last accepted message
  logic                   have_last;
  logic                   job_start, job_busy, job_done, job_ok, job_degraded;
  logic [NFN-1:0]         job_mask;
  logic                   degraded;
  logic [AES_W-1:0]       out_aes;
  logic [MAC_W-1:0]       out_mac;
  logic [2:0][NFN-1:0]    start_mod, done_mod;
  logic [2:0][AES_W-1:0]  res_aes;
  logic [2:0][MAC_W-1:0]  res_mac;
  src_t [NFN-1:0]         sel_a, sel_b;
  logic [AES_W-1:0]       a_aes, b_aes;
  logic [MAC_W-1:0]       a_mac, b_mac;
  logic [2:0][NFN-1:0]    cmp_eq;
  logic [NFN-1:0]         vote;
  logic                   scv_fault;
  logic [NRC-1:0]         reconf_req, reconf_done;

  // ---- payload formatting, sequencing, integrity and freshness checks ---------------------
  assign payload_ready = (rst == R_IDLE) && !job_busy && !job_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst         <= R_IDLE;
      ct          <= '0;
      mac_rx      <= '0;
      pt          <= '0;
      last_ctr    <= '0;
      have_last   <= 1'b0;
      job_start   <= 1'b0;
      job_mask    <= '0;
      degraded    <= 1'b0;
      rx_valid    <= 1'b0;
      rx_msg      <= '0;
      rx_ctr      <= '0;
      rx_auth_ok  <= 1'b0;
      rx_fresh    <= 1'b0;
      rx_degraded <= 1'b0;
      rx_fail     <= 1'b0;
    end else begin
      job_start <= 1'b0;
      rx_valid  <= 1'b0;
      rx_fail   <= 1'b0;
      unique case (rst)
        R_IDLE: if (payload_valid && payload_ready) begin
          {mac_rx, ct} <= payload;                 // {HMAC (256), ciphertext (128)}
          job_mask     <= NFN'(1) << FN_AES;
          job_start    <= 1'b1;
          rst          <= R_DEC;
        end
        R_DEC: if (job_done) begin
          if (job_ok) begin
            pt        <= out_aes;
            degraded  <= job_degraded;
            job_mask  <= NFN'(1) << FN_MAC;
            job_start <= 1'b1;
            rst       <= R_MAC;
          end else begin
            rx_fail <= 1'b1;
            rst     <= R_IDLE;
          end
        end
        R_MAC: if (job_done) begin
          rst <= R_IDLE;
          if (job_ok) begin
            logic auth, fresh;
            auth  = (out_mac == mac_rx);
            fresh = !have_last || (pt[CTR_W-1:0] > last_ctr);
            rx_msg      <= pt[AES_W-1 -: MSG_W];
            rx_ctr      <= pt[CTR_W-1:0];
            rx_auth_ok  <= auth;
            rx_fresh    <= fresh;
            rx_degraded <= degraded | job_degraded;
            rx_valid    <= 1'b1;
            if (auth && fresh) begin
              last_ctr  <= pt[CTR_W-1:0];
              have_last <= 1'b1;
            end
          end else begin
            rx_fail <= 1'b1;
          end
        end
        default: rst <= R_IDLE;
      endcase
    end
  end

  // ---- the three copies of each function (M1, M2, spare MS) ------------------------------
  for (genvar c = 0; c < 3; c++) begin : g_copy
    aes128_dec #(.FI_BIT(c)) u_aes (
      .clk, .rst_n, .start(start_mod[c][FN_AES]), .key(key_aes), .din(ct),
      .fault_inj(fi_aes[c]), .busy(), .done(done_mod[c][FN_AES]), .dout(res_aes[c]));
    hmac_sha3_256 #(.FI_BIT(c)) u_mac (
      .clk, .rst_n, .start(start_mod[c][FN_MAC]), .key(key_mac), .msg(pt),
      .fault_inj(fi_mac[c]), .busy(), .done(done_mod[c][FN_MAC]), .digest(res_mac[c]));
  end

  // ---- input interfaces, comparators in TMR, self-checking voter --------------------------
  input_interface u_if_a (.aes_in(res_aes), .mac_in(res_mac),
                          .sel_aes(sel_a[FN_AES]), .sel_mac(sel_a[FN_MAC]),
                          .aes_out(a_aes), .mac_out(a_mac));
  input_interface u_if_b (.aes_in(res_aes), .mac_in(res_mac),
                          .sel_aes(sel_b[FN_AES]), .sel_mac(sel_b[FN_MAC]),
                          .aes_out(b_aes), .mac_out(b_mac));

  for (genvar k = 0; k < 3; k++) begin : g_cmp
    dmr_comparator u_cmp (.a_aes, .b_aes, .a_mac, .b_mac, .fault_inj(fi_cmp[k]), .eq(cmp_eq[k]));
  end

  berger_scv u_scv (.c0(cmp_eq[0]), .c1(cmp_eq[1]), .c2(cmp_eq[2]), .fault_inj(fi_scv),
                    .vote, .disagree(cmp_disagree), .scv_fault);

  // ---- fault handler and reconfiguration sub-system ---------------------------------------
  scfh #(.NUM_SOFT_ERR(NUM_SOFT_ERR)) u_scfh (
    .clk, .rst_n, .job_start, .job_mask, .job_busy, .job_done, .job_ok, .job_fail(),
    .job_degraded, .out_aes, .out_mac, .start_mod, .done_mod, .res_aes, .res_mac, .sel_a, .sel_b,
    .vote, .scv_fault, .reconf_req, .reconf_done, .out1, .out2, .events);

  reconfig_ctrl #(.RECONF_CYCLES(RECONF_CYCLES)) u_reconf (
    .clk, .rst_n, .req(reconf_req), .done(reconf_done), .active(reconf_active),
    .pending(), .busy());

endmodule

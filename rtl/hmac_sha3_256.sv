// hmac_sha3_256 -- HMAC over SHA3-256 of one 128-bit message (M||C) under a 128-bit key.
//
// HMAC(K, m) = H((K0 ^ opad) || H((K0 ^ ipad) || m)), H = SHA3-256 (rate 136 bytes), K0 the
// key zero-padded to the 136-byte block. For a 16-byte message this is exactly four
// Keccak-f[1600] permutations: (K0^ipad), (m || pad), then, on a fresh state, (K0^opad) and
// (inner digest || pad). One Keccak round is applied per clock and the next block is XORed in
// on the cycle of the 24th round, so `done` pulses 96 cycles after `start`; `digest` holds the
// result (byte 0 of the SHA-3 output in bits [255:248]) until the next start.
//
// The document specifies a SHA-3 based HMAC with a 256-bit digest, by function only. SHA3-256,
// the 128-bit key length and the round-per-cycle structure are this design's choices.
// `fault_inj` inverts digest bit FI_BIT while high (fault-emulation hook, not part of HMAC).
module hmac_sha3_256
  import keccak_pkg::*;
#(
  parameter int unsigned FI_BIT = 0   // output bit inverted by fault_inj
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] msg,
  input  logic         fault_inj,
  output logic         busy,
  output logic         done,
  output logic [255:0] digest
);

  localparam logic [63:0] PAD_FIRST = 64'h06;                   // SHA-3 domain bits + pad10*1 start
  localparam logic [63:0] PAD_LAST  = 64'h8000_0000_0000_0000;  // final pad bit, byte 135

  function automatic logic [63:0] bswap(input logic [63:0] v);
    logic [63:0] r;
    for (int i = 0; i < 8; i++) r[8*i +: 8] = v[63-8*i -: 8];
    return r;
  endfunction

  // (K0 ^ pad) as one rate block: key bytes in lanes 0,1, pad byte everywhere in the rate
  function automatic kstate_t key_block(input logic [127:0] k, input logic [7:0] p);
    kstate_t b = '0;
    for (int l = 0; l < 17; l++) b[l] = {8{p}};
    b[0] = b[0] ^ bswap(k[127:64]);
    b[1] = b[1] ^ bswap(k[63:0]);
    return b;
  endfunction

  kstate_t      st, rnd_out, blk_msg;
  logic [255:0] inner;      // lanes 0..3 of the inner hash state = inner digest
  logic [1:0]   phase;
  logic [4:0]   rnd;
  logic [255:0] result;
  logic [127:0] key_q, msg_q;   // operands sampled on start

  always_comb begin
    rnd_out = keccak_round(st, RC[rnd]);
    blk_msg = '0;
    blk_msg[0]  = bswap(msg_q[127:64]);
    blk_msg[1]  = bswap(msg_q[63:0]);
    blk_msg[2]  = PAD_FIRST;
    blk_msg[16] = PAD_LAST;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= '0;
      inner  <= '0;
      phase  <= '0;
      rnd    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      result <= '0;
      key_q  <= '0;
      msg_q  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        st    <= key_block(key, 8'h36);
        key_q <= key;
        msg_q <= msg;
        phase <= 2'd0;
        rnd   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (rnd == 5'(ROUNDS - 1)) begin
          rnd   <= '0;
          phase <= phase + 2'd1;
          unique case (phase)
            2'd0: st <= rnd_out ^ blk_msg;
            2'd1: begin
              inner <= rnd_out[3:0];
              st    <= key_block(key_q, 8'h5c);
            end
            2'd2: st <= rnd_out ^ blk_inner_from(inner);
            default: begin
              st     <= rnd_out;
              result <= {bswap(rnd_out[0]), bswap(rnd_out[1]), bswap(rnd_out[2]), bswap(rnd_out[3])};
              busy   <= 1'b0;
              done   <= 1'b1;
            end
          endcase
        end else begin
          st  <= rnd_out;
          rnd <= rnd + 5'd1;
        end
      end
    end
  end

  function automatic kstate_t blk_inner_from(input logic [255:0] d);
    kstate_t b = '0;
    b[3:0] = d;
    b[4]   = PAD_FIRST;
    b[16]  = PAD_LAST;
    return b;
  endfunction

  assign digest = result ^ (256'(fault_inj) << FI_BIT);

endmodule

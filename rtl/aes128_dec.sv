// aes128_dec -- iterative AES-128 decryption core (FIPS-197 inverse cipher).
//
// A `start` pulse loads the ciphertext `din` and key `key`. The core first runs the key
// schedule forward for 10 cycles to reach the last round key, then applies the 10 inverse
// rounds, one per cycle, stepping the key schedule backwards on the fly (so no round-key
// memory is needed). `done` pulses 20 cycles after `start`; `dout` holds the plaintext until
// the next start.
//
// `fault_inj` inverts bit FI_BIT of the delivered plaintext while high: a fault-emulation hook of
// this implementation for exercising the redundancy, not part of AES. The document gives
// AES-128 decryption by function only; the structure here is this design's choice.
module aes128_dec
  import aes_pkg::*;
#(
  parameter int unsigned FI_BIT = 0   // output bit inverted by fault_inj
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] din,
  input  logic         fault_inj,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout
);

  typedef enum logic [1:0] {D_IDLE, D_EXPAND, D_ROUND} dstate_e;
  dstate_e      st;
  logic [127:0] state, rkey, ct;
  logic [3:0]   cnt;
  byte_t        rc_q;

  function automatic byte_t xtime_inv(input byte_t b);
    return b[0] ? (((b ^ 8'h1b) >> 1) | 8'h80) : (b >> 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= D_IDLE;
      state <= '0;
      rkey  <= '0;
      ct    <= '0;
      cnt   <= '0;
      rc_q  <= 8'h01;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        st   <= D_EXPAND;
        rkey <= key;
        ct   <= din;
        cnt  <= 4'd0;
        rc_q <= 8'h01;
      end else begin
        unique case (st)
          D_IDLE: ;
          D_EXPAND: begin
            logic [127:0] k;
            k = key_next(rkey, rc_q);
            rkey <= k;
            if (cnt == 4'd9) begin
              state <= ct ^ k;        // initial AddRoundKey with round key 10
              rc_q  <= rc_q;          // rcon of round 10, used to step back to key 9
              cnt   <= 4'd0;
              st    <= D_ROUND;
            end else begin
              rc_q <= xtime(rc_q);
              cnt  <= cnt + 4'd1;
            end
          end
          D_ROUND: begin
            logic [127:0] k, t;
            k = key_prev(rkey, rc_q);
            rkey <= k;
            rc_q <= xtime_inv(rc_q);
            t = inv_sub_bytes(inv_shift_rows(state)) ^ k;
            if (cnt == 4'd9) begin
              state <= t;
              st    <= D_IDLE;
              done  <= 1'b1;
            end else begin
              state <= inv_mix_columns(t);
              cnt   <= cnt + 4'd1;
            end
          end
          default: st <= D_IDLE;
        endcase
      end
    end
  end

  assign busy = (st != D_IDLE);
  assign dout = state ^ (128'(fault_inj) << FI_BIT);

endmodule

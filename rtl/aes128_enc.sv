// aes128_enc -- iterative AES-128 encryption core (FIPS-197), one round per clock.
//
// A `start` pulse loads the plaintext `din` and key `key`; the initial AddRoundKey is done on
// the load. Each following cycle applies one round with a round key expanded on the fly, so
// `done` pulses 10 cycles after `start` and `dout` holds the ciphertext until the next start.
// `busy` is high while rounds are in progress.
//
// `fault_inj` emulates a fault in this copy: while it is high the delivered ciphertext has
// bit FI_BIT inverted. It exists so the redundancy around the core can be exercised; it is a
// test hook of this implementation, not part of the AES function. The document specifies
// AES-128 only by function; the round-per-cycle structure is this design's choice.
module aes128_enc
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

  logic [127:0] state, rkey;
  logic [3:0]   round;   // number of the round applied next (1..10)

  byte_t        rc_q;      // round constant of the next key expansion

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      rkey  <= '0;
      round <= '0;
      rc_q  <= 8'h01;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state <= din ^ key;
        rkey  <= key;
        round <= 4'd1;
        rc_q  <= 8'h01;
        busy  <= 1'b1;
      end else if (busy) begin
        logic [127:0] k;
        k = key_next(rkey, rc_q);
        rkey <= k;
        rc_q <= xtime(rc_q);
        if (round == 4'd10) begin
          state <= shift_rows(sub_bytes(state)) ^ k;
          busy  <= 1'b0;
          done  <= 1'b1;
        end else begin
          state <= mix_columns(shift_rows(sub_bytes(state))) ^ k;
        end
        round <= round + 4'd1;
      end
    end
  end

  assign dout = state ^ (128'(fault_inj) << FI_BIT);

endmodule

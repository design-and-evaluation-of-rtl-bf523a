// berger_scv -- self-checking 2-of-3 voter over the three comparator outputs, checked with a
// Berger code.
//
// Per function the three comparator bits form the information word I = {c0, c1, c2}. The
// Berger check symbol of a 3-bit word is its number of zeros, two bits z[1:0]. The functional
// part predicts z with two-level logic: z[1] = "at least two zeros" and z[0] = parity of the
// zeros. The majority vote is exactly ~z[1], so the voter output is itself part of the
// codeword and is covered by the check. The checker recounts the zeros of I with an adder and
// compares the count with the predicted symbol; any difference means a fault inside the voter,
// and `scv_fault` goes high so the fault handler no longer trusts the vote. `disagree` flags
// that the three comparators were not unanimous (one comparator is faulty and was outvoted).
// Combinational.
//
// The document gives the voter's role (majority voter, totally self-checking, Berger code,
// can flag itself to the fault handler); this encoder/checker arrangement is this design's own.
// `fault_inj` flips the predicted check bits (bit 1 flips z[1], bit 0 flips z[0]) to emulate
// an internal fault; it is a test hook.
module berger_scv
  import ecu_pkg::*;
(
  input  logic [NFN-1:0] c0,
  input  logic [NFN-1:0] c1,
  input  logic [NFN-1:0] c2,
  input  logic [1:0]     fault_inj,
  output logic [NFN-1:0] vote,
  output logic [NFN-1:0] disagree,
  output logic           scv_fault
);

  logic [NFN-1:0][1:0] z_pred, z_chk;
  logic [NFN-1:0]      bad;

  always_comb begin
    for (int f = 0; f < NFN; f++) begin
      // functional part: predicted Berger symbol and vote
      z_pred[f][1] = (~c0[f] & ~c1[f]) | (~c0[f] & ~c2[f]) | (~c1[f] & ~c2[f]);
      z_pred[f][0] = ~c0[f] ^ ~c1[f] ^ ~c2[f];
      z_pred[f]    = z_pred[f] ^ fault_inj;
      vote[f]      = ~z_pred[f][1];
      // checker: independent zero count of the information bits
      z_chk[f]     = 2'(!c0[f]) + 2'(!c1[f]) + 2'(!c2[f]);
      bad[f]       = (z_chk[f] != z_pred[f]);
      disagree[f]  = !((c0[f] == c1[f]) && (c1[f] == c2[f]));
    end
    scv_fault = |bad;
  end

endmodule

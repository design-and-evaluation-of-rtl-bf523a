// dmr_comparator -- equality comparator between the two sides of the DMR pair.
//
// Three copies of this block work in triple modular redundancy: each compares the AES result
// and the HMAC result arriving from input interface A with those from interface B and reports
// one "equal" bit per function (bit FN_AES, bit FN_MAC). The self-checking voter then takes
// the majority of the three copies, so a single faulty comparator is outvoted.
// Combinational. `fault_inj` inverts both outputs while high; it emulates a comparator fault
// for testing and is a hook of this implementation, not something the document describes.
module dmr_comparator
  import ecu_pkg::*;
(
  input  logic [AES_W-1:0] a_aes,
  input  logic [AES_W-1:0] b_aes,
  input  logic [MAC_W-1:0] a_mac,
  input  logic [MAC_W-1:0] b_mac,
  input  logic             fault_inj,
  output logic [NFN-1:0]   eq
);

  always_comb begin
    eq[FN_AES] = (a_aes == b_aes) ^ fault_inj;
    eq[FN_MAC] = (a_mac == b_mac) ^ fault_inj;
  end

endmodule

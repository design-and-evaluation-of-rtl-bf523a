// input_interface -- routes the results of the AES and HMAC copies to one side of the
// comparators.
//
// The FT CM has two of these, one per comparator side (A and B). Each receives the outputs
// of all three copies of each function (DMR pair M1, M2 and spare MS) and forwards, per
// function, the copy chosen by the fault handler's select (`sel_aes`, `sel_mac`). With no
// faults side A carries M1 and side B carries M2; after a copy is found faulty its side is
// switched to the spare. Purely combinational.
//
// The document names the two input interfaces and says they route module outputs to the
// comparators; that each can reach every copy (the figure draws the spares on one side only)
// is this design's choice, needed so the spare can stand in for either DMR copy.
module input_interface
  import ecu_pkg::*;
(
  input  logic [2:0][AES_W-1:0] aes_in,   // indexed by src_t: M1, M2, MS
  input  logic [2:0][MAC_W-1:0] mac_in,
  input  src_t                  sel_aes,
  input  src_t                  sel_mac,
  output logic [AES_W-1:0]      aes_out,
  output logic [MAC_W-1:0]      mac_out
);

  always_comb begin
    unique case (sel_aes)
      SRC_M2:  aes_out = aes_in[SRC_M2];
      SRC_MS:  aes_out = aes_in[SRC_MS];
      default: aes_out = aes_in[SRC_M1];
    endcase
    unique case (sel_mac)
      SRC_M2:  mac_out = mac_in[SRC_M2];
      SRC_MS:  mac_out = mac_in[SRC_MS];
      default: mac_out = mac_in[SRC_M1];
    endcase
  end

endmodule

// reconfig_ctrl -- sequencer of the reconfigurable sub-system: partial reconfiguration of the
// DMR copies that the fault handler found faulty.
//
// `req` carries one-hot-per-copy request pulses (positions RC_AES1, RC_AES2, RC_MAC1,
// RC_MAC2 of ecu_pkg); several may arrive together or while another copy is being rewritten.
// Requests are kept as pending bits and served one at a time, lowest position first. Serving
// one holds `busy` and names the copy in `active` for RECONF_CYCLES clocks, the time the
// configuration engine needs to write the partial bitstream through the configuration port,
// then pulses that copy's bit of `done`.
//
// The document has a MicroBlaze configuration engine drive the vendor's HWICAP/ICAP to write
// the FPGA configuration memory; those are vendor parts and are not modelled. This block keeps
// only their observable behaviour: request, a fixed rewrite time, completion. The default
// RECONF_CYCLES = 1,000,000 is 20 ms at the 50 MHz clock of the document's PLF, taken from its
// statement that reconfiguration takes tens of milliseconds.
module reconfig_ctrl
  import ecu_pkg::*;
#(
  parameter int unsigned RECONF_CYCLES = 1_000_000
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NRC-1:0] req,
  output logic [NRC-1:0] done,
  output logic [NRC-1:0] active,
  output logic [NRC-1:0] pending,
  output logic           busy
);

  localparam int CW = $clog2(RECONF_CYCLES + 1);
  logic [CW-1:0] cnt;

  function automatic logic [NRC-1:0] lowest(input logic [NRC-1:0] v);
    logic [NRC-1:0] r = '0;
    for (int i = NRC - 1; i >= 0; i--)
      if (v[i]) r = NRC'(1) << i;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      active  <= '0;
      done    <= '0;
      cnt     <= '0;
    end else begin
      logic [NRC-1:0] pend_n;
      pend_n = pending | req;
      done   <= '0;
      if (active == '0) begin
        if (pend_n != '0) begin
          active <= lowest(pend_n);
          cnt    <= CW'(RECONF_CYCLES - 1);
        end
      end else if (cnt == '0) begin
        // finished: report it and go straight on with the next pending copy, if any
        done   <= active;
        pend_n = pend_n & ~active;
        active <= lowest(pend_n);
        cnt    <= CW'(RECONF_CYCLES - 1);
      end else begin
        cnt <= cnt - CW'(1);
      end
      pending <= pend_n;
    end
  end

  assign busy = (active != '0);

  // a copy is rewritten only after it was requested
  a_req_first: assert property (@(posedge clk) disable iff (!rst_n) (active & ~pending) == '0)
    else $error("reconfig_ctrl: active copy %b not pending %b", active, pending);

endmodule

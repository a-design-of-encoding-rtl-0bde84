// Parallel-to-serial converter of a sender.
//
// load captures a FLIT_W-bit flit; bit_out is then its bit 0 and each shift
// pulse moves on to the next bit, so the flit leaves right to left (LSB
// first). The scheduler pulses shift on the last chip of every bit, so each
// bit is held for one whole code period. load has priority over shift.
// The right-to-left bit order follows the design; the load/shift interface is
// this implementation's choice.
module p2s #(
  parameter int unsigned FLIT_W = cdma_noc_pkg::DEF_FLIT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [FLIT_W-1:0] flit,
  input  logic              shift,
  output logic              bit_out
);
  logic [FLIT_W-1:0] sreg;

  always_ff @(posedge clk) begin
    if (!rst_n)     sreg <= '0;
    else if (load)  sreg <= flit;
    else if (shift) sreg <= sreg >> 1;
  end

  assign bit_out = sreg[0];
endmodule

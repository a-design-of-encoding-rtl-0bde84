// Serial-to-parallel converter of a receiver.
//
// Each decoded bit arriving with bit_valid is shifted in from the top, so
// after FLIT_W bits the first bit received sits in flit[0]: the inverse of
// the LSB-first parallel-to-serial converter. flit is the register content;
// the surrounding logic decides when it is complete.
// The bit order mirrors the sender's and is this implementation's choice.
module s2p #(
  parameter int unsigned FLIT_W = cdma_noc_pkg::DEF_FLIT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_in,
  input  logic              bit_valid,
  output logic [FLIT_W-1:0] flit
);
  always_ff @(posedge clk) begin
    if (!rst_n)         flit <= '0;
    else if (bit_valid) flit <= {bit_in, flit[FLIT_W-1:1]};
  end
endmodule

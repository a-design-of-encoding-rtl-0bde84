// Standard-basis CDMA encoder for one sender.
//
// One data bit is spread over CODE_LEN chips. In chip time c the encoder
// outputs data_bit AND code_word[c], using the multiplexer AND cell with the
// data bit on the select line and the code chip on leg 1. A standard-basis
// code word is one-hot, so the bit appears in exactly one chip slot; an idle
// sender gets the all-zero code word and sends only zeros.
// Combinational: chip follows data_bit, code_word and chip_idx in the same
// cycle. The chip index comes from the sender's chip counter.
// The multiplexer AND follows the design; which pin gets the data bit and
// serialising the code word by chip index are this implementation's choices.
module sb_encoder #(
  parameter int unsigned CODE_LEN = cdma_noc_pkg::DEF_N_NODES,
  localparam int unsigned IDX_W   = (CODE_LEN > 1) ? $clog2(CODE_LEN) : 1
) (
  input  logic                data_bit,
  input  logic [CODE_LEN-1:0] code_word,
  input  logic [IDX_W-1:0]    chip_idx,
  output logic                chip
);
  logic code_chip;
  assign code_chip = code_word[chip_idx];

  sb_mux_and u_mux (.a(data_bit), .b(code_chip), .z(chip));
endmodule

// Standard-basis CDMA decoder for one receiver.
//
// In every chip time the binary-sum wire is ANDed with the receiver's code
// chip by the multiplexer AND cell (binary sum on the select line, code chip
// on leg 1), giving a result chip. The result chips of one bit are
// accumulated by XOR in a single 1-bit register; since the code has only one
// 1 chip the accumulated value never exceeds 1. The register restarts at
// chip 0 of each bit. On the last chip (chip_idx = CODE_LEN-1) bit_valid is
// high and bit_out carries the decoded bit, i.e. the accumulator XOR the
// current result chip, combinationally. chip_en marks cycles in which chips
// are on the wire; the chip index comes from the receiver's chip counter.
// The multiplexer AND and the 1-bit XOR accumulator follow the design; the
// restart at chip 0 and the combinational output on the last chip are this
// implementation's choices.
module sb_decoder #(
  parameter int unsigned CODE_LEN = cdma_noc_pkg::DEF_N_NODES,
  localparam int unsigned IDX_W   = (CODE_LEN > 1) ? $clog2(CODE_LEN) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                binary_sum,
  input  logic [CODE_LEN-1:0] code_word,
  input  logic [IDX_W-1:0]    chip_idx,
  input  logic                chip_en,
  output logic                bit_out,
  output logic                bit_valid
);
  logic code_chip, result_chip, acc_q, acc_d;

  assign code_chip = code_word[chip_idx];
  sb_mux_and u_mux (.a(binary_sum), .b(code_chip), .z(result_chip));

  // chip 0 starts a new bit: the old accumulator value is dropped
  assign acc_d = ((chip_idx == '0) ? 1'b0 : acc_q) ^ result_chip;

  always_ff @(posedge clk) begin
    if (!rst_n)       acc_q <= 1'b0;
    else if (chip_en) acc_q <= acc_d;
  end

  assign bit_out   = acc_d;
  assign bit_valid = chip_en && (chip_idx == IDX_W'(CODE_LEN - 1));
endmodule

// Chip counter of one encoder or decoder.
//
// Counts the chips of one encoding/decoding operation: chip_idx runs
// 0, 1, ..., CODE_LEN-1 and wraps, advancing in every cycle with en high.
// last flags chip CODE_LEN-1 (while en is high), which ends one data bit.
// clear returns the count to 0 and has priority over en. Every node has two
// of these, one for its sender and one for its receiver, as the design
// asks; the clear/enable interface is this implementation's choice.
module chip_counter #(
  parameter int unsigned CODE_LEN = cdma_noc_pkg::DEF_N_NODES,
  localparam int unsigned IDX_W   = (CODE_LEN > 1) ? $clog2(CODE_LEN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  output logic [IDX_W-1:0] chip_idx,
  output logic             last
);
  logic at_end;
  assign at_end = (chip_idx == IDX_W'(CODE_LEN - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clear) chip_idx <= '0;
    else if (en)         chip_idx <= at_end ? '0 : chip_idx + 1'b1;
  end

  assign last = en && at_end;
endmodule

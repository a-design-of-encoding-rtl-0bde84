// Binary-sum combiner of the standard-basis CDMA network.
//
// The encoded chips of all senders are mixed by XOR into one wire. Because
// standard-basis codes have a single 1 chip each and every receiver has its
// own code, at most one sender can drive a 1 in any chip time, so the XOR is
// the arithmetic sum and needs only one wire. Combinational.
// The XOR mixing follows the design description.
module sb_binary_sum #(
  parameter int unsigned N_NODES = cdma_noc_pkg::DEF_N_NODES
) (
  input  logic [N_NODES-1:0] chips,
  output logic               sum
);
  assign sum = ^chips;
endmodule

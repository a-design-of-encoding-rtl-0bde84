// AND operation built as a 2:1 multiplexer.
//
// Leg 0 of the multiplexer is tied to logic 0 and leg 1 takes B; A is the
// select line. With A = 0 the output is 0 and with A = 1 it follows B, so
// Z = A AND B (the AND truth table). This is the basic cell of both the
// standard-basis encoder and decoder of the design. Purely combinational.
// The multiplexer form of the AND follows the design description.
module sb_mux_and (
  input  logic a,   // select line
  input  logic b,   // leg 1 input (the code chip in encoder and decoder)
  output logic z
);
  always_comb begin
    unique case (a)
      1'b0: z = 1'b0;
      1'b1: z = b;
    endcase
  end
endmodule

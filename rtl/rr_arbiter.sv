// Round-robin arbiter for one receiver.
//
// Among the senders requesting this receiver, grant goes (one-hot,
// combinationally) to the first one at or after the priority pointer,
// searching upward with wrap-around. When update is high the pointer moves
// to the position after the winner, so a sender that was just served has
// the lowest priority next time. No request gives an all-zero grant.
// Round robin is the arbitration the design names; the pointer scheme is this
// implementation's choice.
module rr_arbiter #(
  parameter int unsigned N = cdma_noc_pkg::DEF_N_NODES,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] grant
);
  logic [IDX_W-1:0] ptr;
  logic [IDX_W-1:0] win;
  logic             found;

  always_comb begin
    found = 1'b0;
    win   = '0;
    for (int k = 0; k < int'(N); k++) begin
      logic [IDX_W:0] idx;   // one extra bit for the wrap-around sum
      idx = {1'b0, ptr} + (IDX_W+1)'(k);
      if (idx >= (IDX_W+1)'(N)) idx = idx - (IDX_W+1)'(N);
      if (!found && req[idx[IDX_W-1:0]]) begin
        found = 1'b1;
        win   = idx[IDX_W-1:0];
      end
    end
    grant = '0;
    if (found) grant[win] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      ptr <= '0;
    else if (update && found)
      ptr <= (win == IDX_W'(N - 1)) ? '0 : win + 1'b1;
  end

  // at most one sender is granted
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule

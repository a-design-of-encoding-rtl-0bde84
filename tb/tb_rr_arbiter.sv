// Self-checking test of the round-robin arbiter: random request vectors
// against a reference pointer model; the grant must be the first requester
// at or after the pointer, and under full load every requester must be
// served in turn.
module tb_rr_arbiter;
  localparam int unsigned N = 5;
  logic         clk = 0, rst_n = 0, update;
  logic [N-1:0] req, grant, expect_g;
  int checks = 0, failures = 0, ptr = 0;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .update, .grant);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [N-1:0] r, input logic u);
    int w = -1;
    @(negedge clk);
    req = r; update = u;
    for (int k = 0; k < int'(N); k++)
      if (w < 0 && r[(ptr + k) % int'(N)]) w = (ptr + k) % int'(N);
    expect_g = (w < 0) ? '0 : N'(1) << w;
    #1;
    checks++;
    if (grant !== expect_g) begin
      failures++;
      $display("FAIL req=%b ptr=%0d grant=%b expected=%b", r, ptr, grant, expect_g);
    end
    if (u && w >= 0) ptr = (w + 1) % int'(N);
  endtask

  initial begin
    req = '0; update = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // full load: strict rotation 0,1,2,...
    for (int k = 0; k < 2 * int'(N); k++) step('1, 1);
    repeat (1000) step(N'($urandom), 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

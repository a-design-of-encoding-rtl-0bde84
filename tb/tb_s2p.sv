// Self-checking test of the serial-to-parallel converter: random flits are
// fed LSB first, with gaps in which bit_valid is low and bit_in toggles; the
// register must hold the flit after its last bit.
module tb_s2p;
  localparam int unsigned W = 4;
  logic         clk = 0, rst_n = 0;
  logic         bit_in, bit_valid;
  logic [W-1:0] flit;
  int checks = 0, failures = 0;

  s2p #(.FLIT_W(W)) dut (.clk, .rst_n, .bit_in, .bit_valid, .flit);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] f;
    bit_in = 0; bit_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) begin
      f = W'($urandom);
      for (int b = 0; b < int'(W); b++) begin
        @(negedge clk); bit_valid = 1; bit_in = f[b];
        repeat ($urandom_range(2)) begin
          @(negedge clk); bit_valid = 0; bit_in = ~bit_in;
        end
      end
      @(negedge clk); bit_valid = 0;
      checks++;
      if (flit !== f) begin failures++; $display("FAIL sent=%b got=%b", f, flit); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

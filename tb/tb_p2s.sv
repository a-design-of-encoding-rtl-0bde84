// Self-checking test of the parallel-to-serial converter: random flits are
// loaded and shifted out, with random gaps between shift pulses; each bit
// must appear LSB first and stay stable until the next shift.
module tb_p2s;
  localparam int unsigned W = 4;
  logic         clk = 0, rst_n = 0;
  logic         load, shift, bit_out;
  logic [W-1:0] flit;
  int checks = 0, failures = 0;

  p2s #(.FLIT_W(W)) dut (.clk, .rst_n, .load, .flit, .shift, .bit_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] f;
    load = 0; shift = 0; flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) begin
      f = W'($urandom);
      @(negedge clk); load = 1; flit = f; shift = 1;   // load wins over shift
      @(negedge clk); load = 0; shift = 0; flit = ~f;
      for (int b = 0; b < int'(W); b++) begin
        repeat ($urandom_range(2)) begin
          @(negedge clk);
          checks++;
          if (bit_out !== f[b]) begin failures++; $display("FAIL hold bit %0d", b); end
        end
        checks++;
        if (bit_out !== f[b]) begin failures++; $display("FAIL flit=%b bit %0d=%0b", f, b, bit_out); end
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

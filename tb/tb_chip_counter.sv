// Self-checking test of the chip counter: with en randomly on and off and
// occasional clears, chip_idx and last are compared every cycle with a
// reference count modulo the code length.
module tb_chip_counter;
  localparam int unsigned L = 6;
  logic       clk = 0, rst_n = 0, clear, en, last;
  logic [2:0] chip_idx;
  int checks = 0, failures = 0, ref_idx = 0, wraps = 0;

  chip_counter #(.CODE_LEN(L)) dut (.clk, .rst_n, .clear, .en, .chip_idx, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      clear = ($urandom_range(49) == 0);
      en    = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (chip_idx !== 3'(ref_idx) || last !== (en && ref_idx == int'(L) - 1)) begin
        failures++;
        $display("FAIL idx=%0d ref=%0d last=%0b", chip_idx, ref_idx, last);
      end
      if (clear)   ref_idx = 0;
      else if (en) begin
        if (ref_idx == int'(L) - 1) wraps++;
        ref_idx = (ref_idx + 1) % int'(L);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

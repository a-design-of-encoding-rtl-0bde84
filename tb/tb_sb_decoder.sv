// Self-checking test of the standard-basis decoder. A reference encoder in
// the testbench builds binary-sum chip streams for up to N random senders,
// each on its own one-hot code; the decoder, set to one of the codes (or to
// the all-zero code), must return that sender's bit on the last chip of every
// bit (0 for the all-zero code), with bit_valid exactly on those cycles.
module tb_sb_decoder;
  localparam int unsigned L = 4;
  logic         clk = 0, rst_n = 0;
  logic         binary_sum, chip_en, bit_out, bit_valid;
  logic [L-1:0] code_word;
  logic [1:0]   chip_idx;
  int checks = 0, failures = 0;

  sb_decoder #(.CODE_LEN(L)) dut (.clk, .rst_n, .binary_sum, .code_word, .chip_idx,
                                  .chip_en, .bit_out, .bit_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] data;   // one bit per sender (sender i uses code i)
    int           k;
    binary_sum = 0; chip_en = 0; code_word = '0; chip_idx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) begin
      data = L'($urandom);
      k    = $urandom_range(L) - 1;          // -1 = all-zero code
      code_word = (k < 0) ? '0 : L'(1) << k;
      for (int c = 0; c < int'(L); c++) begin
        @(negedge clk);
        chip_en    = 1;
        chip_idx   = 2'(c);
        binary_sum = data[c];                // XOR of one-hot chips
        #1;
        checks++;
        if (bit_valid !== (c == int'(L) - 1)) begin
          failures++;
          $display("FAIL bit_valid=%0b at chip %0d", bit_valid, c);
        end
        if (c == int'(L) - 1) begin
          checks++;
          if (bit_out !== ((k < 0) ? 1'b0 : data[k])) begin
            failures++;
            $display("FAIL code=%b data=%b bit_out=%0b", code_word, data, bit_out);
          end
        end
      end
      // an idle cycle between bits must not disturb the next bit
      if ($urandom_range(1) == 1) begin
        @(negedge clk);
        chip_en = 0; binary_sum = 1;
        #1;
        checks++;
        if (bit_valid !== 1'b0) begin failures++; $display("FAIL bit_valid while idle"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

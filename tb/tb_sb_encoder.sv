// Self-checking test of the standard-basis encoder: for every data bit,
// every code word (one-hot and all-zero) and every chip index, the chip must
// be 1 only when the data bit is 1 and the chip index is the code's 1 position.
module tb_sb_encoder;
  localparam int unsigned L = 6;
  logic         data_bit, chip;
  logic [L-1:0] code_word;
  logic [2:0]   chip_idx;
  int checks = 0, failures = 0;

  sb_encoder #(.CODE_LEN(L)) dut (.data_bit, .code_word, .chip_idx, .chip);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int k = -1; k < int'(L); k++)
        for (int c = 0; c < int'(L); c++) begin
          data_bit  = 1'(d);
          code_word = (k < 0) ? '0 : L'(1) << k;
          chip_idx  = 3'(c);
          #1;
          checks++;
          if (chip !== (d == 1 && k == c)) begin
            failures++;
            $display("FAIL d=%0d code=%b c=%0d chip=%0b", d, code_word, c, chip);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

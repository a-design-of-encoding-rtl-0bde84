// Self-checking test of the multiplexer AND cell: all four input pairs are
// compared with the AND truth table.
module tb_sb_mux_and;
  logic a, b, z;
  int checks = 0, failures = 0;

  sb_mux_and dut (.a, .b, .z);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (z !== (v == 3)) begin
        failures++;
        $display("FAIL a=%0b b=%0b z=%0b", a, b, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

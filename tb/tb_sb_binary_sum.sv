// Self-checking test of the binary-sum combiner: random chip vectors, and
// every one-hot vector (the only case the network produces), compared with a
// parity computed by counting ones.
module tb_sb_binary_sum;
  localparam int unsigned N = 8;
  logic [N-1:0] chips;
  logic         sum;
  int checks = 0, failures = 0;

  sb_binary_sum #(.N_NODES(N)) dut (.chips, .sum);

  task automatic check();
    int ones = 0;
    #1;
    for (int i = 0; i < int'(N); i++) ones += int'(chips[i]);
    checks++;
    if (sum !== 1'(ones % 2)) begin
      failures++;
      $display("FAIL chips=%b sum=%0b", chips, sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chips = '0; check();
    for (int i = 0; i < int'(N); i++) begin chips = N'(1) << i; check(); end
    repeat (200) begin chips = N'($urandom); check(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

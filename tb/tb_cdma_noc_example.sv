// Directed test of the four-node network on a worked example: node 1 sends
// four data bits to node 3 while node 2 sends four bits to node 4 (indices
// 0->2 and 1->3 here), so the two encoded streams are mixed on the wire.
// The binary-sum wire is checked chip by chip against the standard-basis
// pattern worked out here: in bit b, chip slot k carries bit b of the sender
// holding code k (codes equal receiver numbers) and every other slot is 0.
// Both packets must then arrive intact, 4*4 + 2 cycles after the grant.
// A second round sends from two nodes to the same receiver to show that the
// loser is served in the following frame.
module tb_cdma_noc_example;
  localparam int unsigned N = 4, W = 4;
  logic         clk = 0, rst_n = 0;
  logic [N-1:0] pe_tx_valid, pe_tx_ready, pe_rx_valid;
  logic [1:0]   pe_tx_dst [N];
  logic [W-1:0] pe_tx_data [N];
  logic [1:0]   pe_rx_src [N];
  logic [W-1:0] pe_rx_data [N];
  logic         binary_sum;
  int checks = 0, failures = 0;

  cdma_noc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // Wait for the next grant and check it, then check the frame's chips and
  // the deliveries. With in_progress set the call starts on chip 0 of a frame
  // that began right after the previous one (its grant is already past).
  task automatic run_frame(input logic [W-1:0] slot_data [N], input logic [N-1:0] slot_used,
                           input int rx_src_of [N], input logic [N-1:0] exp_grant,
                           input bit in_progress);
    if (!in_progress) begin
      while (dut.grant == '0) @(negedge clk);
      expect_true(dut.grant == exp_grant, $sformatf("grant=%b expected %b", dut.grant, exp_grant));
    end
    for (int b = 0; b < int'(W); b++)
      for (int k = 0; k < int'(N); k++) begin
        if (!(in_progress && b == 0 && k == 0)) @(negedge clk);
        expect_true(binary_sum == (slot_used[k] && slot_data[k][b]),
                    $sformatf("bit %0d chip %0d: binary_sum=%0b", b, k, binary_sum));
      end
    @(negedge clk);   // scheduling cycle of the next frame
    expect_true(pe_rx_valid == '0, "delivery one cycle early");
    @(negedge clk);
    expect_true(pe_rx_valid == slot_used, $sformatf("pe_rx_valid=%b", pe_rx_valid));
    for (int k = 0; k < int'(N); k++)
      if (slot_used[k])
        expect_true(pe_rx_data[k] == slot_data[k] && int'(pe_rx_src[k]) == rx_src_of[k],
                    $sformatf("node %0d got %b from %0d", k, pe_rx_data[k], pe_rx_src[k]));
  endtask

  initial begin
    logic [W-1:0] sd [N];
    int           src [N];
    pe_tx_valid = '0;
    for (int i = 0; i < int'(N); i++) begin pe_tx_dst[i] = '0; pe_tx_data[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // wait for a scheduling cycle, then offer both packets together
    while (dut.u_sched.phase != cdma_noc_pkg::PH_TRANSFER) @(negedge clk);
    pe_tx_valid[0] = 1; pe_tx_dst[0] = 2'd2; pe_tx_data[0] = 4'b1011;
    pe_tx_valid[1] = 1; pe_tx_dst[1] = 2'd3; pe_tx_data[1] = 4'b0110;
    @(negedge clk);
    pe_tx_valid = '0;
    sd = '{default: '0}; src = '{default: 0};
    sd[2] = 4'b1011; src[2] = 0;
    sd[3] = 4'b0110; src[3] = 1;
    run_frame(sd, 4'b1100, src, 4'b0011, 0);

    // nodes 2 and 3 both send to node 1: one now, the other next frame
    while (dut.u_sched.phase != cdma_noc_pkg::PH_TRANSFER) @(negedge clk);
    pe_tx_valid[2] = 1; pe_tx_dst[2] = 2'd1; pe_tx_data[2] = 4'b1001;
    pe_tx_valid[3] = 1; pe_tx_dst[3] = 2'd1; pe_tx_data[3] = 4'b0111;
    @(negedge clk);
    pe_tx_valid = '0;
    sd = '{default: '0}; src = '{default: 0};
    sd[1] = 4'b1001; src[1] = 2;   // round-robin pointer of node 1 is still 0
    run_frame(sd, 4'b0010, src, 4'b0100, 0);
    sd[1] = 4'b0111; src[1] = 3;
    run_frame(sd, 4'b0010, src, 4'b1000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

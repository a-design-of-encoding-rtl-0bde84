// Runs the CDMA network-on-chip at the three network sizes evaluated for the
// design: 6, 8 and 16 nodes, four-bit flits. Each network gets its own
// traffic agent, which checks every delivery (source, data, latency of
// 4*N + 2 cycles after the grant) and that all network mechanisms occurred.
// The three networks run side by side and the test ends when all are done.
module tb_cdma_noc_workloads;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0;
  logic [2:0] done;
  int         checks [3], failures [3];

  always #5 clk = ~clk;

  for (genvar s = 0; s < 3; s++) begin : g_net
    localparam int unsigned N  = (s == 0) ? 6 : (s == 1) ? 8 : 16;
    localparam int unsigned IW = $clog2(N);
    logic [N-1:0]  pe_tx_valid, pe_tx_ready, pe_rx_valid;
    logic [IW-1:0] pe_tx_dst [N];
    logic [W-1:0]  pe_tx_data [N];
    logic [IW-1:0] pe_rx_src [N];
    logic [W-1:0]  pe_rx_data [N];
    logic          binary_sum;

    cdma_noc #(.N_NODES(N), .FLIT_W(W)) dut (
      .clk, .rst_n, .pe_tx_valid, .pe_tx_dst, .pe_tx_data, .pe_tx_ready,
      .pe_rx_valid, .pe_rx_src, .pe_rx_data, .binary_sum);

    noc_traffic_agent #(.N_NODES(N), .FLIT_W(W), .N_PACKETS(20)) agent (
      .clk, .rst_n, .pe_tx_valid, .pe_tx_dst, .pe_tx_data, .pe_tx_ready,
      .pe_rx_valid, .pe_rx_src, .pe_rx_data, .grant(dut.grant),
      .done(done[s]), .checks(checks[s]), .failures(failures[s]));
  end

  function automatic void report(int extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + extra);
  endfunction

  initial begin
    repeat (500000) @(posedge clk);
    report(1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    @(posedge clk);
    report(0);
    $finish;
  end
endmodule

// End-to-end test of the CDMA network-on-chip at its default size (four
// nodes, four-bit flits). The traffic agent sends 30 packets from every
// node, checks each delivery (source, data and latency) and that
// parallel transfers, contention, round-robin turns, idle all-zero-code
// nodes and sender stalls all occurred.
module tb_cdma_noc;
  import cdma_noc_pkg::*;
  localparam int unsigned N  = DEF_N_NODES;
  localparam int unsigned W  = DEF_FLIT_W;
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          clk = 0, rst_n = 0;
  logic [N-1:0]  pe_tx_valid, pe_tx_ready, pe_rx_valid;
  logic [IW-1:0] pe_tx_dst [N];
  logic [W-1:0]  pe_tx_data [N];
  logic [IW-1:0] pe_rx_src [N];
  logic [W-1:0]  pe_rx_data [N];
  logic          binary_sum, done;
  int            checks, failures;

  cdma_noc dut (.clk, .rst_n, .pe_tx_valid, .pe_tx_dst, .pe_tx_data, .pe_tx_ready,
                .pe_rx_valid, .pe_rx_src, .pe_rx_data, .binary_sum);

  noc_traffic_agent #(.N_NODES(N), .FLIT_W(W), .N_PACKETS(30)) agent (
    .clk, .rst_n, .pe_tx_valid, .pe_tx_dst, .pe_tx_data, .pe_tx_ready,
    .pe_rx_valid, .pe_rx_src, .pe_rx_data, .grant(dut.grant), .done, .checks, .failures);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

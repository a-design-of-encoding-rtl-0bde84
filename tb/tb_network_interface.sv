// Self-checking test of the network interface (node 2 of 4, 4-bit flits).
// Send side: packets offered by the PE are accepted only while the buffer
// is empty, raise a request with the right destination and flit, and leave
// after a grant arriving after a random wait. Receive side: an rx_done with
// rx_active must deliver the flit and source in the next cycle with a
// one-cycle pe_rx_valid; an rx_done without rx_active must deliver nothing.
module tb_network_interface;
  localparam int unsigned N = 4, W = 4, IW = 2;
  logic          clk = 0, rst_n = 0;
  logic          pe_tx_valid, pe_tx_ready, req, grant, rx_active, rx_done, pe_rx_valid;
  logic [IW-1:0] pe_tx_dst, req_dst, rx_src, pe_rx_src;
  logic [W-1:0]  pe_tx_data, flit_out, flit_in, pe_rx_data;
  int checks = 0, failures = 0;

  network_interface #(.N_NODES(N), .FLIT_W(W), .NODE_ID(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    logic [IW-1:0] d, s;
    logic [W-1:0]  f;
    logic          act;
    pe_tx_valid = 0; pe_tx_dst = '0; pe_tx_data = '0; grant = 0;
    rx_active = 0; rx_done = 0; rx_src = '0; flit_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    expect_true(pe_tx_ready && !req && !pe_rx_valid, "idle after reset");
    repeat (200) begin
      // send one packet
      d = IW'($urandom); f = W'($urandom);
      pe_tx_valid = 1; pe_tx_dst = d; pe_tx_data = f;
      @(negedge clk);
      pe_tx_valid = 1; pe_tx_dst = ~d; pe_tx_data = ~f;   // a second offer must wait
      repeat ($urandom_range(3)) begin
        #1;
        expect_true(req && !pe_tx_ready && req_dst == d && flit_out == f, "waiting packet");
        @(negedge clk);
      end
      #1;
      expect_true(req && req_dst == d && flit_out == f, "packet before grant");
      grant = 1;
      @(negedge clk);
      grant = 0; pe_tx_valid = 0;
      #1;
      expect_true(!req && pe_tx_ready, "buffer empty after grant");
      // receive one flit
      s = IW'($urandom); f = W'($urandom); act = 1'($urandom_range(3) != 0);
      rx_done = 1; rx_active = act; rx_src = s; flit_in = f;
      @(negedge clk);
      rx_done = 0; rx_src = ~s; flit_in = ~f;
      #1;
      expect_true(pe_rx_valid == act, "pe_rx_valid");
      if (act) expect_true(pe_rx_src == s && pe_rx_data == f, "delivered packet");
      @(negedge clk);
      expect_true(!pe_rx_valid, "pe_rx_valid is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the network scheduler (5 nodes, 4-bit flits).
// Random requests are presented in every scheduling cycle. A reference model
// with one round-robin pointer per receiver predicts the grants; the test
// then checks the code words and source numbers held during the frame, the
// frame length of FLIT_W*N chip cycles, frame_done on its last chip, rx_done
// one cycle later, and every cycle of the 2*N chip counters (running only
// for nodes that send or receive, idle otherwise).
module tb_network_scheduler;
  import cdma_noc_pkg::*;
  localparam int unsigned N = 5, W = 4, IW = 3;
  logic          clk = 0, rst_n = 0;
  logic [N-1:0]  req, grant, rx_active, tx_bit_last, rx_bit_last;
  logic [IW-1:0] req_dst [N];
  logic [N-1:0]  tx_code [N];
  logic [N-1:0]  rx_code [N];
  logic [IW-1:0] rx_src [N];
  logic [IW-1:0] tx_chip_idx [N];
  logic [IW-1:0] rx_chip_idx [N];
  phase_e        phase;
  logic          chip_en, frame_done, rx_done;
  int checks = 0, failures = 0;

  network_scheduler #(.N_NODES(N), .FLIT_W(W)) dut (.*);

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

  int ptr [N];
  initial begin
    int exp_tx [N];   // receiver of sender i, -1 if none
    int exp_src [N];  // sender of receiver j, -1 if none
    int contended = 0;
    for (int j = 0; j < int'(N); j++) ptr[j] = 0;
    req = '0;
    for (int i = 0; i < int'(N); i++) req_dst[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (150) begin
      // scheduling cycle
      #1;
      expect_true(phase == PH_SCHED, "not in scheduling phase");
      for (int i = 0; i < int'(N); i++) begin
        req[i]     = ($urandom_range(3) != 0);
        req_dst[i] = IW'($urandom_range(N - 1));
      end
      #1;
      for (int j = 0; j < int'(N); j++) begin
        automatic int nreq = 0;
        exp_src[j] = -1;
        for (int k = 0; k < int'(N); k++) begin
          automatic int i = (ptr[j] + k) % int'(N);
          if (req[i] && int'(req_dst[i]) == j) begin
            nreq++;
            if (exp_src[j] < 0) exp_src[j] = i;
          end
        end
        if (nreq > 1) contended++;
        if (exp_src[j] >= 0) ptr[j] = (exp_src[j] + 1) % int'(N);
      end
      for (int i = 0; i < int'(N); i++) begin
        exp_tx[i] = -1;
        for (int j = 0; j < int'(N); j++) if (exp_src[j] == i) exp_tx[i] = j;
        expect_true(grant[i] == (exp_tx[i] >= 0), $sformatf("grant[%0d]=%0b", i, grant[i]));
      end
      // transfer phase
      for (int t = 0; t < int'(N * W); t++) begin
        @(negedge clk);
        req = '0;
        expect_true(phase == PH_TRANSFER && chip_en, "not transferring");
        expect_true(grant == '0, "grant outside scheduling");
        expect_true(!rx_done, "rx_done during transfer");
        expect_true(frame_done == (t == int'(N * W) - 1), "frame_done");
        for (int n = 0; n < int'(N); n++) begin
          logic [N-1:0] tc, rc;
          int ti, ri;
          tc = (exp_tx[n] >= 0) ? N'(1) << exp_tx[n] : '0;
          rc = (exp_src[n] >= 0) ? N'(1) << n : '0;
          ti = (exp_tx[n] >= 0) ? t % int'(N) : 0;
          ri = (exp_src[n] >= 0) ? t % int'(N) : 0;
          expect_true(tx_code[n] == tc, $sformatf("tx_code[%0d]=%b expected %b", n, tx_code[n], tc));
          expect_true(rx_code[n] == rc, $sformatf("rx_code[%0d]=%b expected %b", n, rx_code[n], rc));
          expect_true(rx_active[n] == (exp_src[n] >= 0), "rx_active");
          if (exp_src[n] >= 0)
            expect_true(int'(rx_src[n]) == exp_src[n], $sformatf("rx_src[%0d]=%0d", n, rx_src[n]));
          expect_true(int'(tx_chip_idx[n]) == ti && int'(rx_chip_idx[n]) == ri,
                      $sformatf("chip counters of node %0d at t=%0d", n, t));
          expect_true(tx_bit_last[n] == (ti == int'(N) - 1) && rx_bit_last[n] == (ri == int'(N) - 1),
                      "bit_last");
        end
      end
      @(negedge clk);
      expect_true(rx_done, "rx_done after frame");
    end
    expect_true(contended > 0, "no contention generated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Traffic generator and scoreboard for the CDMA network-on-chip testbenches.
//
// Models N_NODES processing elements. Each sends N_PACKETS packets with
// random data; half of them go to node 0 so that several senders often want
// the same receiver, the rest to a random node (itself included). A packet is
// held on pe_tx_valid until pe_tx_ready takes it. The scoreboard follows each
// accepted packet: the scheduler's grant of its sender (observed on `grant`)
// must come while the packet waits, and the packet must reach its
// destination with the right source and data exactly FLIT_W*N_NODES + 2
// cycles after that grant. It also counts how often each mechanism of the
// network happened: parallel transfers in one frame, several senders
// contending for one receiver, a round-robin turn going to a different
// sender than last time, idle nodes holding the all-zero code while others
// transfer, and senders stalled by a full interface. A mechanism that never
// happened is a failure. done rises when every packet has been delivered.
module noc_traffic_agent #(
  parameter int unsigned N_NODES   = 4,
  parameter int unsigned FLIT_W    = 4,
  parameter int unsigned N_PACKETS = 20,
  localparam int unsigned ID_W     = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic [N_NODES-1:0] pe_tx_valid,
  output logic [ID_W-1:0]    pe_tx_dst  [N_NODES],
  output logic [FLIT_W-1:0]  pe_tx_data [N_NODES],
  input  logic [N_NODES-1:0] pe_tx_ready,
  input  logic [N_NODES-1:0] pe_rx_valid,
  input  logic [ID_W-1:0]    pe_rx_src  [N_NODES],
  input  logic [FLIT_W-1:0]  pe_rx_data [N_NODES],
  input  logic [N_NODES-1:0] grant,
  output logic               done,
  output int                 checks,
  output int                 failures
);
  typedef struct {
    int src;
    int dst;
    int data;
    int due;
  } pkt_t;

  localparam int LAT = int'(FLIT_W * N_NODES) + 2;

  int   cycle = 0;
  int   sent [N_NODES];
  int   delivered = 0;
  bit   held [N_NODES];          // packet waiting in the sender's interface
  pkt_t held_pkt [N_NODES];
  pkt_t pending [N_NODES][$];    // per destination, granted and in flight
  int   last_winner [N_NODES];

  int n_parallel = 0, n_contention = 0, n_rr_turn = 0, n_idle_zero = 0, n_stall = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    pe_tx_valid = '0;
    for (int i = 0; i < int'(N_NODES); i++) begin
      sent[i] = 0; held[i] = 0; last_winner[i] = -1;
      pe_tx_dst[i] = '0; pe_tx_data[i] = '0;
    end
  end

  function automatic void fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      // ---- grants of the scheduling cycle ---------------------------------
      if (grant != '0) begin
        int nreq [N_NODES];
        int busy;
        busy = 0;
        for (int j = 0; j < int'(N_NODES); j++) nreq[j] = 0;
        for (int i = 0; i < int'(N_NODES); i++) if (held[i]) nreq[held_pkt[i].dst]++;
        if ($countones(grant) >= 2) n_parallel++;
        for (int j = 0; j < int'(N_NODES); j++) if (nreq[j] >= 2) n_contention++;
        for (int i = 0; i < int'(N_NODES); i++) begin
          if (!grant[i]) continue;
          checks++;
          if (!held[i]) begin fail($sformatf("grant to node %0d with no packet", i)); continue; end
          begin
            automatic pkt_t p = held_pkt[i];
            if (nreq[p.dst] >= 2 && last_winner[p.dst] >= 0 && last_winner[p.dst] != i) n_rr_turn++;
            last_winner[p.dst] = i;
            p.due = cycle + LAT - 1;
            pending[p.dst].push_back(p);
            held[i] = 0;
            busy |= 1 << i;
            busy |= 1 << p.dst;
          end
        end
        // the receiver of every contended destination got exactly one grant
        for (int j = 0; j < int'(N_NODES); j++) begin
          automatic int g = 0;
          for (int i = 0; i < int'(N_NODES); i++) if (grant[i] && held_pkt[i].dst == j) g++;
          checks++;
          if (nreq[j] > 0 && g != 1) fail($sformatf("receiver %0d: %0d requests, %0d grants", j, nreq[j], g));
        end
        if (busy != (1 << N_NODES) - 1) n_idle_zero++;
      end

      // ---- deliveries -----------------------------------------------------
      for (int j = 0; j < int'(N_NODES); j++) begin
        if (!pe_rx_valid[j]) continue;
        checks++;
        if (pending[j].size() == 0) begin
          fail($sformatf("unexpected delivery to node %0d", j));
        end else begin
          automatic pkt_t p = pending[j].pop_front();
          if (int'(pe_rx_src[j]) != p.src || int'(pe_rx_data[j]) != p.data)
            fail($sformatf("node %0d got src=%0d data=%h, expected src=%0d data=%h",
                           j, pe_rx_src[j], pe_rx_data[j], p.src, p.data));
          checks++;
          if (cycle - 1 != p.due)
            fail($sformatf("node %0d delivery at %0d, expected %0d", j, cycle - 1, p.due));
          delivered++;
        end
      end

      // ---- PE send side ---------------------------------------------------
      for (int i = 0; i < int'(N_NODES); i++) begin
        if (pe_tx_valid[i] && pe_tx_ready[i]) begin
          checks++;
          if (held[i]) fail($sformatf("node %0d accepted a packet while full", i));
          held[i] = 1;
          held_pkt[i] = '{src: i, dst: int'(pe_tx_dst[i]), data: int'(pe_tx_data[i]), due: 0};
          sent[i]++;
          pe_tx_valid[i] <= 1'b0;
        end else if (pe_tx_valid[i]) begin
          n_stall++;
        end else if (sent[i] < int'(N_PACKETS) && $urandom_range(3) != 0) begin
          pe_tx_valid[i] <= 1'b1;
          pe_tx_dst[i]   <= ($urandom_range(1) == 0) ? '0 : ID_W'($urandom_range(N_NODES - 1));
          pe_tx_data[i]  <= FLIT_W'($urandom);
        end
      end

      if (delivered == int'(N_NODES * N_PACKETS) && !done) begin
        checks++;
        if (n_parallel == 0)   fail("no frame carried two transfers at once");
        checks++;
        if (n_contention == 0) fail("no receiver was contended");
        checks++;
        if (n_rr_turn == 0)    fail("round robin never moved to another sender");
        checks++;
        if (n_idle_zero == 0)  fail("no node was ever idle in a busy frame");
        checks++;
        if (n_stall == 0)      fail("no sender was ever stalled");
        $display("N_NODES=%0d FLIT_W=%0d: %0d packets in %0d cycles; parallel frames %0d, contended receivers %0d, round-robin turns %0d, frames with idle nodes %0d, stall cycles %0d",
                 N_NODES, FLIT_W, delivered, cycle, n_parallel, n_contention, n_rr_turn, n_idle_zero, n_stall);
        done <= 1'b1;
      end
    end
  end
endmodule

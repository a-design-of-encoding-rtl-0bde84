// Network scheduler of the standard-basis CDMA network-on-chip.
//
// The network runs in bit-synchronous frames. A frame starts with one
// scheduling cycle (PH_SCHED): every receiver j has a round-robin arbiter
// that picks one of the senders whose request names j; the chosen sender
// gets grant (a one-cycle pulse in that cycle, which loads its flit into its
// parallel-to-serial converter). Standard-basis code j (only bit j set) is
// assigned to receiver j and to its chosen sender; every node with nothing to
// send or receive gets the all-zero code word. Different receivers use
// different codes, so all granted pairs share the single binary-sum wire at
// the same time. The transfer phase (PH_TRANSFER) that follows lasts
// FLIT_W * N_NODES cycles: FLIT_W bits of N_NODES chips each.
//
// The scheduler holds 2*N_NODES chip counters, one for the sender and one
// for the receiver of each node. A counter runs only while its node is
// active in the frame; all are cleared in the scheduling cycle, which keeps
// them chip-aligned. One more chip counter and a bit counter time the frame.
// frame_done marks the last chip of the frame; rx_done follows it by one
// cycle (the next scheduling cycle), when every active receiver's
// serial-to-parallel register holds the complete flit; rx_active and rx_src
// still describe the finished frame in that cycle.
//
// Requests are sampled only in the scheduling cycle. Receiver j only ever
// holds code j, so bits other than j of rx_code[j] are constant 0 by design. Round robin, the
// all-zero code for idle nodes and the two chip counters per node follow the
// design description; the frame timing and one-code-per-receiver assignment
// are this implementation's choices.
module network_scheduler
  import cdma_noc_pkg::*;
#(
  parameter int unsigned N_NODES = DEF_N_NODES,
  parameter int unsigned FLIT_W  = DEF_FLIT_W,
  localparam int unsigned ID_W   = (N_NODES > 1) ? $clog2(N_NODES) : 1,
  localparam int unsigned BIT_W  = (FLIT_W > 1) ? $clog2(FLIT_W) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // sender requests
  input  logic [N_NODES-1:0] req,
  input  logic [ID_W-1:0]    req_dst     [N_NODES],
  output logic [N_NODES-1:0] grant,
  // code assignment
  output logic [N_NODES-1:0] tx_code     [N_NODES],
  output logic [N_NODES-1:0] rx_code     [N_NODES],
  output logic [N_NODES-1:0] rx_active,
  output logic [ID_W-1:0]    rx_src      [N_NODES],
  // chip counters
  output logic [ID_W-1:0]    tx_chip_idx [N_NODES],
  output logic [N_NODES-1:0] tx_bit_last,
  output logic [ID_W-1:0]    rx_chip_idx [N_NODES],
  output logic [N_NODES-1:0] rx_bit_last,
  // frame timing
  output phase_e             phase,
  output logic               chip_en,
  output logic               frame_done,
  output logic               rx_done
);
  logic [N_NODES-1:0] arb_req   [N_NODES];  // [receiver][sender]
  logic [N_NODES-1:0] arb_grant [N_NODES];  // [receiver][sender]
  logic [N_NODES-1:0] tx_active;
  logic               sched;

  assign sched   = (phase == PH_SCHED);
  assign chip_en = (phase == PH_TRANSFER);

  // ---- arbitration: one round-robin arbiter per receiver --------------------
  for (genvar j = 0; j < N_NODES; j++) begin : g_arb
    for (genvar i = 0; i < N_NODES; i++) begin : g_req
      assign arb_req[j][i] = req[i] && (req_dst[i] == ID_W'(j));
    end
    rr_arbiter #(.N(N_NODES)) u_arb (
      .clk, .rst_n, .req(arb_req[j]), .update(sched), .grant(arb_grant[j])
    );
  end

  always_comb begin
    grant = '0;
    if (sched)
      for (int j = 0; j < N_NODES; j++) grant |= arb_grant[j];
  end

  // ---- code assignment, held for the whole frame -----------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < N_NODES; n++) begin
        tx_code[n] <= '0;
        rx_code[n] <= '0;
        rx_src[n]  <= '0;
      end
    end else if (sched) begin
      for (int n = 0; n < N_NODES; n++) begin
        tx_code[n] <= '0;
        rx_code[n] <= '0;
        rx_src[n]  <= '0;
      end
      for (int j = 0; j < N_NODES; j++) begin
        if (arb_grant[j] != '0) rx_code[j][j] <= 1'b1;
        for (int i = 0; i < N_NODES; i++) begin
          if (arb_grant[j][i]) begin
            tx_code[i][j] <= 1'b1;
            rx_src[j]     <= ID_W'(i);
          end
        end
      end
    end
  end

  for (genvar n = 0; n < N_NODES; n++) begin : g_act
    assign tx_active[n] = |tx_code[n];
    assign rx_active[n] = |rx_code[n];
  end

  // ---- 2*N_NODES chip counters ----------------------------------------------
  for (genvar n = 0; n < N_NODES; n++) begin : g_cc
    chip_counter #(.CODE_LEN(N_NODES)) u_tx_cc (
      .clk, .rst_n, .clear(sched), .en(chip_en && tx_active[n]),
      .chip_idx(tx_chip_idx[n]), .last(tx_bit_last[n])
    );
    chip_counter #(.CODE_LEN(N_NODES)) u_rx_cc (
      .clk, .rst_n, .clear(sched), .en(chip_en && rx_active[n]),
      .chip_idx(rx_chip_idx[n]), .last(rx_bit_last[n])
    );
  end

  // ---- frame timing ---------------------------------------------------------
  logic [ID_W-1:0]  frame_chip;
  logic             frame_bit_last;
  logic [BIT_W-1:0] bit_cnt;

  chip_counter #(.CODE_LEN(N_NODES)) u_frame_cc (
    .clk, .rst_n, .clear(sched), .en(chip_en),
    .chip_idx(frame_chip), .last(frame_bit_last)
  );

  assign frame_done = frame_bit_last && (bit_cnt == BIT_W'(FLIT_W - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= PH_SCHED;
      bit_cnt <= '0;
      rx_done <= 1'b0;
    end else begin
      rx_done <= frame_done;
      if (sched) begin
        phase   <= PH_TRANSFER;
        bit_cnt <= '0;
      end else if (frame_done) begin
        phase   <= PH_SCHED;
      end else if (frame_bit_last) begin
        bit_cnt <= bit_cnt + 1'b1;
      end
    end
  end

  // the frame chip counter and the active node counters stay chip-aligned
  for (genvar n = 0; n < N_NODES; n++) begin : g_align
    assert property (@(posedge clk) disable iff (!rst_n)
                     chip_en && tx_active[n] |-> tx_chip_idx[n] == frame_chip);
  end

  // a sender is granted to at most one receiver, and only in the scheduling cycle
  assert property (@(posedge clk) disable iff (!rst_n) !sched |-> grant == '0);
  for (genvar n = 0; n < N_NODES; n++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(tx_code[n]));
  end
endmodule

// Standard-basis CDMA network-on-chip, top level.
//
// N_NODES processing elements exchange FLIT_W-bit packets over one shared
// wire. Each sender path is network interface -> parallel-to-serial
// converter -> standard-basis encoder; the chips of all encoders are mixed by
// XOR onto the binary-sum wire; each receiver path is standard-basis decoder
// -> serial-to-parallel converter -> network interface. The network
// scheduler arbitrates requests per receiver, hands out the one-hot
// standard-basis codes (all-zero to idle nodes) and runs the 2*N_NODES chip
// counters, so up to N_NODES transfers share the wire in one frame, each
// using its own chip slot.
//
// Timing: a frame is 1 scheduling cycle plus FLIT_W*N_NODES chip cycles. A
// packet accepted from a PE (pe_tx_valid && pe_tx_ready) is granted in the
// next scheduling cycle that its receiver's arbiter picks it; it is delivered
// on pe_rx_valid 2 cycles after that frame's last chip, i.e.
// FLIT_W*N_NODES + 2 cycles after its grant. The encoder/decoder structure,
// binary sum, converters and scheduler follow the design description; the
// frame protocol and PE handshake are this implementation's choices. The
// processing elements themselves are outside this module.
module cdma_noc
  import cdma_noc_pkg::*;
#(
  parameter int unsigned N_NODES = DEF_N_NODES,
  parameter int unsigned FLIT_W  = DEF_FLIT_W,
  localparam int unsigned ID_W   = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // PE send side
  input  logic [N_NODES-1:0] pe_tx_valid,
  input  logic [ID_W-1:0]    pe_tx_dst  [N_NODES],
  input  logic [FLIT_W-1:0]  pe_tx_data [N_NODES],
  output logic [N_NODES-1:0] pe_tx_ready,
  // PE receive side
  output logic [N_NODES-1:0] pe_rx_valid,
  output logic [ID_W-1:0]    pe_rx_src  [N_NODES],
  output logic [FLIT_W-1:0]  pe_rx_data [N_NODES],
  // shared channel, brought out for observation
  output logic               binary_sum
);
  logic [N_NODES-1:0] req, grant, rx_active, tx_bit_last, rx_bit_last;
  logic [ID_W-1:0]    req_dst     [N_NODES];
  logic [N_NODES-1:0] tx_code     [N_NODES];
  logic [N_NODES-1:0] rx_code     [N_NODES];
  logic [ID_W-1:0]    rx_src      [N_NODES];
  logic [ID_W-1:0]    tx_chip_idx [N_NODES];
  logic [ID_W-1:0]    rx_chip_idx [N_NODES];
  logic [FLIT_W-1:0]  tx_flit     [N_NODES];
  logic [FLIT_W-1:0]  rx_flit     [N_NODES];
  logic [N_NODES-1:0] tx_bit, chips, rx_bit, rx_bit_valid;
  logic               chip_en, frame_done, rx_done;
  phase_e             phase;

  network_scheduler #(.N_NODES(N_NODES), .FLIT_W(FLIT_W)) u_sched (
    .clk, .rst_n, .req, .req_dst, .grant, .tx_code, .rx_code, .rx_active, .rx_src,
    .tx_chip_idx, .tx_bit_last, .rx_chip_idx, .rx_bit_last,
    .phase, .chip_en, .frame_done, .rx_done
  );

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    network_interface #(.N_NODES(N_NODES), .FLIT_W(FLIT_W), .NODE_ID(n)) u_ni (
      .clk, .rst_n,
      .pe_tx_valid(pe_tx_valid[n]), .pe_tx_dst(pe_tx_dst[n]), .pe_tx_data(pe_tx_data[n]),
      .pe_tx_ready(pe_tx_ready[n]),
      .req(req[n]), .req_dst(req_dst[n]), .flit_out(tx_flit[n]), .grant(grant[n]),
      .flit_in(rx_flit[n]), .rx_src(rx_src[n]), .rx_active(rx_active[n]), .rx_done,
      .pe_rx_valid(pe_rx_valid[n]), .pe_rx_src(pe_rx_src[n]), .pe_rx_data(pe_rx_data[n])
    );

    // sender path
    p2s #(.FLIT_W(FLIT_W)) u_p2s (
      .clk, .rst_n, .load(grant[n]), .flit(tx_flit[n]), .shift(tx_bit_last[n]),
      .bit_out(tx_bit[n])
    );
    sb_encoder #(.CODE_LEN(N_NODES)) u_enc (
      .data_bit(tx_bit[n]), .code_word(tx_code[n]), .chip_idx(tx_chip_idx[n]),
      .chip(chips[n])
    );

    // receiver path
    sb_decoder #(.CODE_LEN(N_NODES)) u_dec (
      .clk, .rst_n, .binary_sum, .code_word(rx_code[n]), .chip_idx(rx_chip_idx[n]),
      .chip_en(chip_en && rx_active[n]), .bit_out(rx_bit[n]), .bit_valid(rx_bit_valid[n])
    );
    s2p #(.FLIT_W(FLIT_W)) u_s2p (
      .clk, .rst_n, .bit_in(rx_bit[n]), .bit_valid(rx_bit_valid[n]), .flit(rx_flit[n])
    );
  end

  sb_binary_sum #(.N_NODES(N_NODES)) u_sum (.chips, .sum(binary_sum));

  // every decoder completes a bit exactly when its receiver chip counter does,
  // and frames end only in the transfer phase
  assert property (@(posedge clk) disable iff (!rst_n) rx_bit_valid == rx_bit_last);
  assert property (@(posedge clk) disable iff (!rst_n) frame_done |-> phase == PH_TRANSFER);
endmodule

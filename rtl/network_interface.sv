// Network interface between a processing element and the CDMA network.
//
// Send side: the PE hands over data and a destination with a valid/ready
// handshake; the interface forms a packet of data, source address (its own
// NODE_ID) and destination address and keeps it in a one-entry buffer. While
// the buffer is full it requests the destination from the scheduler and
// offers the data as the flit for the parallel-to-serial converter; the
// buffer empties in the cycle the scheduler grants it. pe_tx_ready is high
// while the buffer is empty.
// Receive side: when the scheduler signals the end of a frame (rx_done) and
// this node was a receiver in it (rx_active), the flit from the
// serial-to-parallel converter and the source node are registered and
// presented to the PE with a one-cycle pe_rx_valid pulse.
// The source field of the buffered packet is kept for completeness but not
// read here: the receiver learns the source from the scheduler's pairing.
// The packet contents (data, source, destination) follow the design
// description; one flit per packet and the one-entry buffer are this
// implementation's choices.
module network_interface #(
  parameter int unsigned N_NODES = cdma_noc_pkg::DEF_N_NODES,
  parameter int unsigned FLIT_W  = cdma_noc_pkg::DEF_FLIT_W,
  parameter int unsigned NODE_ID = 0,
  localparam int unsigned ID_W   = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // PE send side
  input  logic              pe_tx_valid,
  input  logic [ID_W-1:0]   pe_tx_dst,
  input  logic [FLIT_W-1:0] pe_tx_data,
  output logic              pe_tx_ready,
  // network send side
  output logic              req,
  output logic [ID_W-1:0]   req_dst,
  output logic [FLIT_W-1:0] flit_out,
  input  logic              grant,
  // network receive side
  input  logic [FLIT_W-1:0] flit_in,
  input  logic [ID_W-1:0]   rx_src,
  input  logic              rx_active,
  input  logic              rx_done,
  // PE receive side
  output logic              pe_rx_valid,
  output logic [ID_W-1:0]   pe_rx_src,
  output logic [FLIT_W-1:0] pe_rx_data
);
  typedef struct packed {
    logic [ID_W-1:0]   dst;
    logic [ID_W-1:0]   src;
    logic [FLIT_W-1:0] data;
  } packet_t;

  packet_t tx_pkt;
  logic    tx_full;

  assign pe_tx_ready = !tx_full;
  assign req         = tx_full;
  assign req_dst     = tx_pkt.dst;
  assign flit_out    = tx_pkt.data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_full <= 1'b0;
      tx_pkt  <= '0;
    end else if (!tx_full && pe_tx_valid) begin
      tx_full <= 1'b1;
      tx_pkt  <= '{dst: pe_tx_dst, src: ID_W'(NODE_ID), data: pe_tx_data};
    end else if (tx_full && grant) begin
      tx_full <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pe_rx_valid <= 1'b0;
      pe_rx_src   <= '0;
      pe_rx_data  <= '0;
    end else begin
      pe_rx_valid <= rx_done && rx_active;
      if (rx_done && rx_active) begin
        pe_rx_src  <= rx_src;
        pe_rx_data <= flit_in;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) grant |-> tx_full);
endmodule

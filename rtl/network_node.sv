// network_node: one node of the CDMA network.
//
// Joins the five parts of a node: the Node IF facing the functional host, the
// transmit and receive packet buffers (dual-clock FIFOs), the packet sender
// and the packet receiver. The Node IF, and the host side of both buffers, run
// on the host clock h_clk; the sender, the receiver and the network side of the
// buffers run on the network clock n_clk. The two clocks need not be related.
// Host ports are valid/ready streams (see node_if); network ports go to the
// network arbiter (tx_req/tx_dest/tx_gnt, rx_open/rx_src/rx_ack) and the CDMA
// transmitter (sym_valid/sym_data/slot_load, ch_valid/ch_chip/ch_sum). The
// partition into these five parts follows the source.
module network_node
#(
  parameter int unsigned NODES      = cdma_noc_pkg::NODES,
  parameter int unsigned FLIT_W     = cdma_noc_pkg::FLIT_W,
  parameter int unsigned DP_W       = cdma_noc_pkg::DP_W,
  parameter int unsigned PKT_LEN    = cdma_noc_pkg::PKT_LEN,
  parameter int unsigned CODE_LEN   = cdma_noc_pkg::CODE_LEN,
  parameter int unsigned FIFO_DEPTH = cdma_noc_pkg::FIFO_DEPTH,
  parameter int unsigned NODE_ID    = 0,
  parameter int unsigned ADDR_W     = $clog2(NODES),
  parameter int unsigned SUM_W      = $clog2(NODES + 1)
) (
  input  logic                           h_clk,
  input  logic                           h_rst,
  input  logic                           n_clk,
  input  logic                           n_rst,
  // functional host
  input  logic                           h_tx_valid,
  output logic                           h_tx_ready,
  input  logic [ADDR_W-1:0]              h_tx_dest,
  input  logic [FLIT_W-1:0]              h_tx_data,
  input  logic                           h_tx_last,
  output logic                           h_rx_valid,
  input  logic                           h_rx_ready,
  output logic [ADDR_W-1:0]              h_rx_src,
  output logic [7:0]                     h_rx_seq,
  output logic [FLIT_W-1:0]              h_rx_data,
  output logic                           h_rx_last,
  // network arbiter
  output logic                           tx_req,
  output logic [ADDR_W-1:0]              tx_dest,
  input  logic                           tx_gnt,
  input  logic                           rx_open,
  input  logic [ADDR_W-1:0]              rx_src,
  output logic                           rx_ack,
  // CDMA transmitter
  output logic                           sym_valid,
  output logic [DP_W-1:0]                sym_data,
  input  logic                           slot_load,
  input  logic                           ch_valid,
  input  logic [$clog2(CODE_LEN)-1:0]    ch_chip,
  input  logic [DP_W-1:0][SUM_W-1:0]     ch_sum,
  // status
  output logic                           sending,
  output logic                           receiving
);
  localparam int unsigned FREE_W = $clog2(FIFO_DEPTH) + 1;

  logic              txb_full, txb_wr, txb_empty, txb_rd;
  logic [FLIT_W-1:0] txb_wdata, txb_rdata;
  logic [FREE_W-1:0] txb_free;
  logic              rxb_full, rxb_wr, rxb_empty, rxb_rd;
  logic [FLIT_W-1:0] rxb_wdata, rxb_rdata;
  logic [FREE_W-1:0] rxb_free;

  node_if #(.NODES(NODES), .FLIT_W(FLIT_W), .PKT_LEN(PKT_LEN), .NODE_ID(NODE_ID)) u_if (
    .clk        (h_clk),
    .rst        (h_rst),
    .h_tx_valid (h_tx_valid),
    .h_tx_ready (h_tx_ready),
    .h_tx_dest  (h_tx_dest),
    .h_tx_data  (h_tx_data),
    .h_tx_last  (h_tx_last),
    .h_rx_valid (h_rx_valid),
    .h_rx_ready (h_rx_ready),
    .h_rx_src   (h_rx_src),
    .h_rx_seq   (h_rx_seq),
    .h_rx_data  (h_rx_data),
    .h_rx_last  (h_rx_last),
    .txb_full   (txb_full),
    .txb_wr     (txb_wr),
    .txb_data   (txb_wdata),
    .rxb_empty  (rxb_empty),
    .rxb_data   (rxb_rdata),
    .rxb_rd     (rxb_rd)
  );

  // transmit packet buffer: host clock -> network clock
  async_fifo #(.W(FLIT_W), .DEPTH(FIFO_DEPTH)) u_txbuf (
    .wclk (h_clk), .wrst (h_rst), .wr_en (txb_wr), .wr_data (txb_wdata),
    .full (txb_full), .wr_free (txb_free),
    .rclk (n_clk), .rrst (n_rst), .rd_en (txb_rd), .rd_data (txb_rdata),
    .empty (txb_empty)
  );

  // receive packet buffer: network clock -> host clock
  async_fifo #(.W(FLIT_W), .DEPTH(FIFO_DEPTH)) u_rxbuf (
    .wclk (n_clk), .wrst (n_rst), .wr_en (rxb_wr), .wr_data (rxb_wdata),
    .full (rxb_full), .wr_free (rxb_free),
    .rclk (h_clk), .rrst (h_rst), .rd_en (rxb_rd), .rd_data (rxb_rdata),
    .empty (rxb_empty)
  );

  packet_sender #(.NODES(NODES), .FLIT_W(FLIT_W), .DP_W(DP_W), .PKT_LEN(PKT_LEN)) u_send (
    .clk       (n_clk),
    .rst       (n_rst),
    .buf_empty (txb_empty),
    .buf_data  (txb_rdata),
    .buf_rd    (txb_rd),
    .tx_req    (tx_req),
    .tx_dest   (tx_dest),
    .tx_gnt    (tx_gnt),
    .sym_valid (sym_valid),
    .sym_data  (sym_data),
    .slot_load (slot_load),
    .sending   (sending)
  );

  packet_receiver #(.NODES(NODES), .FLIT_W(FLIT_W), .DP_W(DP_W), .PKT_LEN(PKT_LEN),
                    .CODE_LEN(CODE_LEN), .FREE_W(FREE_W)) u_recv (
    .clk       (n_clk),
    .rst       (n_rst),
    .rx_open   (rx_open),
    .rx_src    (rx_src),
    .rx_ack    (rx_ack),
    .ch_valid  (ch_valid),
    .ch_chip   (ch_chip),
    .ch_sum    (ch_sum),
    .buf_free  (rxb_free),
    .buf_wr    (rxb_wr),
    .buf_data  (rxb_wdata),
    .receiving (receiving)
  );

  // The receiver only acknowledges with room for a whole packet.
  a_rx_room: assert property (@(posedge n_clk) disable iff (n_rst) rxb_wr |-> !rxb_full);

  initial assert (FIFO_DEPTH >= PKT_LEN + 1) else $error("a packet must fit in a buffer");
endmodule

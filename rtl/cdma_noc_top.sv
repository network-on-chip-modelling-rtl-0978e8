// cdma_noc_top: the complete CDMA network-on-chip, and beside it the
// three-user CDMA transmission model.
//
// NODES network nodes share one CDMA channel (cdma_transmitter). A node with a
// packet asks the network arbiter for its destination; the arbiter tells the
// destination which code to listen to, waits for its acknowledge, and grants
// the sender, which then sends the packet in the next free slots. Any number of
// senders transmit in the same slots to different receivers; senders aiming at
// the same receiver take turns. Each host has its own clock (host_clk[n]); the
// network runs on net_clk. The host ports of node n are valid/ready word
// streams (see node_if). The arbiter and channel activity is brought out for
// observation (active senders, receivers and the slot sync).
// The three-user transmission model (cdma_tx3_model) is independent of the
// network and has its own clock, reset and ports (m_*).
module cdma_noc_top
#(
  parameter int unsigned NODES      = cdma_noc_pkg::NODES,
  parameter int unsigned FLIT_W     = cdma_noc_pkg::FLIT_W,
  parameter int unsigned DP_W       = cdma_noc_pkg::DP_W,
  parameter int unsigned PKT_LEN    = cdma_noc_pkg::PKT_LEN,
  parameter int unsigned CODE_LEN   = cdma_noc_pkg::CODE_LEN,
  parameter int unsigned FIFO_DEPTH = cdma_noc_pkg::FIFO_DEPTH,
  parameter int unsigned ADDR_W     = $clog2(NODES)
) (
  input  logic                          net_clk,
  input  logic                          net_rst,
  input  logic [NODES-1:0]              host_clk,
  input  logic [NODES-1:0]              host_rst,
  // host transmit streams
  input  logic [NODES-1:0]              h_tx_valid,
  output logic [NODES-1:0]              h_tx_ready,
  input  logic [NODES-1:0][ADDR_W-1:0]  h_tx_dest,
  input  logic [NODES-1:0][FLIT_W-1:0]  h_tx_data,
  input  logic [NODES-1:0]              h_tx_last,
  // host receive streams
  output logic [NODES-1:0]              h_rx_valid,
  input  logic [NODES-1:0]              h_rx_ready,
  output logic [NODES-1:0][ADDR_W-1:0]  h_rx_src,
  output logic [NODES-1:0][7:0]         h_rx_seq,
  output logic [NODES-1:0][FLIT_W-1:0]  h_rx_data,
  output logic [NODES-1:0]              h_rx_last,
  // observation
  output logic                          slot_sync,
  output logic [NODES-1:0]              ch_active,   // senders on the channel this slot
  output logic [NODES-1:0]              node_sending,
  output logic [NODES-1:0]              node_receiving,
  output logic [NODES-1:0]              node_waiting, // requesting, not yet granted
  // three-user transmission model
  input  logic                          m_clk,
  input  logic                          m_rst,
  input  logic [2:0]                    m_msg,
  output logic [1:0]                    m_txout,
  output logic [2:0]                    m_cycle,
  output logic                          m_sync
);
  localparam int unsigned SUM_W = $clog2(NODES + 1);

  logic [NODES-1:0]              tx_req, tx_gnt, rx_open, rx_ack;
  logic [NODES-1:0][ADDR_W-1:0]  tx_dest, rx_src;
  logic [NODES-1:0]              sym_valid;
  logic [NODES-1:0][DP_W-1:0]    sym_data;
  logic                          slot_load, ch_valid;
  logic [$clog2(CODE_LEN)-1:0]   ch_chip;
  logic [DP_W-1:0][SUM_W-1:0]    ch_sum;

  for (genvar n = 0; n < NODES; n++) begin : g_node
    network_node #(
      .NODES(NODES), .FLIT_W(FLIT_W), .DP_W(DP_W), .PKT_LEN(PKT_LEN),
      .CODE_LEN(CODE_LEN), .FIFO_DEPTH(FIFO_DEPTH), .NODE_ID(n)
    ) u_node (
      .h_clk      (host_clk[n]),
      .h_rst      (host_rst[n]),
      .n_clk      (net_clk),
      .n_rst      (net_rst),
      .h_tx_valid (h_tx_valid[n]),
      .h_tx_ready (h_tx_ready[n]),
      .h_tx_dest  (h_tx_dest[n]),
      .h_tx_data  (h_tx_data[n]),
      .h_tx_last  (h_tx_last[n]),
      .h_rx_valid (h_rx_valid[n]),
      .h_rx_ready (h_rx_ready[n]),
      .h_rx_src   (h_rx_src[n]),
      .h_rx_seq   (h_rx_seq[n]),
      .h_rx_data  (h_rx_data[n]),
      .h_rx_last  (h_rx_last[n]),
      .tx_req     (tx_req[n]),
      .tx_dest    (tx_dest[n]),
      .tx_gnt     (tx_gnt[n]),
      .rx_open    (rx_open[n]),
      .rx_src     (rx_src[n]),
      .rx_ack     (rx_ack[n]),
      .sym_valid  (sym_valid[n]),
      .sym_data   (sym_data[n]),
      .slot_load  (slot_load),
      .ch_valid   (ch_valid),
      .ch_chip    (ch_chip),
      .ch_sum     (ch_sum),
      .sending    (node_sending[n]),
      .receiving  (node_receiving[n])
    );
  end

  network_arbiter #(.NODES(NODES)) u_arb (
    .clk     (net_clk),
    .rst     (net_rst),
    .tx_req  (tx_req),
    .tx_dest (tx_dest),
    .tx_gnt  (tx_gnt),
    .rx_open (rx_open),
    .rx_src  (rx_src),
    .rx_ack  (rx_ack)
  );

  cdma_transmitter #(.NODES(NODES), .DP_W(DP_W), .CODE_LEN(CODE_LEN)) u_tx (
    .clk       (net_clk),
    .rst       (net_rst),
    .sym_valid (sym_valid),
    .sym_data  (sym_data),
    .slot_load (slot_load),
    .sync      (slot_sync),
    .active    (ch_active),
    .ch_valid  (ch_valid),
    .ch_chip   (ch_chip),
    .ch_sum    (ch_sum)
  );

  always_comb node_waiting = tx_req & ~tx_gnt;

  cdma_tx3_model u_model (
    .clk   (m_clk),
    .rst   (m_rst),
    .msg   (m_msg),
    .txout (m_txout),
    .cycle (m_cycle),
    .sync  (m_sync)
  );
endmodule

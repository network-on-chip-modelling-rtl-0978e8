// node_if: the network node's interface to its functional host.
//
// Transmit side: the host hands over a message as a stream of FLIT_W-bit
// words (valid/ready), with the destination on every word and `last` on the
// final one. The Node IF cuts the stream into packets of up to PKT_LEN words,
// collecting them in a small packet store, then writes a header word (dest,
// own node number, word count, last-packet flag, packet number) followed by
// exactly PKT_LEN payload words, zero-padded, into the transmit packet buffer.
// The destination of a packet is that of its first word.
// Receive side: it reads packets from the receive packet buffer, decodes the
// header and hands the host the `len` valid words with the sending node, the
// packet number and an end-of-message mark; padding words are dropped.
// h_rx_data is the receive buffer's output word itself (the buffer reads
// first-word-fall-through), so it is not registered again here.
// Everything runs on the host clock. Splitting messages into numbered packets
// and rebuilding them follows the source; the header layout, fixed packet size
// and padding are this design's choice.
module node_if
#(
  parameter int unsigned NODES   = cdma_noc_pkg::NODES,
  parameter int unsigned FLIT_W  = cdma_noc_pkg::FLIT_W,
  parameter int unsigned PKT_LEN = cdma_noc_pkg::PKT_LEN,
  parameter int unsigned NODE_ID = 0,
  parameter int unsigned ADDR_W  = $clog2(NODES)
) (
  input  logic                clk,
  input  logic                rst,
  // host, transmit
  input  logic                h_tx_valid,
  output logic                h_tx_ready,
  input  logic [ADDR_W-1:0]   h_tx_dest,
  input  logic [FLIT_W-1:0]   h_tx_data,
  input  logic                h_tx_last,
  // host, receive
  output logic                h_rx_valid,
  input  logic                h_rx_ready,
  output logic [ADDR_W-1:0]   h_rx_src,
  output logic [7:0]          h_rx_seq,
  output logic [FLIT_W-1:0]   h_rx_data,
  output logic                h_rx_last,
  // transmit packet buffer, write side
  input  logic                txb_full,
  output logic                txb_wr,
  output logic [FLIT_W-1:0]   txb_data,
  // receive packet buffer, read side (first-word-fall-through)
  input  logic                rxb_empty,
  input  logic [FLIT_W-1:0]   rxb_data,
  output logic                rxb_rd
);
  localparam int unsigned CNT_W = $clog2(PKT_LEN + 2);

  // ---------------- transmit ----------------
  typedef enum logic [1:0] {T_COLLECT, T_HEADER, T_PAYLOAD} tstate_e;

  tstate_e                 tst;
  logic [FLIT_W-1:0]       store [PKT_LEN];
  // In T_COLLECT tcnt counts collected words (the header's len); in
  // T_PAYLOAD it counts payload words written, and plen holds the collected
  // count so the words after it go out as zero padding.
  logic [CNT_W-1:0]        tcnt;
  logic [CNT_W-1:0]        plen;
  logic [ADDR_W-1:0]       tdest;
  logic                    tlast;
  logic [7:0]              tseq;
  cdma_noc_pkg::hdr_t      thdr;

  always_comb begin
    h_tx_ready = (tst == T_COLLECT);
    thdr       = '0;
    thdr.dest  = 6'(tdest);
    thdr.src   = 4'(NODE_ID);
    thdr.len   = 4'(tcnt);
    thdr.last  = tlast;
    thdr.seq   = tseq;
    txb_wr     = !txb_full && (tst != T_COLLECT);
    txb_data   = '0;
    if (tst == T_HEADER) txb_data = FLIT_W'(thdr);
    else if (tst == T_PAYLOAD && tcnt < plen) txb_data = store[tcnt[$clog2(PKT_LEN)-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tst   <= T_COLLECT;
      tcnt  <= '0;
      plen  <= '0;
      tdest <= '0;
      tlast <= 1'b0;
      tseq  <= '0;
    end else begin
      unique case (tst)
        T_COLLECT: if (h_tx_valid) begin
          store[tcnt[$clog2(PKT_LEN)-1:0]] <= h_tx_data;
          if (tcnt == '0) tdest <= h_tx_dest;
          tlast <= h_tx_last;
          if (h_tx_last || tcnt == CNT_W'(PKT_LEN - 1)) tst <= T_HEADER;
          tcnt <= tcnt + 1'b1;
        end
        T_HEADER: if (!txb_full) begin
          plen <= tcnt;
          tcnt <= '0;
          tst  <= T_PAYLOAD;
        end
        T_PAYLOAD: if (!txb_full) begin
          if (tcnt == CNT_W'(PKT_LEN - 1)) begin
            tcnt <= '0;
            tst  <= T_COLLECT;
            tseq <= tlast ? 8'd0 : tseq + 8'd1;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        default: tst <= T_COLLECT;
      endcase
    end
  end

  // ---------------- receive ----------------
  logic             rhdr_v;   // a header has been read, payload follows
  cdma_noc_pkg::hdr_t rhdr;
  logic [CNT_W-1:0] rcnt;     // payload words read of this packet
  logic             rvalid_word;

  always_comb begin
    rvalid_word = rhdr_v && (int'(rcnt) < int'(rhdr.len));
    h_rx_valid  = !rxb_empty && rvalid_word;
    h_rx_data   = rxb_data;
    h_rx_src    = ADDR_W'(rhdr.src);
    h_rx_seq    = rhdr.seq;
    h_rx_last   = rhdr.last && (int'(rcnt) == int'(rhdr.len) - 1);
    // headers and padding are consumed without the host
    rxb_rd      = !rxb_empty && (!rhdr_v || !rvalid_word || h_rx_ready);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rhdr_v <= 1'b0;
      rhdr   <= '0;
      rcnt   <= '0;
    end else if (rxb_rd) begin
      if (!rhdr_v) begin
        rhdr   <= cdma_noc_pkg::hdr_t'(rxb_data);
        rhdr_v <= 1'b1;
        rcnt   <= '0;
      end else if (rcnt == CNT_W'(PKT_LEN - 1)) begin
        rhdr_v <= 1'b0;
      end else begin
        rcnt <= rcnt + 1'b1;
      end
    end
  end
endmodule

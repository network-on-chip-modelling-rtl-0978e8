// packet_sender: moves one packet at a time from the transmit packet buffer
// onto the CDMA channel.
//
// When the transmit buffer is not empty the sender fetches a whole packet
// (header word plus PKT_LEN payload words) into its packet register and takes
// the destination from the header. It raises tx_req with tx_dest to the
// network arbiter and waits for tx_gnt. Once granted it offers the packet to
// the CDMA transmitter one DP_W-bit symbol per slot, low bits of each word
// first, header first; a symbol is taken when slot_load is high. After the last
// symbol has been taken it waits one more slot, so the symbol has left the
// channel before its code can be heard by another receiver, then drops tx_req
// and waits for the grant to fall before fetching the next packet.
// With a grant in hand a packet always takes (PKT_LEN+1)*FLIT_W/DP_W slots:
// the transfer time does not depend on source, destination or other traffic.
// The fetch / address / permission / send order follows the source; the
// drain slot and the handshake details are this design's choice.
module packet_sender
#(
  parameter int unsigned NODES   = cdma_noc_pkg::NODES,
  parameter int unsigned FLIT_W  = cdma_noc_pkg::FLIT_W,
  parameter int unsigned DP_W    = cdma_noc_pkg::DP_W,
  parameter int unsigned PKT_LEN = cdma_noc_pkg::PKT_LEN,
  parameter int unsigned ADDR_W  = $clog2(NODES)
) (
  input  logic                clk,
  input  logic                rst,
  // transmit packet buffer, read side (first-word-fall-through)
  input  logic                buf_empty,
  input  logic [FLIT_W-1:0]   buf_data,
  output logic                buf_rd,
  // network arbiter
  output logic                tx_req,
  output logic [ADDR_W-1:0]   tx_dest,
  input  logic                tx_gnt,
  // CDMA transmitter
  output logic                sym_valid,
  output logic [DP_W-1:0]     sym_data,
  input  logic                slot_load,
  // status
  output logic                sending     // granted and sending
);
  localparam int unsigned WORDS = PKT_LEN + 1;
  localparam int unsigned SPW   = FLIT_W / DP_W;   // symbols per word
  localparam int unsigned NSYM  = WORDS * SPW;
  localparam int unsigned WI_W  = $clog2(WORDS + 1);
  localparam int unsigned SI_W  = $clog2(NSYM + 1);

  typedef enum logic [2:0] {S_FETCH, S_REQ, S_SEND, S_DRAIN, S_DONE} sstate_e;

  sstate_e                  st;
  logic [WORDS*FLIT_W-1:0]  pkt;     // word 0 (header) in the low bits
  logic [WI_W-1:0]          nwords;
  logic [SI_W-1:0]          nsym;
  cdma_noc_pkg::hdr_t       hdr;

  always_comb begin
    hdr       = cdma_noc_pkg::hdr_t'(pkt[FLIT_W-1:0]);
    buf_rd    = (st == S_FETCH) && !buf_empty;
    sym_valid = (st == S_SEND);
    sym_data  = pkt[DP_W-1:0];
    sending   = (st == S_SEND);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= S_FETCH;
      pkt     <= '0;
      nwords  <= '0;
      nsym    <= '0;
      tx_req  <= 1'b0;
      tx_dest <= '0;
    end else begin
      unique case (st)
        S_FETCH: if (!buf_empty) begin
          pkt[nwords*FLIT_W +: FLIT_W] <= buf_data;
          if (nwords == WI_W'(WORDS - 1)) begin
            nwords  <= '0;
            st      <= S_REQ;
          end else begin
            nwords <= nwords + 1'b1;
          end
        end
        S_REQ: begin
          tx_req  <= 1'b1;
          tx_dest <= ADDR_W'(hdr.dest);
          nsym    <= '0;
          if (tx_req && tx_gnt) st <= S_SEND;
        end
        S_SEND: if (slot_load) begin
          pkt  <= pkt >> DP_W;
          nsym <= nsym + 1'b1;
          if (nsym == SI_W'(NSYM - 1)) st <= S_DRAIN;
        end
        S_DRAIN: if (slot_load) begin
          tx_req <= 1'b0;
          st     <= S_DONE;
        end
        S_DONE: if (!tx_gnt) st <= S_FETCH;
        default: st <= S_FETCH;
      endcase
    end
  end

  initial assert (FLIT_W % DP_W == 0) else $error("DP_W must divide FLIT_W");
  a_send_needs_grant: assert property (@(posedge clk) disable iff (rst) sym_valid |-> tx_gnt);
endmodule

// network_arbiter: sets up every transfer between a sender and a receiver.
//
// Per destination node d the arbiter runs a four-phase exchange:
//   1. a sender raises tx_req with tx_dest = d;
//   2. the arbiter picks one requester and raises rx_open[d] with rx_src[d]
//      naming it, so the receiver can select that sender's spreading code;
//   3. the receiver answers rx_ack[d] once its code is set and it has room;
//   4. the arbiter raises tx_gnt to the sender, which sends its packet and
//      then drops tx_req; the arbiter drops tx_gnt and rx_open, and waits for
//      the receiver to drop rx_ack after it has stored the packet.
// Destinations are served independently, so transfers to different receivers
// run in parallel; requests for a busy receiver wait.
// Choice among the senders waiting for one receiver: first come, first served.
// An age matrix (older[i][j]: sender i asked before sender j) records the order
// in which requests arrived; only the senders that no other waiting sender
// precedes are eligible, and requests that arrived in the same cycle are
// separated by round robin, starting after that destination's last winner.
// A request takes part from the cycle after tx_req rises, once its arrival is
// recorded. The exchange, first-come-first-served and round robin follow the
// source; the age matrix, the four-phase return to idle and the timing are this
// design's choice. One cycle per phase step at least; all outputs registered.
module network_arbiter
#(
  parameter int unsigned NODES  = cdma_noc_pkg::NODES,
  parameter int unsigned ADDR_W = $clog2(NODES)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NODES-1:0]              tx_req,
  input  logic [NODES-1:0][ADDR_W-1:0]  tx_dest,
  output logic [NODES-1:0]              tx_gnt,
  output logic [NODES-1:0]              rx_open,
  output logic [NODES-1:0][ADDR_W-1:0]  rx_src,
  input  logic [NODES-1:0]              rx_ack
);
  typedef enum logic [1:0] {A_IDLE, A_NOTIFY, A_GRANT, A_RELEASE} astate_e;

  astate_e                    st    [NODES];
  logic [NODES-1:0][ADDR_W-1:0] owner;
  logic [NODES-1:0][ADDR_W-1:0] last_win;
  logic [NODES-1:0]           busy_tx;   // sender already owns a destination
  logic [NODES-1:0]           seen;      // arrival of tx_req recorded
  logic [NODES-1:0][NODES-1:0] older, older_nxt;  // [i][j]: i asked before j

  // Round-robin pick among requesters of destination d.
  function automatic logic [ADDR_W:0] pick(input logic [NODES-1:0] cand,
                                           input logic [ADDR_W-1:0] after);
    logic [ADDR_W:0] res;
    int unsigned     idx;
    res = '0;
    for (int k = NODES; k >= 1; k--) begin
      idx = (int'(after) + k) % NODES;
      if (cand[idx]) res = {1'b1, ADDR_W'(idx)};
    end
    return res;
  endfunction

  // Age matrix: a new request is younger than every request already waiting;
  // two requests arriving in the same cycle are of equal age.
  always_comb begin
    older_nxt = older;
    for (int i = 0; i < NODES; i++)
      if (tx_req[i] && !seen[i])
        for (int j = 0; j < NODES; j++) begin
          older_nxt[i][j] = 1'b0;
          older_nxt[j][i] = seen[j] && tx_req[j];
        end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      seen  <= '0;
      older <= '0;
    end else begin
      seen  <= tx_req;
      older <= older_nxt;
    end
  end

  always_comb begin
    busy_tx = '0;
    for (int d = 0; d < NODES; d++)
      if (st[d] != A_IDLE) busy_tx[owner[d]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d < NODES; d++) st[d] <= A_IDLE;
      owner    <= '0;
      last_win <= {NODES{ADDR_W'(NODES - 1)}};
      tx_gnt   <= '0;
      rx_open  <= '0;
      rx_src   <= '0;
    end else begin
      for (int d = 0; d < NODES; d++) begin
        logic [NODES-1:0] cand, elig;
        logic [ADDR_W:0]  win;
        for (int s = 0; s < NODES; s++)
          cand[s] = tx_req[s] && seen[s] && (tx_dest[s] == ADDR_W'(d)) && !busy_tx[s] && !tx_gnt[s];
        for (int s = 0; s < NODES; s++) begin
          elig[s] = cand[s];
          for (int j = 0; j < NODES; j++)
            if (cand[j] && older[j][s]) elig[s] = 1'b0;
        end
        win = pick(elig, last_win[d]);
        unique case (st[d])
          A_IDLE: if (win[ADDR_W] && !rx_ack[d]) begin
            st[d]       <= A_NOTIFY;
            owner[d]    <= win[ADDR_W-1:0];
            last_win[d] <= win[ADDR_W-1:0];
            rx_open[d]  <= 1'b1;
            rx_src[d]   <= win[ADDR_W-1:0];
          end
          A_NOTIFY: if (rx_ack[d]) begin
            st[d]            <= A_GRANT;
            tx_gnt[owner[d]] <= 1'b1;
          end
          A_GRANT: if (!tx_req[owner[d]]) begin
            st[d]            <= A_RELEASE;
            tx_gnt[owner[d]] <= 1'b0;
            rx_open[d]       <= 1'b0;
          end
          A_RELEASE: if (!rx_ack[d]) st[d] <= A_IDLE;
          default: st[d] <= A_IDLE;
        endcase
      end
    end
  end

  // A sender is never granted two destinations, and a grant implies an open
  // receiver.
  for (genvar d = 0; d < NODES; d++) begin : g_chk
    a_owner_single: assert property (@(posedge clk) disable iff (rst)
      (st[d] == A_GRANT) |-> tx_gnt[owner[d]] && rx_open[d]);
  end
endmodule

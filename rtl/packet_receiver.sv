// packet_receiver: takes one packet at a time off the CDMA channel and stores
// it in the receive packet buffer.
//
// While idle it waits for the network arbiter to open it (rx_open) for a
// sender (rx_src). When the receive buffer has room for a whole packet it
// selects that sender's spreading code and answers rx_ack. From the next slot
// boundary on, its cdma_decoder correlates every slot of the channel with the
// selected code. Slots in which the sender was silent decode as a tie and are
// skipped; every other slot yields DP_W data bits, which are gathered into
// FLIT_W-bit words (low bits first) and written to the buffer. After
// (PKT_LEN+1)*FLIT_W/DP_W symbols the packet is complete; the receiver then
// waits for rx_open to fall and drops rx_ack. Each decoded word is written one
// cycle after the slot that completes it. Waiting for the arbiter, selecting
// the code and decoding follow the source; the room check and the tie test are
// this design's choice.
module packet_receiver
#(
  parameter int unsigned NODES    = cdma_noc_pkg::NODES,
  parameter int unsigned FLIT_W   = cdma_noc_pkg::FLIT_W,
  parameter int unsigned DP_W     = cdma_noc_pkg::DP_W,
  parameter int unsigned PKT_LEN  = cdma_noc_pkg::PKT_LEN,
  parameter int unsigned CODE_LEN = cdma_noc_pkg::CODE_LEN,
  parameter int unsigned FREE_W   = 5,
  parameter int unsigned ADDR_W   = $clog2(NODES),
  parameter int unsigned SUM_W    = $clog2(NODES + 1)
) (
  input  logic                           clk,
  input  logic                           rst,
  // network arbiter
  input  logic                           rx_open,
  input  logic [ADDR_W-1:0]              rx_src,
  output logic                           rx_ack,
  // CDMA channel
  input  logic                           ch_valid,
  input  logic [$clog2(CODE_LEN)-1:0]    ch_chip,
  input  logic [DP_W-1:0][SUM_W-1:0]     ch_sum,
  // receive packet buffer, write side
  input  logic [FREE_W-1:0]              buf_free,
  output logic                           buf_wr,
  output logic [FLIT_W-1:0]              buf_data,
  // status
  output logic                           receiving
);
  localparam int unsigned WORDS = PKT_LEN + 1;
  localparam int unsigned SPW   = FLIT_W / DP_W;
  localparam int unsigned NSYM  = WORDS * SPW;
  localparam int unsigned SI_W  = $clog2(NSYM + 1);
  localparam int unsigned CW    = $clog2(CODE_LEN);

  typedef enum logic [1:0] {R_IDLE, R_RECV, R_DONE} rstate_e;

  rstate_e            st;
  logic [CW-1:0]      code_idx;
  logic               code_bit;
  logic               armed;
  logic               dec_in_valid, dec_valid, dec_present;
  logic [DP_W-1:0]    dec_bits;
  logic [FLIT_W-1:0]  word_sr;
  logic [SI_W-1:0]    nsym;

  spreading_code_gen #(.CODE_LEN(CODE_LEN)) u_code (
    .code_idx (code_idx),
    .chip     (ch_chip),
    .code_bit (code_bit)
  );

  // Decode only whole slots that begin after the code was selected.
  always_comb dec_in_valid = ch_valid && (st == R_RECV) && (armed || ch_chip == '0);

  cdma_decoder #(.LANES(DP_W), .SUM_W(SUM_W), .CODE_LEN(CODE_LEN), .NODES(NODES)) u_dec (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (dec_in_valid),
    .chip      (ch_chip),
    .sum       (ch_sum),
    .code_bit  (code_bit),
    .out_valid (dec_valid),
    .out_bits  (dec_bits),
    .present   (dec_present)
  );

  // next word: the new symbol enters at the top, earlier ones shift down
  logic [FLIT_W-1:0] word_nxt;
  if (SPW == 1) begin : g_one
    always_comb word_nxt = FLIT_W'(dec_bits);
  end else begin : g_many
    always_comb word_nxt = {dec_bits, word_sr[FLIT_W-1:DP_W]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= R_IDLE;
      code_idx <= '0;
      armed    <= 1'b0;
      rx_ack   <= 1'b0;
      word_sr  <= '0;
      nsym     <= '0;
      buf_wr   <= 1'b0;
      buf_data <= '0;
    end else begin
      buf_wr <= 1'b0;
      unique case (st)
        R_IDLE: if (rx_open && buf_free >= FREE_W'(WORDS)) begin
          code_idx <= cdma_noc_pkg::node_code(rx_src);
          rx_ack   <= 1'b1;
          armed    <= 1'b0;
          nsym     <= '0;
          st       <= R_RECV;
        end
        R_RECV: begin
          if (dec_in_valid) armed <= 1'b1;
          if (dec_valid && dec_present) begin
            word_sr <= word_nxt;
            nsym    <= nsym + 1'b1;
            if ((int'(nsym) % SPW) == SPW - 1) begin
              buf_wr   <= 1'b1;
              buf_data <= word_nxt;
            end
            if (nsym == SI_W'(NSYM - 1)) st <= R_DONE;
          end
        end
        R_DONE: if (!rx_open) begin
          rx_ack <= 1'b0;
          st     <= R_IDLE;
        end
        default: st <= R_IDLE;
      endcase
    end
  end

  always_comb receiving = (st == R_RECV);
endmodule

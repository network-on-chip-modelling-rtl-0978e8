// cdma_tx3_model: the three-user CDMA transmission model.
//
// A 3-bit message (value 0..7) is sent as three single-bit users. Each bit is
// spread by its own PN sequence and the three data chips are added, so the
// transmit output txout is 0..3 on two bits. The three PN sequences are the
// three stages of one 3-bit maximal-length LFSR (pn_sequence_gen), i.e. the same
// period-7 m-sequence at three phases. One message occupies PN_LEN = 7 chips;
// `cycle` counts the chip within the message and `sync` is 1 when it is 0.
// At the end of each message the PN generator is restarted from its seed and
// the next message is taken from `msg` (sampled when cycle is 0), so every
// message is spread by the same code chips. All outputs are registered: the
// chip with cycle = k of a message appears one clock after the counter is k.
// Three users, the 2-bit output, the chip counter and the sync output follow
// the source; the LFSR polynomial and the use of its stages as the three
// codes are this design's choice.
module cdma_tx3_model (
  input  logic       clk,
  input  logic       rst,     // synchronous, active high
  input  logic [2:0] msg,     // message, sampled at the start of each message
  output logic [1:0] txout,   // sum of the three data chips
  output logic [2:0] cycle,   // chip number within the message, 0..6
  output logic       sync     // 1 on the first chip of each message
);
  localparam int unsigned PN_LEN = 7;

  logic [2:0] cnt;
  logic [2:0] msg_q, msg_cur;
  logic [2:0] pn_state;
  logic       pn_bit;
  logic       restart;
  logic [2:0] chips;

  always_comb restart = (cnt == 3'(PN_LEN - 1));

  pn_sequence_gen #(.WIDTH(3), .TAPS(3'b110), .SEED(3'b001)) u_pn (
    .clk    (clk),
    .rst    (rst),
    .load   (restart),
    .en     (1'b1),
    .pn_bit (pn_bit),
    .state  (pn_state)
  );

  always_comb begin
    msg_cur = (cnt == '0) ? msg : msg_q;
    chips   = msg_cur ^ {pn_bit, pn_state[1:0]};  // user i uses LFSR stage i
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      msg_q <= '0;
      txout <= '0;
      cycle <= '0;
      sync  <= 1'b0;
    end else begin
      cnt   <= restart ? '0 : cnt + 3'd1;
      if (cnt == '0) msg_q <= msg;
      txout <= 2'(chips[0]) + 2'(chips[1]) + 2'(chips[2]);
      cycle <= cnt;
      sync  <= (cnt == '0);
    end
  end
endmodule

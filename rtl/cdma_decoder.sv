// cdma_decoder: digital CDMA decoder (accumulate and compare).
//
// For each lane the received channel sum of every chip goes into the positive
// accumulator when the chip of the selected code is 0 and into the negative
// accumulator when it is 1. After the last chip of a symbol the two are
// compared: positive greater gives data bit 1, negative greater gives 0. With
// balanced orthogonal codes every other sender adds equally to both
// accumulators, so the comparison recovers the selected sender's bit. If the
// selected sender sent nothing in the symbol, the two accumulators are equal on
// every lane; lane 0 flags that as `present`=0 (this in-band test of a tie is
// this design's choice). The accumulate/compare structure follows the source.
//
// Timing: the chip with position 0 starts a symbol; in the cycle after chip
// CODE_LEN-1 is accepted, out_valid pulses for one cycle with out_bits and
// present. Chips arrive with in_valid; the code chip must match `chip`.
module cdma_decoder #(
  parameter int unsigned LANES    = 32,
  parameter int unsigned SUM_W    = 3,
  parameter int unsigned CODE_LEN = 8,
  parameter int unsigned NODES    = 6
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           in_valid,  // a chip is on `sum`
  input  logic [$clog2(CODE_LEN)-1:0]    chip,      // its position in the symbol
  input  logic [LANES-1:0][SUM_W-1:0]    sum,       // channel sums
  input  logic                           code_bit,  // selected code's chip
  output logic                           out_valid, // symbol decoded
  output logic [LANES-1:0]               out_bits,
  output logic                           present    // selected sender was active
);
  localparam int unsigned ACC_W = $clog2(NODES * CODE_LEN + 1);

  logic [LANES-1:0][ACC_W-1:0] pos_acc, neg_acc;
  logic [LANES-1:0][ACC_W-1:0] pos_nxt, neg_nxt;
  logic                        first, last;

  always_comb begin
    first = (chip == '0);
    last  = (chip == ($clog2(CODE_LEN))'(CODE_LEN - 1));
    for (int l = 0; l < LANES; l++) begin
      pos_nxt[l] = first ? '0 : pos_acc[l];
      neg_nxt[l] = first ? '0 : neg_acc[l];
      if (code_bit) neg_nxt[l] = neg_nxt[l] + ACC_W'(sum[l]);
      else          pos_nxt[l] = pos_nxt[l] + ACC_W'(sum[l]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos_acc   <= '0;
      neg_acc   <= '0;
      out_valid <= 1'b0;
      out_bits  <= '0;
      present   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        pos_acc <= pos_nxt;
        neg_acc <= neg_nxt;
        if (last) begin
          out_valid <= 1'b1;
          for (int l = 0; l < LANES; l++) out_bits[l] <= pos_nxt[l] > neg_nxt[l];
          present <= pos_nxt[0] != neg_nxt[0];
        end
      end
    end
  end
endmodule

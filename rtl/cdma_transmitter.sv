// cdma_transmitter: the shared CDMA channel of the network (bit-synchronous).
//
// A free-running chip counter divides time into symbol slots of CODE_LEN chips;
// `sync` is high while the counter is 0. Every node that wants to send offers
// one DP_W-bit symbol (sym_valid/sym_data). All offers are taken together in
// the last chip of a slot (`slot_load`), so every sender starts on the same slot
// boundary: a node that asks in the middle of a slot waits for the next one,
// while the senders already running carry on. During the slot each taken
// symbol is spread with its node's code and all are added lane by lane
// (cdma_encoder). The sums leave on ch_sum one cycle later, tagged with their
// chip position (ch_chip) and ch_valid.
//
// Node n uses code row n+1 (transmitter-based code assignment: one fixed code
// per sender). The source builds this block as clockless logic; here it is
// synchronous to the network clock, which is this design's choice.
module cdma_transmitter
#(
  parameter int unsigned NODES    = cdma_noc_pkg::NODES,
  parameter int unsigned DP_W     = cdma_noc_pkg::DP_W,
  parameter int unsigned CODE_LEN = cdma_noc_pkg::CODE_LEN,
  parameter int unsigned SUM_W    = $clog2(NODES + 1)
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic [NODES-1:0]               sym_valid,  // node offers a symbol
  input  logic [NODES-1:0][DP_W-1:0]     sym_data,
  output logic                           slot_load,  // offers are taken this cycle
  output logic                           sync,       // first chip of a slot
  output logic [NODES-1:0]               active,     // nodes sending in this slot
  output logic                           ch_valid,
  output logic [$clog2(CODE_LEN)-1:0]    ch_chip,
  output logic [DP_W-1:0][SUM_W-1:0]     ch_sum
);
  localparam int unsigned CW = $clog2(CODE_LEN);

  logic [CW-1:0]               chip;
  logic [NODES-1:0][DP_W-1:0]  data_q;
  logic [NODES-1:0]            code_bit;
  logic [DP_W-1:0][SUM_W-1:0]  sum;

  always_comb begin
    slot_load = (chip == CW'(CODE_LEN - 1));
    sync      = (chip == '0);
  end

  for (genvar n = 0; n < NODES; n++) begin : g_code
    spreading_code_gen #(.CODE_LEN(CODE_LEN)) u_code (
      .code_idx (CW'(n + 1)),
      .chip     (chip),
      .code_bit (code_bit[n])
    );
  end

  cdma_encoder #(.NODES(NODES), .LANES(DP_W), .SUM_W(SUM_W)) u_enc (
    .active   (active),
    .data     (data_q),
    .code_bit (code_bit),
    .sum      (sum)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      chip     <= '0;
      active   <= '0;
      data_q   <= '0;
      ch_valid <= 1'b0;
      ch_chip  <= '0;
      ch_sum   <= '0;
    end else begin
      chip     <= slot_load ? '0 : chip + CW'(1);
      if (slot_load) begin
        active <= sym_valid;
        for (int n = 0; n < NODES; n++)
          data_q[n] <= sym_valid[n] ? sym_data[n] : '0;
      end
      ch_valid <= 1'b1;
      ch_chip  <= chip;
      ch_sum   <= sum;
    end
  end

  initial assert (NODES < CODE_LEN) else $error("need one non-zero code row per node");
endmodule

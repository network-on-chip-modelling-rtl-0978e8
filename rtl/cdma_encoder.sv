// cdma_encoder: digital CDMA encoder for one chip period.
//
// Each sending node's LANES data bits are spread by XOR with the current chip
// of that node's code; a node that is not sending contributes nothing. The
// data chips of all NODES senders are then added lane by lane, giving one
// multi-level sum per lane (0..NODES) that is sent on the channel as a binary
// number of SUM_W bits. This is the XOR-then-add scheme of the source; the
// inputs are taken per chip, so the caller steps the chip position.
// Purely combinational.
module cdma_encoder #(
  parameter int unsigned NODES = 6,
  parameter int unsigned LANES = 32,
  parameter int unsigned SUM_W = $clog2(NODES + 1)
) (
  input  logic [NODES-1:0]            active,    // node is sending this symbol
  input  logic [NODES-1:0][LANES-1:0] data,      // symbol bits of each node
  input  logic [NODES-1:0]            code_bit,  // each node's current code chip
  output logic [LANES-1:0][SUM_W-1:0] sum        // channel value per lane
);
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      sum[l] = '0;
      for (int n = 0; n < NODES; n++)
        if (active[n])
          sum[l] = sum[l] + SUM_W'(data[n][l] ^ code_bit[n]);
    end
  end
endmodule

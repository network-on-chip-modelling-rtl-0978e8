// async_fifo: dual-clock first-in first-out buffer (the packet buffers).
//
// Used twice in every network node: the transmit packet buffer carries words
// from the host clock domain into the network clock domain, and the receive
// packet buffer carries them back. This is what makes the network globally
// asynchronous and locally synchronous: each host runs on its own clock.
// Read and write pointers are kept in Gray code and passed to the other side
// through two-flop synchronizers, so `full`, `wr_free` and `empty` are
// pessimistic for a few cycles after the other side moves. The read side is
// first-word-fall-through: rd_data shows the oldest word whenever !empty, and
// rd_en pops it. A write when full or a read when empty is ignored (and
// flagged by an assertion). The source asks for an asynchronous FIFO; the Gray
// pointer scheme and the depth are this design's choice. DEPTH is a power of 2.
module async_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                      wclk,
  input  logic                      wrst,
  input  logic                      wr_en,
  input  logic [W-1:0]              wr_data,
  output logic                      full,
  output logic [$clog2(DEPTH):0]    wr_free,  // free entries, as seen by the writer
  input  logic                      rclk,
  input  logic                      rrst,
  input  logic                      rd_en,
  output logic [W-1:0]              rd_data,
  output logic                      empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]  rbin_w;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---- write side ----
  always_comb begin
    rbin_w  = gray2bin(rgray_w2);
    wr_free = (AW+1)'(DEPTH) - (wbin - rbin_w);
    full    = (wr_free == '0);
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk)
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;

  // ---- read side ----
  always_comb begin
    empty   = (rgray == wgray_r2);
    rd_data = mem[rbin[AW-1:0]];
  end

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  a_no_overflow:  assert property (@(posedge wclk) disable iff (wrst) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge rclk) disable iff (rrst) rd_en |-> !empty);

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0) else $error("DEPTH must be a power of 2");
endmodule

// tb_cdma_tx3_model: sends 3-bit messages (all eight values, then random ones)
// through the three-user transmission model. For every chip it checks the chip
// counter (0..6 repeating), the sync output (1 only on chip 0) and the 2-bit
// output against a sum computed here from the hand-derived LFSR states; then
// it decodes each message back by positive/negative accumulation with each
// user's PN phase. Also checks the rate: one message every 7 clocks.
module tb_cdma_tx3_model;
  logic clk = 0, rst;
  logic [2:0] msg, cycle;
  logic [1:0] txout;
  logic sync;
  int checks = 0, failures = 0;
  // LFSR state at chip k of every message (seed 001, x^3+x^2+1); user u uses bit u
  logic [2:0] st [7] = '{3'b001, 3'b010, 3'b101, 3'b011, 3'b111, 3'b110, 3'b100};

  cdma_tx3_model dut (.clk, .rst, .msg, .txout, .cycle, .sync);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam int NMSG = 200;
    logic [2:0] m [NMSG];
    int pos [3], neg [3];
    int e;
    longint t0;
    for (int k = 0; k < NMSG; k++) m[k] = 3'(k < 8 ? k : $urandom);
    rst = 1; msg = m[0];
    @(posedge clk); @(posedge clk); #1 rst = 0;
    @(posedge clk); #1;           // the first message is sampled on this edge
    t0 = $time;
    for (int k = 0; k < NMSG; k++) begin
      for (int c = 0; c < 7; c++) begin
        check(cycle == 3'(c), $sformatf("msg %0d cycle %0d got %0d", k, c, cycle));
        check(sync == (c == 0), "sync only on chip 0");
        e = 0;
        for (int u = 0; u < 3; u++) e += int'(m[k][u] ^ st[c][u]);
        check(int'(txout) == e, $sformatf("msg %0d chip %0d txout %0d exp %0d", k, c, txout, e));
        for (int u = 0; u < 3; u++) begin
          if (c == 0) begin pos[u] = 0; neg[u] = 0; end
          if (st[c][u]) neg[u] += int'(txout); else pos[u] += int'(txout);
        end
        if (c == 6 && k + 1 < NMSG) msg = m[k+1];
        @(posedge clk); #1;
      end
      for (int u = 0; u < 3; u++)
        check((pos[u] > neg[u]) == m[k][u], $sformatf("decode msg %0d user %0d", k, u));
    end
    check(($time - t0) == NMSG * 7 * 10, "one message per 7 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

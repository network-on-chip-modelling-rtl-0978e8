// tb_pn_sequence_gen: runs the default 3-bit LFSR and compares its state and
// output with the expected period-7 walk 001,010,101,011,111,110,100 (worked
// out by hand for x^3+x^2+1), checks the period, the 4-ones/3-zeros balance of
// the m-sequence, that `en` low holds the state and that `load` restarts it.
module tb_pn_sequence_gen;
  logic clk = 0, rst, load, en, pn_bit;
  logic [2:0] state;
  int checks = 0, failures = 0;
  logic [2:0] exp_seq [7] = '{3'b001, 3'b010, 3'b101, 3'b011, 3'b111, 3'b110, 3'b100};

  pn_sequence_gen dut (.clk, .rst, .load, .en, .pn_bit, .state);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    rst = 1; load = 0; en = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    en = 1;
    ones = 0;
    for (int i = 0; i < 21; i++) begin
      check(state == exp_seq[i % 7], $sformatf("state step %0d: %b", i, state));
      check(pn_bit == exp_seq[i % 7][2], "pn_bit is MSB");
      if (i < 7) ones += int'(pn_bit);
      @(posedge clk); #1;
    end
    check(ones == 4, "m-sequence has 4 ones in 7");
    // hold
    en = 0;
    for (int i = 0; i < 3; i++) begin
      logic [2:0] s0; s0 = state;
      @(posedge clk); #1;
      check(state == s0, "hold when en=0");
    end
    // load restarts
    en = 1; load = 1; @(posedge clk); #1; load = 0;
    check(state == 3'b001, "load restarts at seed");
    @(posedge clk); #1;
    check(state == 3'b010, "runs after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

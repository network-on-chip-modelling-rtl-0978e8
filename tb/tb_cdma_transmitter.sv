// tb_cdma_transmitter: six nodes offer random 8-bit symbols at random times and
// hold them until taken. Checks that offers are taken only at slot boundaries
// (slot_load exactly every 8 cycles, sync on the cycle after), that `active`
// shows the nodes taken, and that every chip's channel sum, one cycle later,
// equals the sum computed here from the taken symbols and the Walsh codes
// (row n+1 for node n, parity(row & chip)). Counts slots with 2+ senders.
module tb_cdma_transmitter;
  localparam int N = 6, DW = 8, L = 8, SW = 3;
  logic clk = 0, rst;
  logic [N-1:0] sym_valid, active;
  logic [N-1:0][DW-1:0] sym_data;
  logic slot_load, sync, ch_valid;
  logic [2:0] ch_chip;
  logic [DW-1:0][SW-1:0] ch_sum;
  int checks = 0, failures = 0;
  int multi = 0, loads = 0;

  cdma_transmitter #(.NODES(N), .DP_W(DW), .CODE_LEN(L)) dut (
    .clk, .rst, .sym_valid, .sym_data, .slot_load, .sync, .active, .ch_valid, .ch_chip, .ch_sum);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit wcode(int row, int j);
    return ^(row[2:0] & j[2:0]);
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor at the falling edge, where everything is stable. The tb keeps its
  // own chip phase (0 in the first cycle after reset) and its own copy of the
  // symbols on the channel; the sum computed in one cycle is checked in the next.
  logic [N-1:0]          cur_act;
  logic [N-1:0][DW-1:0]  cur_dat;
  int cyc = 0, exp_chip = -1, last_load = -1;
  int exp_sum [DW];

  always @(negedge clk) begin
    if (rst) begin
      cyc = 0; exp_chip = -1; cur_act = '0; cur_dat = '0;
    end else begin
      int phase;
      phase = cyc % L;
      check(sync == (phase == 0), $sformatf("sync at phase %0d", phase));
      check(slot_load == (phase == L - 1), $sformatf("slot_load at phase %0d", phase));
      check(active == cur_act, $sformatf("active %b exp %b", active, cur_act));
      if (exp_chip >= 0) begin
        check(ch_valid && int'(ch_chip) == exp_chip, $sformatf("chip tag %0d exp %0d", ch_chip, exp_chip));
        for (int l = 0; l < DW; l++)
          check(int'(ch_sum[l]) == exp_sum[l], $sformatf("sum chip %0d lane %0d: %0d exp %0d", exp_chip, l, ch_sum[l], exp_sum[l]));
      end
      exp_chip = phase;
      for (int l = 0; l < DW; l++) begin
        exp_sum[l] = 0;
        for (int n = 0; n < N; n++) if (cur_act[n]) exp_sum[l] += int'(cur_dat[n][l] ^ wcode(n + 1, phase));
      end
      if (phase == L - 1) begin
        cur_act = sym_valid;
        for (int n = 0; n < N; n++) cur_dat[n] = sym_valid[n] ? sym_data[n] : '0;
        if ($countones(sym_valid) >= 2) multi++;
        loads++;
      end
      cyc++;
    end
  end

  // node offers: raise at random, hold until taken
  logic [N-1:0][DW-1:0] off_q;
  always @(posedge clk) begin
    if (rst) begin
      sym_valid <= '0;
    end else begin
      for (int n = 0; n < N; n++) begin
        if (sym_valid[n] && slot_load) begin
          sym_valid[n] <= 1'b0;
        end else if (!sym_valid[n] && $urandom_range(0, 5) == 0) begin
          sym_valid[n] <= 1'b1;
          sym_data[n]  <= DW'($urandom);
        end
      end
    end
  end

  initial begin
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (4000) @(posedge clk);
    check(multi > 50, $sformatf("slots with several senders: %0d", multi));
    check(loads >= 499, "slots counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

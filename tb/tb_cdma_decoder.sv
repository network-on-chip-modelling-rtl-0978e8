// tb_cdma_decoder: builds the channel here from six senders with Walsh codes
// (row n+1 for sender n, computed here as parity(row & chip)), random data and
// random activity, feeds it to one decoder per sender and checks each decoded
// symbol and its `present` flag. Also checks the decode latency: out_valid one
// cycle after the last chip.
module tb_cdma_decoder;
  localparam int N = 6, LN = 8, SW = 3, L = 8;
  logic clk = 0, rst;
  logic in_valid;
  logic [2:0] chip;
  logic [LN-1:0][SW-1:0] sum;
  logic [N-1:0] code_bit, out_valid, present;
  logic [N-1:0][LN-1:0] out_bits;
  int checks = 0, failures = 0;

  for (genvar n = 0; n < N; n++) begin : g_dec
    cdma_decoder #(.LANES(LN), .SUM_W(SW), .CODE_LEN(L), .NODES(N)) dut (
      .clk, .rst, .in_valid, .chip, .sum, .code_bit(code_bit[n]),
      .out_valid(out_valid[n]), .out_bits(out_bits[n]), .present(present[n]));
  end

  always #5 clk = ~clk;

  function automatic bit wcode(int row, int j);
    return ^(row[2:0] & j[2:0]);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] act;
    logic [N-1:0][LN-1:0] d;
    rst = 1; in_valid = 0; chip = 0; sum = '0; code_bit = '0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int s = 0; s < 300; s++) begin
      act = N'($urandom);
      for (int n = 0; n < N; n++) d[n] = LN'($urandom);
      for (int j = 0; j < L; j++) begin
        in_valid = 1; chip = 3'(j);
        for (int n = 0; n < N; n++) code_bit[n] = wcode(n + 1, j);
        for (int l = 0; l < LN; l++) begin
          int e; e = 0;
          for (int n = 0; n < N; n++) if (act[n]) e += int'(d[n][l] ^ wcode(n + 1, j));
          sum[l] = SW'(e);
        end
        @(posedge clk); #1;
        if (j < L - 1) check(out_valid == '0, "no output mid-symbol");
      end
      in_valid = 0;
      check(out_valid == '1, "output one cycle after last chip");
      for (int n = 0; n < N; n++) begin
        check(present[n] == act[n], $sformatf("sym %0d node %0d present", s, n));
        if (act[n]) check(out_bits[n] == d[n], $sformatf("sym %0d node %0d data %h/%h", s, n, out_bits[n], d[n]));
      end
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end  // idle gap
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

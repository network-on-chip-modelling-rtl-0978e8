// tb_cdma_noc_widths: the whole network at the narrower data path widths
// (1, 8 and 16 bits) next to the default 32 bits of tb_cdma_noc_top. Three
// independent copies of the design run at once, each with random traffic and
// its own scoreboard (tb_noc_width_run); a narrower path takes proportionally
// more slots per packet, which each run checks. The counts are summed here.
module tb_cdma_noc_widths;
  logic d1, d8, d16;
  int c1, c8, c16, f1, f8, f16;
  int checks, failures;

  tb_noc_width_run #(.DP_W(1),  .NMSG(3)) r1  (.done(d1),  .checks(c1),  .failures(f1));
  tb_noc_width_run #(.DP_W(8),  .NMSG(8)) r8  (.done(d8),  .checks(c8),  .failures(f8));
  tb_noc_width_run #(.DP_W(16), .NMSG(8)) r16 (.done(d16), .checks(c16), .failures(f16));

  initial begin
    #2ms;         // a normal run ends after about 150 us
    $display("watchdog: done %0d %0d %0d", d1, d8, d16);
    checks = c1 + c8 + c16;
    failures = f1 + f8 + f16 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d1 && d8 && d16);
    checks = c1 + c8 + c16;
    failures = f1 + f8 + f16;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

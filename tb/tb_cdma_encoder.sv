// tb_cdma_encoder: checks the worked two-sender example (data 1 with code
// 00110011 plus data 0 with code 01011010 gives 1,2,0,1,2,1,1,0), then random
// data, codes and active masks for six senders against a sum computed here.
module tb_cdma_encoder;
  localparam int N = 6, LN = 4, SW = 3;
  logic [N-1:0]          active, code_bit;
  logic [N-1:0][LN-1:0]  data;
  logic [LN-1:0][SW-1:0] sum;
  int checks = 0, failures = 0;

  cdma_encoder #(.NODES(N), .LANES(LN), .SUM_W(SW)) dut (.active, .data, .code_bit, .sum);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] c1 = 8'b00110011, c2 = 8'b01011010;
    int exp_ex [8] = '{1, 2, 0, 1, 2, 1, 1, 0};
    // worked example on lane 0: node 0 sends 1, node 1 sends 0
    active = 6'b000011;
    data   = '0;
    data[0][0] = 1'b1;
    for (int j = 0; j < 8; j++) begin
      code_bit = '0;
      code_bit[0] = c1[7-j];
      code_bit[1] = c2[7-j];
      #1;
      check(int'(sum[0]) == exp_ex[j], $sformatf("example chip %0d: %0d", j, sum[0]));
    end
    for (int t = 0; t < 2000; t++) begin
      active   = N'($urandom);
      code_bit = N'($urandom);
      for (int n = 0; n < N; n++) data[n] = LN'($urandom);
      #1;
      for (int l = 0; l < LN; l++) begin
        int e; e = 0;
        for (int n = 0; n < N; n++) if (active[n]) e += int'(data[n][l] != code_bit[n]);
        check(int'(sum[l]) == e, $sformatf("random t=%0d lane %0d", t, l));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spreading_code_gen: checks every chip of every code row against a
// Hadamard matrix built independently by the Sylvester doubling rule, checks
// the two 8-chip example codes (00110011, 01011010), and checks that rows
// 1..7 are balanced and pairwise orthogonal.
module tb_spreading_code_gen;
  localparam int L = 8;
  logic [2:0] code_idx, chip;
  logic       code_bit;
  int checks = 0, failures = 0;
  bit h [L][L];
  bit got [L][L];
  logic [7:0] c_a = 8'b00110011, c_b = 8'b01011010;

  spreading_code_gen #(.CODE_LEN(L)) dut (.code_idx, .chip, .code_bit);

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
    // Sylvester: H1 = [0]; H2n = [[H, H], [H, ~H]]
    h[0][0] = 0;
    for (int n = 1; n < L; n *= 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c+n]   = h[r][c];
          h[r+n][c]   = h[r][c];
          h[r+n][c+n] = !h[r][c];
        end
    for (int k = 0; k < L; k++)
      for (int j = 0; j < L; j++) begin
        code_idx = 3'(k); chip = 3'(j); #1;
        got[k][j] = code_bit;
        check(code_bit == h[k][j], $sformatf("row %0d chip %0d", k, j));
      end
    // example codes of the worked encoding example
    for (int j = 0; j < L; j++) begin
      check(got[2][j] == c_a[7-j], "example code 00110011");
      check(got[5][j] == c_b[7-j], "example code 01011010");
    end
    for (int a = 1; a < L; a++) begin
      int ones; ones = 0;
      for (int j = 0; j < L; j++) ones += int'(got[a][j]);
      check(ones == L/2, $sformatf("row %0d balanced", a));
      for (int b = a + 1; b < L; b++) begin
        int agree; agree = 0;
        for (int j = 0; j < L; j++) agree += int'(got[a][j] == got[b][j]);
        check(agree == L/2, $sformatf("rows %0d,%0d orthogonal", a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// spreading_code_gen: one chip of a balanced orthogonal spreading code.
//
// The chip of code row k at position j is the parity of (k AND j), which gives
// the rows of a Hadamard matrix of order CODE_LEN (a power of two) in 0/1 form.
// Every row except row 0 holds as many ones as zeros, and any two rows agree in
// exactly half of their chips, the properties the digital decoder relies on.
// The 8-chip codes 00110011 and 01011010 of the worked example are rows 2 and
// 5 of this set. The Hadamard construction itself is this design's choice; the
// source only asks for balanced, orthogonal binary codes. Purely combinational.
module spreading_code_gen #(
  parameter int unsigned CODE_LEN = 8
) (
  input  logic [$clog2(CODE_LEN)-1:0] code_idx,  // code row, 1..CODE_LEN-1 in use
  input  logic [$clog2(CODE_LEN)-1:0] chip,      // chip position, 0 first
  output logic                        code_bit   // chip value (MSB-first order)
);
  always_comb code_bit = ^(code_idx & chip);

  initial begin
    assert (CODE_LEN >= 2 && (CODE_LEN & (CODE_LEN - 1)) == 0)
      else $error("CODE_LEN must be a power of two");
  end
endmodule

// pn_sequence_gen: maximal-length pseudo-noise sequence generator.
//
// A Fibonacci linear feedback shift register of WIDTH bits whose feedback is
// the XOR of the tapped state bits (TAPS, bit i = stage i+1). With a primitive
// tap set the state walks through all 2^WIDTH-1 non-zero values, and the output
// (the MSB) is an m-sequence with one more one than zeros. `load` restarts the
// register from SEED; `en` advances it one chip. The default x^3+x^2+1 register
// (period 7) serves the three-user transmission model. Reset is synchronous.
module pn_sequence_gen #(
  parameter int unsigned     WIDTH = 3,
  parameter logic [WIDTH-1:0] TAPS = 3'b110,   // x^3 + x^2 + 1
  parameter logic [WIDTH-1:0] SEED = 3'b001
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,    // restart from SEED
  input  logic             en,      // advance one chip
  output logic             pn_bit,  // current chip
  output logic [WIDTH-1:0] state    // whole register, for taking shifted phases
);
  logic fb;
  always_comb fb = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (rst || load) state <= SEED;
    else if (en)     state <= {state[WIDTH-2:0], fb};
  end

  always_comb pn_bit = state[WIDTH-1];

  initial assert (SEED != '0) else $error("SEED must be non-zero");
endmodule

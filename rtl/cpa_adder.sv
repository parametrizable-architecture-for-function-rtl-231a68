// cpa_adder: the final carry-propagate adder of the evaluation path.
//
// Adds the two rows left by the reduction structure (sum and carry) into one
// W-bit two's-complement word, modulo 2^W. Purely combinational. The
// architecture only asks for an n-bit adder; a plain ripple/prefix choice is
// left to synthesis, which infers one adder from the '+' below.
module cpa_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  always_comb sum = a + b;
endmodule

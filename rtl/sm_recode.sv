// sm_recode: recodes the adder's two's-complement result into the
// sign-magnitude form that the operands use, ready to be fed back.
//
// The adder output s is a scaled value with F fraction bits (the table words'
// fraction). The sign is s's top bit; the "Complement" unit negates s, and a
// mux picks s or its complement so that the magnitude is |s|. The magnitude
// is then rounded to the nearest integer (half away from zero, by adding
// 2^(F-1) before dropping the F fraction bits) and cut to N bits. ovf flags a
// magnitude that does not fit in N bits. A zero magnitude always gets a
// positive sign. Purely combinational.
// Complement and mux follow the architecture; rounding, the canonical zero
// and the overflow flag are this design's choices.
module sm_recode #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 16,
  parameter int unsigned F = 8
) (
  input  logic [W-1:0] s,
  output logic         sign,
  output logic [N-1:0] mag,
  output logic         ovf
);
  logic         neg;
  logic [W-1:0] comp;
  logic [W-1:0] absval;
  logic [W-1:0] rounded;

  always_comb begin
    neg     = s[W-1];
    comp    = ~s + W'(1);
    absval  = neg ? comp : s;
    rounded = (F > 0) ? absval + (W'(1) << (F - 1)) : absval;
    mag     = rounded[F +: N];
    ovf     = (rounded >> (F + N)) != '0;
    sign    = neg && (mag != '0);
  end
endmodule

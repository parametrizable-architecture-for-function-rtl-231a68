// csa42: a row of 4:2 counters of width W.
//
// Four operands in, two out, with a + b + c + d == s + c_o modulo 2^W. Built
// in the usual way from two rows of 3:2 counters: the first adds a, b and c,
// the second adds its two outputs and d. Purely combinational. This is the
// 4:2 counter of the reduction structure; its construction from 3:2 counters
// is this design's choice.
module csa42 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] c_o
);
  logic [W-1:0] s1, c1;

  csa32 #(.W(W)) u_first  (.a(a),  .b(b),  .c(c), .s(s1), .c_o(c1));
  csa32 #(.W(W)) u_second (.a(s1), .b(c1), .c(d), .s(s),  .c_o(c_o));
endmodule

// csa32: a row of 3:2 counters (carry-save adder) of width W.
//
// Three operands in, two out, with a + b + c == s + c_o modulo 2^W. Each bit
// position is a full adder: the sum bit stays in place, the majority (carry)
// bit moves one position up. Purely combinational. Used by reduction_tree as
// the 3:2 counter that the reduction structure is built from.
module csa32 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] c_o
);
  logic [W-1:0] maj;

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a & b) | (a & c) | (b & c);
    c_o = {maj[W-2:0], 1'b0};
  end
endmodule

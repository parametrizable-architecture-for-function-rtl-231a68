// conv_lut: the Convolution-LUT, a writable table that replaces the two
// multiplications and the addition of one digit block of the recursion
// Psi' = alpha*Psi + beta*G.
//
// The address is {sign_own, sign_other, own_j, other_j}: the signs of the two
// operands and one K-bit digit block of each, 2K+2 bits in all, so the table
// holds 2^(2K+2) words of N bits (k=8, n=32: 2^18 words, 1 MiB). The word at
// that address is meant to hold the signed partial result
//   (sign_own ? -1 : 1)*alpha*own_j + (sign_other ? -1 : 1)*beta*other_j
// in two's complement with cbrm_pkg::lut_frac(N,K) fraction bits; for K=1 the
// four sign columns hold 0, +-beta, +-alpha, +-alpha+-beta. Since alpha and
// beta stay fixed for a whole calculation, the same words serve every block
// of both operands, and NR read ports let all of them be read at once (a
// multiport memory). Reads are combinational (asynchronous); the single write
// port is synchronous and is used to load the table for a new function
// before a calculation. The table has no reset and must be loaded before use.
// Table shape and contents follow the architecture; the write port, the
// asynchronous reads and the address bit order are this design's choices.
module conv_lut
  import cbrm_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned K  = K_DEFAULT,
  parameter int unsigned NR = 2 * (N_DEFAULT / K_DEFAULT),
  localparam int unsigned AW = lut_aw(K)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [N-1:0]  wdata,
  input  logic [AW-1:0] raddr [NR],
  output logic [N-1:0]  rdata [NR]
);
  logic [N-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int unsigned p = 0; p < NR; p++) rdata[p] = mem[raddr[p]];
  end
endmodule

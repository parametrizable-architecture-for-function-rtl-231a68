// cbrm_pkg: constants and elaboration-time helpers shared by the
// convolution-based recursive evaluation (CBRM) datapath.
//
// Numbers travel through the datapath in sign-magnitude form: one sign bit
// and an N-bit magnitude, split into T = N/K digit blocks of K bits. The
// Convolution-LUT returns, for one block, the signed partial result
// alpha*(+-Psi_j) + beta*(+-G_j) as an N-bit two's-complement word with
// lut_frac(N,K) fraction bits. The helpers below size the LUT address, the
// accumulation word and the counter tree that adds the T shifted partial
// results. Defaults N=32, K=8 are the rotation example's sizes; the number
// format (sign-magnitude operands, two's-complement table words, fraction
// bits) is this design's own choice.
package cbrm_pkg;

  // Rotation example sizes: n = 32 bits, k = 8 bits per block, t = 4.
  localparam int unsigned N_DEFAULT = 32;
  localparam int unsigned K_DEFAULT = 8;

  // How the T partial results of one evaluation are added:
  //   SCHEME_REDUCTION: all T table reads at once, a 4:2 / 3:2 counter tree
  //                     and one final adder; one evaluation per clock.
  //   SCHEME_SERIAL:    one table read per clock, accumulated by one adder;
  //                     T clocks per evaluation.
  typedef enum logic {
    SCHEME_REDUCTION = 1'b0,
    SCHEME_SERIAL    = 1'b1
  } scheme_e;

  // LUT address: sign of own operand, sign of the other operand, one K-bit
  // block of each operand.
  function automatic int unsigned lut_aw(int unsigned k);
    return 2 * k + 2;
  endfunction

  // Fraction bits kept in a table word. |alpha*a + beta*b| stays below
  // 2^(K+1) when |alpha| + |beta| <= 2, so K+1 integer bits and a sign bit
  // are reserved and the rest of the N-bit word is fraction.
  function automatic int unsigned lut_frac(int unsigned n, int unsigned k);
    return n - k - 2;
  endfunction

  // Width of the accumulation of T table words, word j shifted left by j*K.
  function automatic int unsigned acc_w(int unsigned n, int unsigned k);
    return n + (n / k - 1) * k + 2;
  endfunction

  // Rows left after one level of the counter tree: each group of four
  // becomes two (4:2 counter), a leftover three becomes two (3:2 counter),
  // one or two leftover rows pass through.
  function automatic int unsigned rows_next(int unsigned m);
    if (m <= 2) return m;
    return 2 * (m / 4) + ((m % 4 == 3) ? 2 : (m % 4));
  endfunction

  // Rows present at level l of a tree that starts with m rows.
  function automatic int unsigned rows_at(int unsigned m, int unsigned l);
    int unsigned r;
    r = m;
    for (int unsigned i = 0; i < l; i++) r = rows_next(r);
    return r;
  endfunction

  // Number of counter levels needed to bring m rows down to two.
  function automatic int unsigned tree_levels(int unsigned m);
    int unsigned r;
    int unsigned l;
    r = m;
    l = 0;
    while (r > 2) begin
      r = rows_next(r);
      l++;
    end
    return l;
  endfunction

endpackage

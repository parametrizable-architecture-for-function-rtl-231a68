// cbrm_datapath: evaluates one function of the CBRM recursion,
//   res = alpha*own + beta*(+-other),
// for sign-magnitude operands, using T = N/K reads of the Convolution-LUT.
//
// The N-bit magnitudes are cut into T blocks of K bits. Block j of both
// operands, with both signs, forms LUT address j (lut_addr[j]); the sign of
// the other operand is inverted first when neg_other is set, which makes the
// table's beta act as -beta (the x coordinate of a rotation). The T table
// words that come back (lut_data[j]) are sign-extended and shifted left by
// j*K, reduced to two rows by reduction_tree (4:2 / 3:2 counters), added by
// cpa_adder, and recoded to sign-magnitude by sm_recode, which drops the
// table's fraction bits with rounding. Purely combinational: the whole
// iteration is one path LUT -> counters -> adder -> recode.
// The block split, the counter reduction, the final adder and the recoding
// follow the architecture; neg_other and the rounding are this design's.
module cbrm_datapath
  import cbrm_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned K  = K_DEFAULT,
  localparam int unsigned T  = N / K,
  localparam int unsigned AW = lut_aw(K),
  localparam int unsigned W  = acc_w(N, K),
  localparam int unsigned F  = lut_frac(N, K)
) (
  input  logic          own_sign,
  input  logic [N-1:0]  own_mag,
  input  logic          oth_sign,
  input  logic [N-1:0]  oth_mag,
  input  logic          neg_other,
  output logic [AW-1:0] lut_addr [T],
  input  logic [N-1:0]  lut_data [T],
  output logic          res_sign,
  output logic [N-1:0]  res_mag,
  output logic          ovf
);
  logic [W-1:0] rows [T];
  logic [W-1:0] red_sum, red_carry, total;
  logic         oth_sign_eff;

  always_comb begin
    oth_sign_eff = oth_sign ^ neg_other;
    for (int unsigned j = 0; j < T; j++) begin
      lut_addr[j] = {own_sign, oth_sign_eff, own_mag[j*K +: K], oth_mag[j*K +: K]};
      rows[j]     = W'(signed'(lut_data[j])) << (j * K);
    end
  end

  reduction_tree #(.W(W), .M(T)) u_red (
    .rows(rows), .sum_o(red_sum), .carry_o(red_carry)
  );

  cpa_adder #(.W(W)) u_add (.a(red_sum), .b(red_carry), .sum(total));

  sm_recode #(.W(W), .N(N), .F(F)) u_rec (
    .s(total), .sign(res_sign), .mag(res_mag), .ovf(ovf)
  );
endmodule

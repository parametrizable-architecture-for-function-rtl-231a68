// cbrm_serial_datapath: evaluates one function of the CBRM recursion,
//   res = alpha*own + beta*(+-other),
// with the serial addition scheme: one Convolution-LUT read and one addition
// per clock, T = N/K clocks per evaluation.
//
// A launch pulse takes the sign-magnitude operands (and inverts the other
// operand's sign when neg_other is set, so the table's beta acts as -beta).
// In the launch clock the top K-bit block of both operands addresses the
// table; the operands are kept in shift registers that move one block up per
// clock, so the following clocks address the lower blocks in turn. The
// accumulator works from the most significant block down,
//   acc <= (acc << K) + table_word,
// which gives the sum of the blocks' partial results, block j weighted by
// 2^(j*K), with a single adder in a feedback loop. After T clocks res_valid
// rises and res_* show the accumulator recoded to sign-magnitude (rounded,
// table fraction bits dropped) by sm_recode; they stay until the next launch.
// A launch in the res_valid clock starts the next evaluation at once, so
// evaluations can follow each other every T clocks.
// The one-access-per-step loop around a single adder follows the serial
// scheme; the most-significant-first order, the shift registers and the
// launch/res_valid handshake are this design's choices.
module cbrm_serial_datapath
  import cbrm_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned K  = K_DEFAULT,
  localparam int unsigned T  = N / K,
  localparam int unsigned AW = lut_aw(K),
  localparam int unsigned W  = acc_w(N, K),
  localparam int unsigned F  = lut_frac(N, K),
  localparam int unsigned CW = (T > 1) ? $clog2(T) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          launch,
  input  logic          own_sign,
  input  logic [N-1:0]  own_mag,
  input  logic          oth_sign,
  input  logic [N-1:0]  oth_mag,
  input  logic          neg_other,
  output logic [AW-1:0] lut_addr,
  input  logic [N-1:0]  lut_data,
  output logic          busy,
  output logic          res_valid,
  output logic          res_sign,
  output logic [N-1:0]  res_mag,
  output logic          ovf
);
  logic          active;
  logic [CW-1:0] cnt;
  logic          own_s_q, oth_s_q;
  logic [N-1:0]  own_sh, oth_sh;
  logic [W-1:0]  acc, acc_in, word, sum;
  logic          cur_own_s, cur_oth_s;
  logic [K-1:0]  cur_own_blk, cur_oth_blk;

  always_comb begin
    cur_own_s   = launch ? own_sign               : own_s_q;
    cur_oth_s   = launch ? (oth_sign ^ neg_other) : oth_s_q;
    cur_own_blk = launch ? own_mag[N-1 -: K]      : own_sh[N-1 -: K];
    cur_oth_blk = launch ? oth_mag[N-1 -: K]      : oth_sh[N-1 -: K];
    lut_addr    = {cur_own_s, cur_oth_s, cur_own_blk, cur_oth_blk};
    acc_in      = launch ? '0 : (acc << K);
    word        = W'(signed'(lut_data));
    res_valid   = active && (cnt == '0);
    busy        = active && (cnt != '0);
  end

  cpa_adder #(.W(W)) u_add (.a(acc_in), .b(word), .sum(sum));

  sm_recode #(.W(W), .N(N), .F(F)) u_rec (
    .s(acc), .sign(res_sign), .mag(res_mag), .ovf(ovf)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active  <= 1'b0;
      cnt     <= '0;
      own_s_q <= 1'b0;
      oth_s_q <= 1'b0;
      own_sh  <= '0;
      oth_sh  <= '0;
      acc     <= '0;
    end else if (launch) begin
      active  <= 1'b1;
      cnt     <= CW'(T - 1);
      own_s_q <= own_sign;
      oth_s_q <= oth_sign ^ neg_other;
      own_sh  <= own_mag << K;
      oth_sh  <= oth_mag << K;
      acc     <= sum;
    end else if (busy) begin
      cnt     <= cnt - CW'(1);
      own_sh  <= own_sh << K;
      oth_sh  <= oth_sh << K;
      acc     <= sum;
    end
  end

  // A new evaluation may only start when the previous one has finished.
  a_no_launch_while_busy : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !launch);
endmodule

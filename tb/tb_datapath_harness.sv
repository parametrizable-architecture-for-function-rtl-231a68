// tb_datapath_harness: drives one cbrm_datapath of size (N, K) against a
// table model filled from alpha and beta, and compares every result with
// tb_cbrm_pkg::ref_eval. Runs ITER random evaluations (with and without
// neg_other, both operand signs, zero and all-ones blocks) and then raises
// finished. Used by tb_cbrm_datapath for several sizes.
module tb_datapath_harness
  import tb_cbrm_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned K = 4,
  parameter int ITER = 500,
  parameter real ALPHA = 0.8,
  parameter real BETA = 0.6
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned T  = N / K;
  localparam int unsigned AW = 2 * K + 2;

  logic          own_s, oth_s, neg;
  logic [N-1:0]  own_m, oth_m;
  logic [AW-1:0] addr [T];
  logic [N-1:0]  data [T];
  logic          res_s, ovf;
  logic [N-1:0]  res_m;
  logic [N-1:0]  table_q [2**AW];

  cbrm_datapath #(.N(N), .K(K)) dut (
    .own_sign(own_s), .own_mag(own_m), .oth_sign(oth_s), .oth_mag(oth_m),
    .neg_other(neg), .lut_addr(addr), .lut_data(data),
    .res_sign(res_s), .res_mag(res_m), .ovf(ovf)
  );

  always_comb for (int j = 0; j < T; j++) data[j] = table_q[addr[j]];

  function automatic logic [N-1:0] rnd_mag(int it);
    logic [N-1:0] m;
    m = N'({$urandom, $urandom});
    case (it % 5)
      0: m = '0;
      1: m = '1;
      2: m = m >> $urandom_range(N - 1);
      default: ;
    endcase
    return m;
  endfunction

  initial begin
    finished = 1'b0;
    checks = 0;
    failures = 0;
    for (longint unsigned a = 0; a < 2**AW; a++)
      table_q[a] = N'(lut_entry(ALPHA, BETA, N, K, a));
    for (int it = 0; it < ITER; it++) begin
      bit               ws, wo;
      longint unsigned  wm;
      own_s = 1'($urandom); oth_s = 1'($urandom); neg = 1'($urandom);
      own_m = rnd_mag(it); oth_m = rnd_mag(it / 5 + 3);
      #1;
      ref_eval(ALPHA, neg ? -BETA : BETA, N, K, own_s, 64'(own_m), oth_s, 64'(oth_m),
               ws, wm, wo);
      checks++;
      if (res_s !== ws || res_m !== N'(wm) || ovf !== wo) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d K=%0d own=%b/%h oth=%b/%h neg=%b: got %b/%h ovf=%b want %b/%h ovf=%b",
                   N, K, own_s, own_m, oth_s, oth_m, neg, res_s, res_m, ovf, ws, N'(wm), wo);
      end
      // address format: {own sign, effective other sign, own block, other block}
      for (int j = 0; j < T; j++) begin
        checks++;
        if (addr[j] !== {own_s, oth_s ^ neg, own_m[j*K +: K], oth_m[j*K +: K]}) failures++;
      end
    end
    finished = 1'b1;
  end
endmodule

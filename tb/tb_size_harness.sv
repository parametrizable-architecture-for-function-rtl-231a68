// tb_size_harness: runs one cbrm_rotation_unit of size (N, K) and addition
// scheme SCHEME through a rotation by pi/72 per point, 36 points from
// (2^(N-2), 0). The table is loaded from alpha = cos, beta = sin; every
// point is compared bit for bit with tb_cbrm_pkg::ref_eval, the point's
// clock is checked (1 clock per point for the reduction scheme, N/K for the
// serial one), and the largest absolute error against the exact rotation,
// scaled to radius 1, is returned.
module tb_size_harness
  import tb_cbrm_pkg::*;
  import cbrm_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned K = 4,
  parameter scheme_e SCHEME = SCHEME_REDUCTION
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output real  worst
);
  localparam int unsigned AW = 2 * K + 2;
  localparam int unsigned T  = N / K;
  localparam int unsigned PERIOD = (SCHEME == SCHEME_SERIAL) ? T : 1;
  localparam real PI = 3.14159265358979323846;
  localparam int ITERS = 36;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          lut_we;
  logic [AW-1:0] lut_waddr;
  logic [N-1:0]  lut_wdata;
  logic          start, rot_mode, g_const;
  logic [15:0]   num_iter;
  logic          psi0_sign, g0_sign;
  logic [N-1:0]  psi0_mag, g0_mag;
  logic          busy, out_valid, done, ovf;
  logic          psi_sign, g_sign;
  logic [N-1:0]  psi_mag, g_mag;

  cbrm_rotation_unit #(.N(N), .K(K), .SCHEME(SCHEME)) dut (
    .clk, .rst_n, .lut_we, .lut_waddr, .lut_wdata, .start, .num_iter, .rot_mode,
    .g_const, .psi0_sign, .psi0_mag, .g0_sign, .g0_mag, .busy, .out_valid, .done,
    .ovf, .psi_sign, .psi_mag, .g_sign, .g_mag
  );

  always #5 clk = ~clk;

  function automatic real sm_real(bit s, longint unsigned m);
    return s ? -real'(m) : real'(m);
  endfunction

  initial begin
    real             dth, alpha, beta, r;
    bit              ps, gs, ns, ngs, o1, o2;
    longint unsigned pm, gm, nm, ngm;
    finished = 1'b0; checks = 0; failures = 0; worst = 0.0;
    dth = PI / 72.0;
    alpha = $cos(dth);
    beta  = $sin(dth);
    r = 2.0 ** (N - 2);
    rst_n = 1'b0; lut_we = 1'b0; lut_waddr = '0; lut_wdata = '0;
    start = 1'b0; rot_mode = 1'b0; g_const = 1'b0; num_iter = '0;
    psi0_sign = 1'b0; psi0_mag = '0; g0_sign = 1'b0; g0_mag = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (longint unsigned a = 0; a < 2**AW; a++) begin
      @(posedge clk); #1;
      lut_we = 1'b1;
      lut_waddr = AW'(a);
      lut_wdata = N'(lut_entry(alpha, beta, N, K, a));
    end
    @(posedge clk); #1;
    lut_we = 1'b0;
    ps = 1'b0; pm = 64'd1 << (N - 2); gs = 1'b0; gm = 0;
    start = 1'b1; num_iter = 16'(ITERS); rot_mode = 1'b1;
    psi0_mag = N'(pm);
    for (int i = 1; i <= ITERS; i++) begin
      real e;
      // the reduction scheme shows point 1 after the start clock's edge and
      // then one point per clock; the serial scheme shows point i after edge
      // i*T counted from the start clock's edge
      for (int c = 0; c < ((SCHEME == SCHEME_SERIAL) ? ((i == 1) ? T + 1 : T) : 1); c++) begin
        if (c > 0) begin
          checks++;
          if (out_valid) failures++;
        end
        @(posedge clk); #1;
        start = 1'b0;
      end
      ref_eval(alpha, -beta, N, K, ps, pm, gs, gm, ns, nm, o1);
      ref_eval(alpha, beta, N, K, gs, gm, ps, pm, ngs, ngm, o2);
      ps = ns; pm = nm; gs = ngs; gm = ngm;
      checks++;
      if (!out_valid || ovf || done !== (i == ITERS) || psi_sign !== ps || psi_mag !== N'(pm)
          || g_sign !== gs || g_mag !== N'(gm)) begin
        failures++;
        if (failures < 5)
          $display("FAIL N=%0d K=%0d scheme %0d point %0d: got %b/%0d %b/%0d want %b/%0d %b/%0d",
                   N, K, SCHEME, i, psi_sign, psi_mag, g_sign, g_mag, ps, pm, gs, gm);
      end
      e = fabs(sm_real(psi_sign, 64'(psi_mag)) / r - $cos(i * dth));
      if (e > worst) worst = e;
      e = fabs(sm_real(g_sign, 64'(g_mag)) / r - $sin(i * dth));
      if (e > worst) worst = e;
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid || busy) failures++;
    finished = 1'b1;
  end
endmodule

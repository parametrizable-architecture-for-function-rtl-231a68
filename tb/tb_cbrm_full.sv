// tb_cbrm_full: the rotation unit at its default size (n=32, k=8, t=4, a
// 2^18-word table) running the rotation workloads: increments of pi/4,
// pi/72 and pi/360 per point, 36 points each from (R, 0) with R = 2^30
// standing for 1.0. For each increment the table is loaded for
// alpha = cos(dtheta), beta = sin(dtheta), the run is checked bit for bit
// against the reference model and for one point per clock, and the absolute
// error of the point after 12 and after 36 steps (against cos/sin of the exact
// angle, scaled to R = 1) is printed and must stay below 1e-6, which is under
// every entry of the published error table for this method
// (3.52e-6 ... 9.51e-5).
module tb_cbrm_full
  import tb_cbrm_pkg::*;
;
  localparam int unsigned N  = 32;
  localparam int unsigned K  = 8;
  localparam int unsigned AW = 2 * K + 2;
  localparam real PI = 3.14159265358979323846;
  localparam longint unsigned R = 64'd1 << 30;

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

  int checks = 0;
  int failures = 0;

  cbrm_rotation_unit dut (.*);

  always #5 clk = ~clk;

  function automatic real sm_real(bit s, longint unsigned m);
    return s ? -real'(m) : real'(m);
  endfunction

  task automatic workload(real dth, string name);
    real             alpha, beta, err12, err36;
    bit              ps, gs, ns, ngs, o1, o2;
    longint unsigned pm, gm, nm, ngm;
    alpha = $cos(dth);
    beta  = $sin(dth);
    for (longint unsigned a = 0; a < 2**AW; a++) begin
      @(posedge clk); #1;
      lut_we = 1'b1;
      lut_waddr = AW'(a);
      lut_wdata = N'(lut_entry(alpha, beta, N, K, a));
    end
    @(posedge clk); #1;
    lut_we = 1'b0;
    ps = 1'b0; pm = R; gs = 1'b0; gm = 0;
    start = 1'b1; num_iter = 16'd36; rot_mode = 1'b1;
    psi0_sign = 1'b0; psi0_mag = N'(R); g0_sign = 1'b0; g0_mag = '0;
    @(posedge clk); #1;
    start = 1'b0;
    err12 = 0.0; err36 = 0.0;
    for (int i = 1; i <= 36; i++) begin
      real ex, ey, e;
      ref_eval(alpha, -beta, N, K, ps, pm, gs, gm, ns, nm, o1);
      ref_eval(alpha, beta, N, K, gs, gm, ps, pm, ngs, ngm, o2);
      ps = ns; pm = nm; gs = ngs; gm = ngm;
      checks++;
      if (!out_valid || done !== (i == 36) || ovf) begin
        failures++;
        $display("FAIL %s: control at point %0d", name, i);
      end
      checks++;
      if (psi_sign !== ps || psi_mag !== N'(pm) || g_sign !== gs || g_mag !== N'(gm)) begin
        failures++;
        $display("FAIL %s point %0d: got %b/%0d %b/%0d want %b/%0d %b/%0d", name, i,
                 psi_sign, psi_mag, g_sign, g_mag, ps, pm, gs, gm);
      end
      ex = $cos(i * dth);
      ey = $sin(i * dth);
      e  = fabs(sm_real(psi_sign, psi_mag) / real'(R) - ex);
      if (fabs(sm_real(g_sign, g_mag) / real'(R) - ey) > e)
        e = fabs(sm_real(g_sign, g_mag) / real'(R) - ey);
      if (i == 12) err12 = e;
      if (i == 36) err36 = e;
      @(posedge clk); #1;
    end
    checks++;
    if (out_valid || busy) begin
      failures++;
      $display("FAIL %s: 36 points took more than 36 clocks", name);
    end
    $display("workload dtheta=%s: abs error I=12 %e, I=36 %e", name, err12, err36);
    checks++;
    if (err12 > 1.0e-6 || err36 > 1.0e-6) begin
      failures++;
      $display("FAIL %s: error above 1e-6", name);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; lut_we = 1'b0; lut_waddr = '0; lut_wdata = '0;
    start = 1'b0; rot_mode = 1'b0; num_iter = '0; g_const = 1'b0;
    psi0_sign = 1'b0; psi0_mag = '0; g0_sign = 1'b0; g0_mag = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    workload(PI / 4.0,   "pi/4");
    workload(PI / 72.0,  "pi/72");
    workload(PI / 360.0, "pi/360");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

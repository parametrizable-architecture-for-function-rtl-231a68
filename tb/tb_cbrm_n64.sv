// tb_cbrm_n64: the rotation unit built for 64-bit operands (N=64, K=8, t=8
// blocks, a 2^18 x 64-bit table), the wider of the two precisions the
// design is timed at. Rotates (R, 0), R = 2^62, by pi/72 per point for 36
// points and checks every point against R*cos / R*sin of the exact angle
// (absolute error scaled to R = 1 below 1e-12), one point per clock and done
// with the last. Table words come from double-precision arithmetic, so the
// check is against the exact rotation rather than bit for bit.
module tb_cbrm_n64
  import tb_cbrm_pkg::*;
;
  localparam int unsigned N  = 64;
  localparam int unsigned K  = 8;
  localparam int unsigned AW = 2 * K + 2;
  localparam real PI = 3.14159265358979323846;
  localparam real R = 2.0 ** 62;

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

  int  checks = 0;
  int  failures = 0;
  real worst = 0.0;

  cbrm_rotation_unit #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  function automatic real sm_real(bit s, logic [N-1:0] m);
    real v;
    v = real'(m[63:32]) * (2.0 ** 32) + real'(m[31:0]);
    return s ? -v : v;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real dth, alpha, beta;
    dth = PI / 72.0;
    alpha = $cos(dth);
    beta  = $sin(dth);
    rst_n = 1'b0; lut_we = 1'b0; lut_waddr = '0; lut_wdata = '0;
    start = 1'b0; rot_mode = 1'b0; num_iter = '0; g_const = 1'b0;
    psi0_sign = 1'b0; psi0_mag = '0; g0_sign = 1'b0; g0_mag = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (longint unsigned a = 0; a < 2**AW; a++) begin
      @(posedge clk); #1;
      lut_we = 1'b1;
      lut_waddr = AW'(a);
      lut_wdata = N'(lut_entry(alpha, beta, N, K, a));
    end
    @(posedge clk); #1;
    lut_we = 1'b0;
    start = 1'b1; num_iter = 16'd36; rot_mode = 1'b1;
    psi0_sign = 1'b0; psi0_mag = 64'd1 << 62; g0_sign = 1'b0; g0_mag = '0;
    @(posedge clk); #1;
    start = 1'b0;
    for (int i = 1; i <= 36; i++) begin
      real ex, ey;
      ex = fabs(sm_real(psi_sign, psi_mag) / R - $cos(i * dth));
      ey = fabs(sm_real(g_sign, g_mag) / R - $sin(i * dth));
      if (ex > worst) worst = ex;
      if (ey > worst) worst = ey;
      checks++;
      if (!out_valid || ovf || done !== (i == 36) || ex > 1.0e-12 || ey > 1.0e-12) begin
        failures++;
        $display("FAIL point %0d: valid=%b ovf=%b done=%b errors %e %e", i, out_valid, ovf,
                 done, ex, ey);
      end
      @(posedge clk); #1;
    end
    checks++;
    if (out_valid || busy) failures++;
    $display("n=64, dtheta=pi/72, 36 points: largest abs error %e", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

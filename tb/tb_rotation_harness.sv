// tb_rotation_harness: end-to-end run of one cbrm_rotation_unit at N=16,
// K=4 (t=4 blocks, 1024-word table) with the addition scheme SCHEME.
//
// Runs, each after loading the table for its alpha and beta through the load
// port:
//   1. a rotation by pi/8 per point (rot_mode=1) from (R, 0) for 20 points,
//      with a second start pulse during the run that must be ignored, then a
//      rotation from a point in the third quadrant;
//   2. the general recursion of eq. (6) (rot_mode=0) with alpha=0.5,
//      beta=0.25 from a point with a negative coordinate;
//   3. a growing recursion (alpha=1.2, beta=0.7) until the magnitude
//      overflows;
//   4. single-point runs (num_iter=1) and a num_iter=0 request that must do
//      nothing;
//   5. a constant auxiliary term (g_const=1): linear growth through zero
//      (alpha=1, beta=0.5) and geometric decay (alpha=0.75, beta=0).
// Every point is compared bit for bit with tb_cbrm_pkg::ref_eval, rotation
// points also with R*cos and R*sin within a rounding-error bound, and the
// timing is checked: the first point DELAY clocks after start, then one
// every PERIOD clocks (1 and 1 for the reduction scheme, T and T for the
// serial one), out_valid low in between, done with the last point. The
// harness counts how often each mechanism happened and reports the counts.
module tb_rotation_harness
  import tb_cbrm_pkg::*;
  import cbrm_pkg::*;
#(
  parameter scheme_e SCHEME = SCHEME_REDUCTION
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_init,
  output int   n_feedback,
  output int   n_negative,
  output int   n_rot,
  output int   n_general,
  output int   n_ovf,
  output int   n_ignored,
  output int   n_loads,
  output int   n_zero_req,
  output int   n_gconst
);
  localparam int unsigned N  = 16;
  localparam int unsigned K  = 4;
  localparam int unsigned IW = 16;
  localparam int unsigned AW = 2 * K + 2;
  localparam int unsigned T  = N / K;
  localparam int unsigned DELAY  = (SCHEME == SCHEME_SERIAL) ? T : 0;
  localparam int unsigned PERIOD = (SCHEME == SCHEME_SERIAL) ? T : 1;
  localparam real PI = 3.14159265358979323846;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          lut_we;
  logic [AW-1:0] lut_waddr;
  logic [N-1:0]  lut_wdata;
  logic          start, rot_mode, g_const;
  logic [IW-1:0] num_iter;
  logic          psi0_sign, g0_sign;
  logic [N-1:0]  psi0_mag, g0_mag;
  logic          busy, out_valid, done, ovf;
  logic          psi_sign, g_sign;
  logic [N-1:0]  psi_mag, g_mag;

  cbrm_rotation_unit #(.N(N), .K(K), .IW(IW), .SCHEME(SCHEME)) dut (
    .clk, .rst_n, .lut_we, .lut_waddr, .lut_wdata, .start, .num_iter, .rot_mode, .g_const,
    .psi0_sign, .psi0_mag, .g0_sign, .g0_mag, .busy, .out_valid, .done, .ovf,
    .psi_sign, .psi_mag, .g_sign, .g_mag
  );

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL (scheme %0d): %s", SCHEME, msg);
  endtask

  task automatic load_table(real alpha, real beta);
    for (longint unsigned a = 0; a < 2**AW; a++) begin
      @(posedge clk); #1;
      lut_we = 1'b1;
      lut_waddr = AW'(a);
      lut_wdata = N'(lut_entry(alpha, beta, N, K, a));
    end
    @(posedge clk); #1;
    lut_we = 1'b0;
    n_loads++;
  endtask

  function automatic real sm_real(bit s, longint unsigned m);
    return s ? -real'(m) : real'(m);
  endfunction

  // Starts a run and checks all its points. For a rotation the points are
  // also held against R*cos/R*sin of the accumulated angle.
  task automatic run(real alpha, real beta, bit rot, int iters,
                     bit s0, longint unsigned m0, bit t0, longint unsigned n0,
                     bit poke_start, bit is_rotation, real dtheta,
                     bit gc = 1'b0);
    bit              ps, gs, ns, ngs, o1, o2;
    longint unsigned pm, gm, nm, ngm;
    real             r, th0;
    int              cyc;
    ps = s0; pm = m0; gs = t0; gm = n0;
    r   = $sqrt(sm_real(s0, m0) ** 2 + sm_real(t0, n0) ** 2);
    th0 = $atan2(sm_real(t0, n0), sm_real(s0, m0));
    start = 1'b1; num_iter = IW'(iters); rot_mode = rot; g_const = gc;
    psi0_sign = s0; psi0_mag = N'(m0); g0_sign = t0; g0_mag = N'(n0);
    @(posedge clk); #1;
    start = 1'b0;
    psi0_mag = '0; g0_mag = '0;   // must no longer matter
    g_const = 1'b0;   // sampled with start only
    n_init++;
    if (gc) n_gconst++;
    if (rot) n_rot++; else n_general++;
    cyc = 0;
    for (int i = 1; i <= iters; i++) begin
      // wait for the point, with out_valid low until then
      while (cyc < DELAY + (i - 1) * PERIOD) begin
        checks++;
        if (out_valid) fail($sformatf("out_valid early before point %0d", i));
        @(posedge clk); #1;
        start = 1'b0;
        cyc++;
      end
      ref_eval(alpha, rot ? -beta : beta, N, K, ps, pm, gs, gm, ns, nm, o1);
      ref_eval(alpha, beta, N, K, gs, gm, ps, pm, ngs, ngm, o2);
      ps = ns; pm = nm;
      if (!gc) begin
        gs = ngs; gm = ngm;
      end else begin
        o2 = 1'b0;
      end
      checks++;
      if (!out_valid) fail($sformatf("no out_valid at point %0d", i));
      checks++;
      if (psi_sign !== ps || psi_mag !== N'(pm) || g_sign !== gs || g_mag !== N'(gm))
        fail($sformatf("point %0d: got %b/%0d %b/%0d want %b/%0d %b/%0d", i,
                       psi_sign, psi_mag, g_sign, g_mag, ps, pm, gs, gm));
      checks++;
      if (ovf !== (o1 | o2)) fail($sformatf("ovf at point %0d", i));
      checks++;
      if (done !== (i == iters)) fail($sformatf("done at point %0d", i));
      if (is_rotation) begin
        real ex, ey, tol;
        ex  = r * $cos(th0 + i * dtheta);
        ey  = r * $sin(th0 + i * dtheta);
        tol = 4.0 * i + 4.0;
        checks++;
        if (fabs(sm_real(psi_sign, psi_mag) - ex) > tol || fabs(sm_real(g_sign, g_mag) - ey) > tol)
          fail($sformatf("rotation point %0d off: (%0d,%0d) vs (%f,%f)", i,
                         psi_mag, g_mag, ex, ey));
      end
      if (psi_sign || g_sign) n_negative++;
      if (ovf) n_ovf++;
      if (i > 1) n_feedback++;
      start = 1'b0;
      if (poke_start && i == 3) begin
        // a start during a run must be ignored
        start = 1'b1; num_iter = IW'(2); psi0_mag = N'(123); g0_mag = N'(45);
        n_ignored++;
      end
      checks++;
      if (busy !== (i < iters)) fail($sformatf("busy at point %0d", i));
      @(posedge clk); #1;
      cyc++;
    end
    start = 1'b0;
    checks++;
    if (out_valid || busy) fail("still running after the last point");
  endtask

  initial begin
    real dth;
    finished = 1'b0; checks = 0; failures = 0;
    n_init = 0; n_feedback = 0; n_negative = 0; n_rot = 0; n_general = 0;
    n_ovf = 0; n_ignored = 0; n_loads = 0; n_zero_req = 0; n_gconst = 0;
    rst_n = 1'b0; lut_we = 1'b0; lut_waddr = '0; lut_wdata = '0;
    start = 1'b0; rot_mode = 1'b0; num_iter = '0; g_const = 1'b0;
    psi0_sign = 1'b0; psi0_mag = '0; g0_sign = 1'b0; g0_mag = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (out_valid || busy || done) fail("outputs active after reset");

    // 1. rotation by pi/8 per point, 20 points from (R, 0)
    dth = PI / 8.0;
    load_table($cos(dth), $sin(dth));
    run($cos(dth), $sin(dth), 1'b1, 20, 1'b0, 64'd16384, 1'b0, 64'd0, 1'b1, 1'b1, dth);

    // rotation from a point in the third quadrant, 7 points
    run($cos(dth), $sin(dth), 1'b1, 7, 1'b1, 64'd9000, 1'b1, 64'd5000, 1'b0, 1'b1, dth);

    // 2. general recursion Psi' = a Psi + b G, G' = a G + b Psi
    load_table(0.5, 0.25);
    run(0.5, 0.25, 1'b0, 12, 1'b1, 64'd30000, 1'b0, 64'd20000, 1'b0, 1'b0, 0.0);

    // 3. growth until the N-bit magnitude overflows
    load_table(1.2, 0.7);
    run(1.2, 0.7, 1'b0, 10, 1'b0, 64'd3000, 1'b1, 64'd100, 1'b0, 1'b0, 0.0);

    // 4. single points and an empty request
    run(1.2, 0.7, 1'b0, 1, 1'b0, 64'd77, 1'b0, 64'd11, 1'b0, 1'b0, 0.0);
    start = 1'b1; num_iter = '0;
    @(posedge clk); #1;
    start = 1'b0;
    n_zero_req++;
    checks++;
    if (out_valid || busy) fail("num_iter=0 started a run");
    run(1.2, 0.7, 1'b0, 1, 1'b1, 64'd500, 1'b0, 64'd900, 1'b0, 1'b0, 0.0);

    // 5. constant auxiliary term: linear growth Psi' = Psi + 0.5*G with G held
    //    at 1000, from -3000 through zero
    load_table(1.0, 0.5);
    run(1.0, 0.5, 1'b0, 10, 1'b1, 64'd3000, 1'b0, 64'd1000, 1'b0, 1'b0, 0.0, 1'b1);
    checks++;
    if (psi_sign !== 1'b0 || psi_mag !== N'(2000) || g_mag !== N'(1000))
      fail("linear run did not end at 2000 with G = 1000");
    //    geometric decay Psi' = 0.75*Psi, then G evaluated again as usual
    load_table(0.75, 0.0);
    run(0.75, 0.0, 1'b0, 8, 1'b0, 64'd40000, 1'b1, 64'd7, 1'b0, 1'b0, 0.0, 1'b1);
    run(0.75, 0.0, 1'b0, 3, 1'b0, 64'd40000, 1'b1, 64'd6000, 1'b0, 1'b0, 0.0, 1'b0);

    finished = 1'b1;
  end
endmodule

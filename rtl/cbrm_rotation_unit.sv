// cbrm_rotation_unit: a pair of convolution-based recursive evaluators that
// share one Convolution-LUT and compute, point after point,
//   Psi(i+1) = alpha*Psi(i) + beta'*G(i)      (beta' = -beta when rot_mode)
//   G(i+1)   = alpha*G(i)   + beta *Psi(i)
// With alpha = cos(dtheta), beta = sin(dtheta) and rot_mode = 1 this rotates
// the point (x, y) = (Psi, G) by dtheta per point, giving x_i = R cos(theta_i)
// and y_i = R sin(theta_i) for successive angles.
//
// Structure (SCHEME_REDUCTION, the default): an input mux per function
// selects the initial value (Psi0, G0) on the start clock and the fed-back
// result afterwards. Both mux outputs are cut into T = N/K blocks; the shared
// LUT (2T read ports) returns the T partial results of each function; each
// function has its own counter tree, adder and sign-magnitude recoder
// (cbrm_datapath). The results are stored in the Psi/G registers and fed
// back, so one LUT + counter + adder pass is one clock period and a new point
// comes every clock.
// SCHEME_SERIAL replaces each function's path by cbrm_serial_datapath: one
// table read and one addition per clock (2 read ports in all), T clocks per
// point; the mux then feeds each finished result straight into the next
// evaluation.
//
// Interface and timing:
//   - Load the table first through lut_we/lut_waddr/lut_wdata (one word per
//     clock, not while busy). Word layout: see conv_lut.
//   - Pulse start for one clock with psi0/g0, num_iter (>= 1) and rot_mode
//     valid. Points 1..num_iter then appear on psi_*/g_*, each marked by a
//     one-clock out_valid: on the num_iter clocks right after start with the
//     reduction scheme, every T clocks with the serial scheme (the first T
//     clocks after start). done is high together with the last point. ovf
//     marks a point whose magnitude did not fit in N bits. start is ignored
//     while busy; num_iter = 0 does nothing.
//   - g_const = 1 (sampled with start) holds G at g0 for the whole run, for
//     functions whose auxiliary term is a constant given by the application
//     (e.g. alpha = 1: Psi grows linearly by beta*g0 per point; beta = 0:
//     Psi is multiplied by alpha per point). The G path still runs but its
//     results are discarded; g_* show the constant.
//   - rst_n is an active-low synchronous reset of the control and the
//     registers (not of the table).
// The datapaths, the shared table and the muxes follow the rotation
// architecture and its two addition schemes; the start / count / valid
// control, the result registers, rot_mode (which supplies the minus sign
// the x coordinate needs) and g_const are this design's own.
module cbrm_rotation_unit
  import cbrm_pkg::*;
#(
  parameter int unsigned N      = N_DEFAULT,
  parameter int unsigned K      = K_DEFAULT,
  parameter int unsigned IW     = 16,
  parameter scheme_e     SCHEME = SCHEME_REDUCTION,
  localparam int unsigned T  = N / K,
  localparam int unsigned AW = lut_aw(K),
  localparam int unsigned P  = (SCHEME == SCHEME_SERIAL) ? 1 : T
) (
  input  logic          clk,
  input  logic          rst_n,
  // table load port
  input  logic          lut_we,
  input  logic [AW-1:0] lut_waddr,
  input  logic [N-1:0]  lut_wdata,
  // calculation request
  input  logic          start,
  input  logic [IW-1:0] num_iter,
  input  logic          rot_mode,
  input  logic          g_const,
  input  logic          psi0_sign,
  input  logic [N-1:0]  psi0_mag,
  input  logic          g0_sign,
  input  logic [N-1:0]  g0_mag,
  // results
  output logic          busy,
  output logic          out_valid,
  output logic          done,
  output logic          ovf,
  output logic          psi_sign,
  output logic [N-1:0]  psi_mag,
  output logic          g_sign,
  output logic [N-1:0]  g_mag
);
  typedef enum logic {IDLE, RUN} state_t;

  if (N % K != 0 || K + 2 >= N) begin : g_bad_size
    $error("cbrm_rotation_unit: N must be a multiple of K and K+2 < N");
  end

  state_t        state;
  logic [IW-1:0] remaining, rem_cur;
  logic          rot_q, g_const_q, g_const_eff;
  logic          accept, result_valid, last, launch;

  // input muxes (initial value or fed-back result)
  logic          sel_init;
  logic          psi_in_sign, g_in_sign, rot_eff;
  logic [N-1:0]  psi_in_mag, g_in_mag;
  logic          psi_fb_sign, g_fb_sign;
  logic [N-1:0]  psi_fb_mag, g_fb_mag;

  // shared table ports: 0..P-1 for Psi, P..2P-1 for G
  logic [AW-1:0] raddr [2*P];
  logic [N-1:0]  rdata [2*P];
  logic [AW-1:0] psi_addr [P];
  logic [AW-1:0] g_addr   [P];
  logic [N-1:0]  psi_data [P];
  logic [N-1:0]  g_data   [P];

  logic          psi_nx_sign, g_nx_sign, psi_ovf, g_ovf;
  logic [N-1:0]  psi_nx_mag, g_nx_mag;
  logic          dp_valid;

  always_comb begin
    accept       = (state == IDLE) && start && (num_iter != '0);
    result_valid = (SCHEME == SCHEME_SERIAL) ? ((state == RUN) && dp_valid)
                                             : (accept || (state == RUN));
    rem_cur      = accept ? num_iter : remaining;
    last         = result_valid && (rem_cur == IW'(1));
    // serial scheme: start the next evaluation as soon as one is finished
    launch       = accept || (result_valid && !last);

    sel_init    = (state == IDLE);
    // the reduction scheme feeds back the registers, the serial scheme the
    // finished result that is being registered in the same clock
    psi_fb_sign = (SCHEME == SCHEME_SERIAL) ? psi_nx_sign : psi_sign;
    psi_fb_mag  = (SCHEME == SCHEME_SERIAL) ? psi_nx_mag  : psi_mag;
    // (a constant G always comes from its register)
    g_fb_sign   = (SCHEME == SCHEME_SERIAL && !g_const_q) ? g_nx_sign : g_sign;
    g_fb_mag    = (SCHEME == SCHEME_SERIAL && !g_const_q) ? g_nx_mag  : g_mag;
    psi_in_sign = sel_init ? psi0_sign : psi_fb_sign;
    psi_in_mag  = sel_init ? psi0_mag  : psi_fb_mag;
    g_in_sign   = sel_init ? g0_sign   : g_fb_sign;
    g_in_mag    = sel_init ? g0_mag    : g_fb_mag;
    rot_eff     = sel_init ? rot_mode  : rot_q;
    g_const_eff = sel_init ? g_const   : g_const_q;

    for (int unsigned j = 0; j < P; j++) begin
      raddr[j]     = psi_addr[j];
      raddr[P + j] = g_addr[j];
      psi_data[j]  = rdata[j];
      g_data[j]    = rdata[P + j];
    end
  end

  conv_lut #(.N(N), .K(K), .NR(2 * P)) u_lut (
    .clk(clk), .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .raddr(raddr), .rdata(rdata)
  );

  if (SCHEME == SCHEME_SERIAL) begin : g_serial
    logic psi_valid, g_valid, psi_busy, g_busy;

    cbrm_serial_datapath #(.N(N), .K(K)) u_psi (
      .clk(clk), .rst_n(rst_n), .launch(launch),
      .own_sign(psi_in_sign), .own_mag(psi_in_mag),
      .oth_sign(g_in_sign),   .oth_mag(g_in_mag),
      .neg_other(rot_eff),
      .lut_addr(psi_addr[0]), .lut_data(psi_data[0]),
      .busy(psi_busy), .res_valid(psi_valid),
      .res_sign(psi_nx_sign), .res_mag(psi_nx_mag), .ovf(psi_ovf)
    );

    cbrm_serial_datapath #(.N(N), .K(K)) u_g (
      .clk(clk), .rst_n(rst_n), .launch(launch),
      .own_sign(g_in_sign),   .own_mag(g_in_mag),
      .oth_sign(psi_in_sign), .oth_mag(psi_in_mag),
      .neg_other(1'b0),
      .lut_addr(g_addr[0]), .lut_data(g_data[0]),
      .busy(g_busy), .res_valid(g_valid),
      .res_sign(g_nx_sign), .res_mag(g_nx_mag), .ovf(g_ovf)
    );

    // both paths run in lock step
    assign dp_valid = psi_valid & g_valid;

    a_lock_step : assert property (@(posedge clk) disable iff (!rst_n)
      (psi_valid == g_valid) && (psi_busy == g_busy));
  end else begin : g_reduction
    assign dp_valid = 1'b1;

    cbrm_datapath #(.N(N), .K(K)) u_psi (
      .own_sign(psi_in_sign), .own_mag(psi_in_mag),
      .oth_sign(g_in_sign),   .oth_mag(g_in_mag),
      .neg_other(rot_eff),
      .lut_addr(psi_addr), .lut_data(psi_data),
      .res_sign(psi_nx_sign), .res_mag(psi_nx_mag), .ovf(psi_ovf)
    );

    cbrm_datapath #(.N(N), .K(K)) u_g (
      .own_sign(g_in_sign),   .own_mag(g_in_mag),
      .oth_sign(psi_in_sign), .oth_mag(psi_in_mag),
      .neg_other(1'b0),
      .lut_addr(g_addr), .lut_data(g_data),
      .res_sign(g_nx_sign), .res_mag(g_nx_mag), .ovf(g_ovf)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      remaining <= '0;
      rot_q     <= 1'b0;
      g_const_q <= 1'b0;
      out_valid <= 1'b0;
      done      <= 1'b0;
      ovf       <= 1'b0;
      psi_sign  <= 1'b0;
      psi_mag   <= '0;
      g_sign    <= 1'b0;
      g_mag     <= '0;
    end else begin
      out_valid <= result_valid;
      done      <= last;
      if (accept) begin
        rot_q     <= rot_mode;
        g_const_q <= g_const;
      end
      if (accept && g_const) begin
        g_sign <= g0_sign;
        g_mag  <= g0_mag;
      end
      if (result_valid) begin
        psi_sign  <= psi_nx_sign;
        psi_mag   <= psi_nx_mag;
        if (!g_const_eff) begin
          g_sign  <= g_nx_sign;
          g_mag   <= g_nx_mag;
        end
        ovf       <= psi_ovf | (g_ovf & ~g_const_eff);
        remaining <= rem_cur - IW'(1);
      end else if (accept) begin
        remaining <= num_iter;
      end
      if (last) state <= IDLE;
      else if (accept) state <= RUN;
    end
  end

  assign busy = (state == RUN);

  // The table must not change under a running calculation.
  a_no_load_while_busy : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !lut_we);
endmodule

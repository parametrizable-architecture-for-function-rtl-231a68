// tb_cbrm_rotation_unit: end-to-end test of the rotation unit, reduced to
// N=16, K=4, with both addition schemes side by side: the reduction scheme
// (one point per clock) and the serial scheme (one point every T clocks).
// Each runs tb_rotation_harness: rotations, the general recursion, overflow,
// single-point and empty requests, a constant auxiliary term, all checked bit for bit and for timing.
// The mechanism counts of both are printed, and a mechanism that never
// happened in either scheme counts as a failure.
module tb_cbrm_rotation_unit
  import cbrm_pkg::*;
;
  logic fin [2];
  int   chk [2], err [2];
  int   init [2], fb [2], neg [2], rot [2], gen [2], ovf [2], ign [2], lds [2], zr [2], gcn [2];

  tb_rotation_harness #(.SCHEME(SCHEME_REDUCTION)) h_red (
    .finished(fin[0]), .checks(chk[0]), .failures(err[0]), .n_init(init[0]),
    .n_feedback(fb[0]), .n_negative(neg[0]), .n_rot(rot[0]), .n_general(gen[0]),
    .n_ovf(ovf[0]), .n_ignored(ign[0]), .n_loads(lds[0]), .n_zero_req(zr[0]), .n_gconst(gcn[0])
  );

  tb_rotation_harness #(.SCHEME(SCHEME_SERIAL)) h_ser (
    .finished(fin[1]), .checks(chk[1]), .failures(err[1]), .n_init(init[1]),
    .n_feedback(fb[1]), .n_negative(neg[1]), .n_rot(rot[1]), .n_general(gen[1]),
    .n_ovf(ovf[1]), .n_ignored(ign[1]), .n_loads(lds[1]), .n_zero_req(zr[1]), .n_gconst(gcn[1])
  );

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], err[0] + err[1] + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    #1;
    wait (fin[0] && fin[1]);
    checks   = chk[0] + chk[1] + 1;
    failures = err[0] + err[1];
    for (int s = 0; s < 2; s++) begin
      $display("scheme %s: init_mux=%0d feedback=%0d negative_recode=%0d rot_mode1=%0d rot_mode0=%0d overflow=%0d ignored_start=%0d table_loads=%0d empty_request=%0d g_const=%0d",
               s == 0 ? "reduction" : "serial", init[s], fb[s], neg[s], rot[s], gen[s],
               ovf[s], ign[s], lds[s], zr[s], gcn[s]);
      if (init[s] == 0 || fb[s] == 0 || neg[s] == 0 || rot[s] == 0 || gen[s] == 0
          || ovf[s] == 0 || ign[s] == 0 || lds[s] == 0 || zr[s] == 0 || gcn[s] == 0) begin
        failures++;
        $display("FAIL: a mechanism was never exercised");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

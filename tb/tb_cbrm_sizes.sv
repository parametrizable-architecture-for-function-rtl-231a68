// tb_cbrm_sizes: the rotation unit at every operand / block size of the
// table of memory requirements (n = 16 and 32, k = 1, 2, 4, 8), with the
// reduction scheme, plus the serial scheme at n = 16, k = 1 (the bit-serial
// case). Each runs 36 rotation steps of pi/72 (tb_size_harness), bit-exact
// against the reference model. The largest absolute error (radius 1) of each
// size is printed and must stay below 2^-(N-2) times 40, i.e. a few LSBs per
// step. The table sizes range from 16 to 2^18 words.
module tb_cbrm_sizes
  import cbrm_pkg::*;
;
  localparam int NC = 9;
  logic fin [NC];
  int   chk [NC], err [NC];
  real  wst [NC];
  int   nn [NC] = '{16, 16, 16, 16, 32, 32, 32, 32, 16};
  int   kk [NC] = '{1, 2, 4, 8, 1, 2, 4, 8, 1};

  tb_size_harness #(.N(16), .K(1)) h0 (.finished(fin[0]), .checks(chk[0]), .failures(err[0]), .worst(wst[0]));
  tb_size_harness #(.N(16), .K(2)) h1 (.finished(fin[1]), .checks(chk[1]), .failures(err[1]), .worst(wst[1]));
  tb_size_harness #(.N(16), .K(4)) h2 (.finished(fin[2]), .checks(chk[2]), .failures(err[2]), .worst(wst[2]));
  tb_size_harness #(.N(16), .K(8)) h3 (.finished(fin[3]), .checks(chk[3]), .failures(err[3]), .worst(wst[3]));
  tb_size_harness #(.N(32), .K(1)) h4 (.finished(fin[4]), .checks(chk[4]), .failures(err[4]), .worst(wst[4]));
  tb_size_harness #(.N(32), .K(2)) h5 (.finished(fin[5]), .checks(chk[5]), .failures(err[5]), .worst(wst[5]));
  tb_size_harness #(.N(32), .K(4)) h6 (.finished(fin[6]), .checks(chk[6]), .failures(err[6]), .worst(wst[6]));
  tb_size_harness #(.N(32), .K(8)) h7 (.finished(fin[7]), .checks(chk[7]), .failures(err[7]), .worst(wst[7]));
  tb_size_harness #(.N(16), .K(1), .SCHEME(SCHEME_SERIAL)) h8 (.finished(fin[8]), .checks(chk[8]), .failures(err[8]), .worst(wst[8]));

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int checks, failures;
    bit all;
    #1;
    do begin
      all = 1'b1;
      for (int c = 0; c < NC; c++) all &= fin[c];
      if (!all) #1000;
    end while (!all);
    checks = 0; failures = 0;
    for (int c = 0; c < NC; c++) begin
      $display("n=%0d k=%0d %s: table %0d words, largest abs error %e", nn[c], kk[c],
               c == 8 ? "serial" : "reduction", 1 << (2 * kk[c] + 2), wst[c]);
      checks += chk[c] + 1;
      failures += err[c];
      if (wst[c] > 40.0 * (2.0 ** -(nn[c] - 2))) begin
        failures++;
        $display("FAIL: error too large");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

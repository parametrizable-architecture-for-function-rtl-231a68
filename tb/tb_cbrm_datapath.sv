// tb_cbrm_datapath: self-checking test of one CBRM evaluation path at three
// sizes: N=16/K=4 (t=4, one 4:2 level), N=12/K=2 (t=6, 4:2 plus pass-through
// then 4:2) and N=8/K=1 (t=8, the bit-serial table of the k=1 case), each
// with its own alpha and beta. Every result must match the bit-exact
// reference, and every table address must carry the right signs and blocks.
module tb_cbrm_datapath;
  logic f0, f1, f2;
  int   c0, c1, c2, e0, e1, e2;
  int   checks, failures;

  tb_datapath_harness #(.N(16), .K(4), .ALPHA(0.8),  .BETA(0.6))  h0 (.finished(f0), .checks(c0), .failures(e0));
  tb_datapath_harness #(.N(12), .K(2), .ALPHA(-0.7), .BETA(1.1))  h1 (.finished(f1), .checks(c1), .failures(e1));
  tb_datapath_harness #(.N(8),  .K(1), .ALPHA(0.25), .BETA(-0.5)) h2 (.finished(f2), .checks(c2), .failures(e2));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, e0 + e1 + e2 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (f0 && f1 && f2);
    checks   = c0 + c1 + c2;
    failures = e0 + e1 + e2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

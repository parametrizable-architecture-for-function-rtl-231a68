// tb_cbrm_serial_datapath: self-checking test of the serial-scheme
// evaluation path at N=16/K=4 (4 clocks per evaluation), N=8/K=1 (8 clocks,
// the k=1 case) and N=12/K=3 (4 clocks), each with its own alpha and beta:
// results bit for bit, latency exactly N/K clocks, results held, and
// back-to-back launches.
module tb_cbrm_serial_datapath;
  logic f0, f1, f2;
  int   c0, c1, c2, e0, e1, e2;

  tb_serial_harness #(.N(16), .K(4), .ALPHA(0.8),  .BETA(0.6))  h0 (.finished(f0), .checks(c0), .failures(e0));
  tb_serial_harness #(.N(8),  .K(1), .ALPHA(0.25), .BETA(-0.5)) h1 (.finished(f1), .checks(c1), .failures(e1));
  tb_serial_harness #(.N(12), .K(3), .ALPHA(-0.7), .BETA(1.1))  h2 (.finished(f2), .checks(c2), .failures(e2));

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, e0 + e1 + e2 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (f0 && f1 && f2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, e0 + e1 + e2);
    $finish;
  end
endmodule

// tb_sm_recode: self-checking test of the two's-complement to sign-magnitude
// recoder. Random positive and negative inputs, ties at exactly one half,
// zero, small negatives that round to zero, and overflowing values; the
// expected sign, magnitude and overflow are worked out from the real value
// s / 2^F.
module tb_sm_recode;
  localparam int unsigned W = 24;
  localparam int unsigned N = 12;
  localparam int unsigned F = 6;

  logic [W-1:0] s;
  logic         sign, ovf;
  logic [N-1:0] mag;
  int checks = 0;
  int failures = 0;

  sm_recode #(.W(W), .N(N), .F(F)) dut (.s(s), .sign(sign), .mag(mag), .ovf(ovf));

  task automatic try(longint v);
    real x;
    longint m;
    bit    want_ovf;
    s = W'(v);
    #1;
    x = real'(v) / (2.0 ** F);
    m = longint'($floor(((x < 0.0) ? -x : x) + 0.5));
    want_ovf = m >= (64'd1 << N);
    checks++;
    if (ovf !== want_ovf
        || (!want_ovf && (mag !== N'(m) || sign !== ((x < 0.0) && m != 0)))) begin
      failures++;
      $display("FAIL s=%0d: got sign=%b mag=%0d ovf=%b want mag=%0d ovf=%b",
               v, sign, mag, ovf, m, want_ovf);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0); try(31); try(32); try(-31); try(-32); try(-33); try(1); try(-1);
    try(96); try(-96);
    try((longint'(1) << (N + F)) - 33);   // largest value that fits
    try((longint'(1) << (N + F)) - 32);   // rounds up to 2^N: overflow
    try(-(longint'(1) << (N + F)) + 33);
    for (int it = 0; it < 2000; it++) begin
      longint v;
      v = longint'($urandom_range(1 << (N + F - 1)));
      if (it % 3 == 0) v = v * 3;                 // some overflow
      if (it % 2 == 1) v = -v;
      try(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cpa_adder: self-checking test of the final adder: random and
// carry-chain-stressing operands, result compared modulo 2^W.
module tb_cpa_adder;
  localparam int unsigned W = 40;

  logic [W-1:0] a, b, s;
  int checks = 0;
  int failures = 0;

  cpa_adder #(.W(W)) dut (.a(a), .b(b), .sum(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 1000; it++) begin
      longint unsigned x, y;
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      if (it % 4 == 1) y = ~x;            // all propagate
      if (it % 4 == 2) y = (~x) + 1;      // full carry ripple
      a = W'(x); b = W'(y);
      #1;
      checks++;
      if (s !== W'(x + y)) begin
        failures++;
        $display("FAIL %h + %h: got %h", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

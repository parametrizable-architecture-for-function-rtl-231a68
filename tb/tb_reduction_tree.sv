// tb_reduction_tree: self-checking test of the 4:2 / 3:2 counter tree.
//
// Trees of 3, 4, 6, 8 and 9 rows (covering a single 3:2 level, a single 4:2
// level, pass-through rows and multi-level trees) get random rows, including
// sign-extended negative ones; sum_o + carry_o must equal the sum of the rows
// modulo 2^W.
module tb_reduction_tree;
  localparam int unsigned W = 24;

  logic [W-1:0] r3 [3];
  logic [W-1:0] r4 [4];
  logic [W-1:0] r6 [6];
  logic [W-1:0] r8 [8];
  logic [W-1:0] r9 [9];
  logic [W-1:0] s3, c3, s4, c4, s6, c6, s8, c8, s9, c9;

  int checks = 0;
  int failures = 0;

  reduction_tree #(.W(W), .M(3)) u3 (.rows(r3), .sum_o(s3), .carry_o(c3));
  reduction_tree #(.W(W), .M(4)) u4 (.rows(r4), .sum_o(s4), .carry_o(c4));
  reduction_tree #(.W(W), .M(6)) u6 (.rows(r6), .sum_o(s6), .carry_o(c6));
  reduction_tree #(.W(W), .M(8)) u8 (.rows(r8), .sum_o(s8), .carry_o(c8));
  reduction_tree #(.W(W), .M(9)) u9 (.rows(r9), .sum_o(s9), .carry_o(c9));

  function automatic logic [W-1:0] rnd_row(int i);
    logic [W-1:0] v;
    v = W'($urandom);
    // every other row a small negative number, as table words are
    if (i % 2 == 1) v = -W'($urandom_range(5000));
    return v;
  endfunction

  task automatic check(string name, logic [W-1:0] s, logic [W-1:0] c, logic [W-1:0] want);
    checks++;
    if (W'(s + c) !== want) begin
      failures++;
      $display("FAIL %s: %h + %h != %h", name, s, c, want);
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
    for (int it = 0; it < 500; it++) begin
      logic [W-1:0] w3, w4, w6, w8, w9;
      w3 = '0; w4 = '0; w6 = '0; w8 = '0; w9 = '0;
      for (int i = 0; i < 3; i++) begin r3[i] = rnd_row(i + it); w3 += r3[i]; end
      for (int i = 0; i < 4; i++) begin r4[i] = rnd_row(i + it); w4 += r4[i]; end
      for (int i = 0; i < 6; i++) begin r6[i] = rnd_row(i + it); w6 += r6[i]; end
      for (int i = 0; i < 8; i++) begin r8[i] = rnd_row(i + it); w8 += r8[i]; end
      for (int i = 0; i < 9; i++) begin r9[i] = rnd_row(i + it); w9 += r9[i]; end
      #1;
      check("M=3", s3, c3, w3);
      check("M=4", s4, c4, w4);
      check("M=6", s6, c6, w6);
      check("M=8", s8, c8, w8);
      check("M=9", s9, c9, w9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

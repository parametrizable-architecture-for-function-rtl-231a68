// tb_conv_lut: self-checking test of the Convolution-LUT memory.
//
// A 16-bit, K=2 table (64 words) with three read ports is filled with
// distinct words, then every word is read back on every port, words are
// rewritten one at a time and the neighbours are checked to be untouched,
// and random simultaneous reads on all ports are compared with a shadow copy
// kept by the testbench.
module tb_conv_lut;
  localparam int unsigned N  = 16;
  localparam int unsigned K  = 2;
  localparam int unsigned NR = 3;
  localparam int unsigned AW = 2 * K + 2;
  localparam int unsigned D  = 2 ** AW;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr;
  logic [N-1:0]  wdata;
  logic [AW-1:0] raddr [NR];
  logic [N-1:0]  rdata [NR];
  logic [N-1:0]  shadow [D];

  int checks = 0;
  int failures = 0;

  conv_lut #(.N(N), .K(K), .NR(NR)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  always #5 clk = ~clk;

  task automatic write_word(input int unsigned a, input logic [N-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = AW'(a); wdata = d;
    @(negedge clk);
    we = 1'b0;
    shadow[a] = d;
  endtask

  task automatic check_all_ports();
    for (int unsigned a = 0; a < D; a++) begin
      for (int unsigned p = 0; p < NR; p++) raddr[p] = AW'((a + p * 7) % D);
      #1;
      for (int unsigned p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== shadow[(a + p * 7) % D]) begin
          failures++;
          $display("FAIL port %0d addr %0d: got %h want %h", p, (a + p * 7) % D,
                   rdata[p], shadow[(a + p * 7) % D]);
        end
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0;
    for (int p = 0; p < NR; p++) raddr[p] = '0;
    for (int unsigned a = 0; a < D; a++) write_word(a, N'(16'hA500 ^ (a * 16'h0101)));
    check_all_ports();
    // rewrite single words; neighbours must keep their contents
    for (int i = 0; i < 20; i++) begin
      int unsigned a;
      a = $urandom_range(D - 1);
      write_word(a, N'($urandom));
      check_all_ports();
    end
    // random simultaneous reads
    for (int i = 0; i < 200; i++) begin
      for (int p = 0; p < NR; p++) raddr[p] = AW'($urandom);
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

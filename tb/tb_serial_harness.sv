// tb_serial_harness: drives one cbrm_serial_datapath of size (N, K) against a
// table model filled from alpha and beta. Each evaluation is launched, must
// raise res_valid exactly T = N/K clocks later (busy before that), and must
// then equal tb_cbrm_pkg::ref_eval bit for bit; the result must hold while
// no new launch comes. Every other evaluation is launched back to back in the
// res_valid clock. Raises finished after ITER evaluations.
module tb_serial_harness
  import tb_cbrm_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned K = 4,
  parameter int ITER = 300,
  parameter real ALPHA = 0.8,
  parameter real BETA = 0.6
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned T  = N / K;
  localparam int unsigned AW = 2 * K + 2;

  logic          clk = 1'b0;
  logic          rst_n, launch;
  logic          own_s, oth_s, neg;
  logic [N-1:0]  own_m, oth_m;
  logic [AW-1:0] addr;
  logic [N-1:0]  data;
  logic          busy, res_valid, res_s, ovf;
  logic [N-1:0]  res_m;
  logic [N-1:0]  table_q [2**AW];

  cbrm_serial_datapath #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .launch(launch),
    .own_sign(own_s), .own_mag(own_m), .oth_sign(oth_s), .oth_mag(oth_m),
    .neg_other(neg), .lut_addr(addr), .lut_data(data),
    .busy(busy), .res_valid(res_valid), .res_sign(res_s), .res_mag(res_m), .ovf(ovf)
  );

  always #5 clk = ~clk;
  always_comb data = table_q[addr];

  function automatic logic [N-1:0] rnd_mag(int it);
    logic [N-1:0] m;
    m = N'({$urandom, $urandom});
    case (it % 5)
      0: m = '0;
      1: m = '1;
      2: m = m >> $urandom_range(N - 1);
      default: ;
    endcase
    return m;
  endfunction

  initial begin
    bit              ws, wo;
    longint unsigned wm;
    finished = 1'b0;
    checks = 0;
    failures = 0;
    for (longint unsigned a = 0; a < 2**AW; a++)
      table_q[a] = N'(lut_entry(ALPHA, BETA, N, K, a));
    rst_n = 1'b0; launch = 1'b0;
    own_s = 1'b0; oth_s = 1'b0; neg = 1'b0; own_m = '0; oth_m = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (res_valid || busy) failures++;
    for (int it = 0; it < ITER; it++) begin
      // launch
      own_s = 1'($urandom); oth_s = 1'($urandom); neg = 1'($urandom);
      own_m = rnd_mag(it); oth_m = rnd_mag(it / 5 + 3);
      ref_eval(ALPHA, neg ? -BETA : BETA, N, K, own_s, 64'(own_m), oth_s, 64'(oth_m),
               ws, wm, wo);
      launch = 1'b1;
      @(posedge clk); #1;
      launch = 1'b0;
      own_m = ~own_m; oth_m = ~oth_m;      // inputs must no longer matter
      for (int c = 1; c < T; c++) begin
        checks++;
        if (res_valid || !busy) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d K=%0d: res_valid early at clock %0d", N, K, c);
        end
        @(posedge clk); #1;
      end
      checks++;
      if (!res_valid || busy || res_s !== ws || res_m !== N'(wm) || ovf !== wo) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d K=%0d it %0d: valid=%b got %b/%h ovf=%b want %b/%h ovf=%b",
                   N, K, it, res_valid, res_s, res_m, ovf, ws, N'(wm), wo);
      end
      if (it % 2 == 1) begin
        // idle a few clocks: the result must stay
        repeat (3) @(posedge clk);
        #1;
        checks++;
        if (!res_valid || res_s !== ws || res_m !== N'(wm)) failures++;
      end
      // even iterations: the next launch comes in this res_valid clock
    end
    finished = 1'b1;
  end
endmodule

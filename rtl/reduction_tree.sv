// reduction_tree: reduces M operand rows of width W to two rows (sum and
// carry) with 4:2 and 3:2 counters, as a multiplier reduces its partial
// products.
//
// Level by level, each group of four rows goes through a 4:2 counter row
// (csa42) and yields two; a leftover group of three goes through a 3:2
// counter row (csa32) and yields two; one or two leftover rows pass through
// unchanged. Levels repeat until two rows remain, so sum_o + carry_o equals
// the sum of all rows modulo 2^W. For the rotation example's t = 4 partial
// results this is a single 4:2 counter level. Purely combinational.
// The greedy grouping rule is this design's choice; the counter types are
// the ones the reduction structure is described with.
module reduction_tree
  import cbrm_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned M = 4
) (
  input  logic [W-1:0] rows [M],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);
  localparam int unsigned L = tree_levels(M);

  // Level l reads cur (the rows left by level l-1) and drives nxt; rows
  // above rows_at(M, l+1) in nxt are zero.
  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned MI = rows_at(M, l);
    localparam int unsigned MO = rows_at(M, l + 1);
    localparam int unsigned G4 = MI / 4;
    localparam int unsigned RM = MI % 4;

    logic [W-1:0] cur [M];
    logic [W-1:0] nxt [M];

    if (l == 0) begin : g_first
      assign cur = rows;
    end else begin : g_next
      assign cur = g_lvl[l-1].nxt;
    end

    for (genvar g = 0; g < G4; g++) begin : g_c42
      csa42 #(.W(W)) u_c42 (
        .a(cur[4*g]), .b(cur[4*g+1]), .c(cur[4*g+2]), .d(cur[4*g+3]),
        .s(nxt[2*g]), .c_o(nxt[2*g+1])
      );
    end

    if (RM == 3) begin : g_c32
      csa32 #(.W(W)) u_c32 (
        .a(cur[4*G4]), .b(cur[4*G4+1]), .c(cur[4*G4+2]),
        .s(nxt[2*G4]), .c_o(nxt[2*G4+1])
      );
    end else begin : g_pass
      for (genvar r = 0; r < RM; r++) begin : g_row
        assign nxt[2*G4+r] = cur[4*G4+r];
      end
    end

    for (genvar r = MO; r < M; r++) begin : g_zero
      assign nxt[r] = '0;
    end
  end

  if (L == 0) begin : g_direct
    assign sum_o   = rows[0];
    assign carry_o = (M > 1) ? rows[M-1] : '0;
  end else begin : g_tree
    assign sum_o   = g_lvl[L-1].nxt[0];
    assign carry_o = g_lvl[L-1].nxt[1];
  end
endmodule

// wallace_mult: W x W unsigned multiplier built as a modified Wallace tree with
// hierarchical decomposition, p = a * b. W = 8 is the filter's multiplier;
// W = 16 (or 32) builds the wider version the same way.
//
// Partial products: row r is the multiplicand a ANDed with multiplier bit b[r]
// and preceded by r zeros (shifted left by r); all W rows are formed at once.
//
// Stage A: the rows are split into groups of four adjacent rows. In each group
// every column is reduced to one sum bit and one carry bit by a half adder,
// full adder or 4:2 compressor, chosen by the number of bits in the column
// (1 bit passes, 2 -> HA, 3 -> FA, 4 or 5 -> 4:2). A 4:2 carry-out runs into
// the next column's carry-in but never depends on its own carry-in, so the low
// and high column halves of a group work in parallel: for W = 8 these are the
// four parallel blocks (two row groups times two column halves).
// Stage B: pairs of groups are merged the same way (wt_reduce4), four vectors to
// two, level by level until one sum and one carry vector remain: one level for
// W = 8, two for W = 16.
// Stage C: a 2W-bit carry lookahead adder adds the last two vectors.
//
// With this split no column holds more than four bits plus one carry-in, so no
// 5:2 compressor is needed. The per-column cell choice is computed at
// elaboration from live-bit masks (wallace_pkg). W must be 4 times a power of
// two. Combinational.
module wallace_mult
  import wallace_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,   // multiplicand
  input  logic [W-1:0]   b,   // multiplier
  output logic [2*W-1:0] p    // product
);
  localparam int unsigned G  = W / 4;              // row groups
  localparam int unsigned LV = $clog2(G);          // merge levels after stage A
  localparam int unsigned NA = W + 4;              // stage A columns per group
  localparam int unsigned PW = 2 * W;              // product width

  // ---- partial products ----
  logic [W-1:0] pp [W];
  always_comb for (int r = 0; r < W; r++) pp[r] = a & {W{b[r]}};

  // ---- stage A ----
  for (genvar g = 0; g < G; g++) begin : g_grp
    logic [NA-1:0] sa, ca;
    for (genvar cc = 0; cc < NA; cc++) begin : g_col
      localparam int H  = group_height(W, cc);
      localparam int R0 = (cc > W - 1) ? cc - (W - 1) : 0;
      localparam bit CI = group_cin(W, cc);
      logic [4:0] col;
      logic       ci, co;   // 4:2 carry from the column to the right, and to the left
      if (cc > 0) begin : g_ci
        assign ci = g_col[cc-1].co;
      end else begin : g_ci0
        assign ci = 1'b0;
      end
      always_comb begin
        col = '0;
        for (int j = 0; j < H; j++) col[j] = pp[4*g + R0 + j][cc - R0 - j];
        if (CI) col[H] = ci;
      end
      wt_column #(.N(H + int'(CI)), .CIN_USED(CI)) u_col (
        .in(col), .sum(sa[cc]), .carry(ca[cc]), .cout(co));
    end
    // Place the group's vectors at their weights (bits past 2W dropped).
    logic [PW+NA:0] sw, cw;
    logic [PW-1:0]  s, c;     // this node's sum and carry vectors
    assign sw = (PW+NA+1)'(sa) << (4*g);
    assign cw = (PW+NA+1)'(ca) << (4*g + 1);
    assign s  = sw[PW-1:0];
    assign c  = cw[PW-1:0];
  end

  // ---- stage B: merge pairs of nodes, level by level ----
  // Node i of level l merges nodes 2i and 2i+1 of level l-1 (level 0 = stage A).
  for (genvar l = 1; l <= LV; l++) begin : g_lvl
    for (genvar i = 0; i < (G >> l); i++) begin : g_node
      logic [PW-1:0] s, c, s0, c0, s1, c1;
      if (l == 1) begin : g_from_a
        assign s0 = g_grp[2*i].s;
        assign c0 = g_grp[2*i].c;
        assign s1 = g_grp[2*i+1].s;
        assign c1 = g_grp[2*i+1].c;
      end else begin : g_from_b
        assign s0 = g_lvl[l-1].g_node[2*i].s;
        assign c0 = g_lvl[l-1].g_node[2*i].c;
        assign s1 = g_lvl[l-1].g_node[2*i+1].s;
        assign c1 = g_lvl[l-1].g_node[2*i+1].c;
      end
      wt_reduce4 #(
        .WO(PW),
        .L0(tree_mask(W, l - 1, 2*i,     1'b0)),
        .L1(tree_mask(W, l - 1, 2*i,     1'b1)),
        .L2(tree_mask(W, l - 1, 2*i + 1, 1'b0)),
        .L3(tree_mask(W, l - 1, 2*i + 1, 1'b1))
      ) u_merge (.v0(s0), .v1(c0), .v2(s1), .v3(c1), .s(s), .c(c));
    end
  end

  logic [PW-1:0] fs, fc;   // final sum and carry vectors
  if (LV == 0) begin : g_final_a
    assign fs = g_grp[0].s;
    assign fc = g_grp[0].c;
  end else begin : g_final_b
    assign fs = g_lvl[LV].g_node[0].s;
    assign fc = g_lvl[LV].g_node[0].c;
  end

  // ---- stage C: carry lookahead adder ----
  logic unused_cout;
  cla_adder #(.W(PW)) u_cla (
    .a(fs), .b(fc), .cin(1'b0), .sum(p), .cout(unused_cout));

  initial assert (W >= 4 && W % 4 == 0 && (G & (G - 1)) == 0)
    else $error("wallace_mult: W must be 4 times a power of two");
endmodule

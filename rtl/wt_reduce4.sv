// wt_reduce4: one merge stage of the hierarchical Wallace tree. Four partial-sum
// vectors, each already placed at its weight in a WO-bit word, are reduced
// column by column to a sum vector s and a carry vector c (c is placed at its
// weight: c[k+1] is the carry of column k; c[0] = 0).
//
// L0..L3 are the live masks of v0..v3 (bits that can be nonzero). Each column
// gets the cell its live-bit count calls for, counting the 4:2 carry-in from the
// column to its right: 1 bit passes, 2 -> half adder, 3 -> full adder,
// 4 or 5 -> 4:2 compressor. Bits at or above WO are dropped (the tree works
// modulo 2^WO). Combinational.
module wt_reduce4
  import wallace_pkg::*;
#(
  parameter int unsigned WO = 16,
  parameter mask_t       L0 = '1,
  parameter mask_t       L1 = '1,
  parameter mask_t       L2 = '1,
  parameter mask_t       L3 = '1
) (
  input  logic [WO-1:0] v0,
  input  logic [WO-1:0] v1,
  input  logic [WO-1:0] v2,
  input  logic [WO-1:0] v3,
  output logic [WO-1:0] s,
  output logic [WO-1:0] c
);
  function automatic logic [3:0] live(input int k);
    return {L3[k], L2[k], L1[k], L0[k]};
  endfunction
  function automatic int height(input int k);
    logic [3:0] m;
    m = live(k);
    return int'(m[0]) + int'(m[1]) + int'(m[2]) + int'(m[3]);
  endfunction
  function automatic int pick(input int k, input int j);  // j-th live vector
    logic [3:0] m;
    int n;
    m = live(k);
    n = 0;
    for (int i = 0; i < 4; i++) if (m[i]) begin
      if (n == j) return i;
      n++;
    end
    return 0;
  endfunction
  function automatic bit has_cin(input int k);
    bit cin;
    cin = 1'b0;
    for (int i = 0; i < k; i++) cin = ((height(i) + int'(cin)) >= 4);
    return cin;
  endfunction

  logic [WO:0] cw;   // carries at their weight
  assign cw[0] = 1'b0;

  for (genvar k = 0; k < WO; k++) begin : g_col
    localparam int H  = height(k);
    localparam bit CI = has_cin(k);
    logic [3:0] cand;
    logic [4:0] col;
    logic       ci, co;   // 4:2 carry from the column to the right, and to the left
    if (k > 0) begin : g_ci
      assign ci = g_col[k-1].co;
    end else begin : g_ci0
      assign ci = 1'b0;
    end
    always_comb begin
      cand = {v3[k], v2[k], v1[k], v0[k]};
      col  = '0;
      for (int j = 0; j < H; j++) col[j] = cand[pick(k, j)];
      if (CI) col[H] = ci;
    end
    wt_column #(.N(H + int'(CI)), .CIN_USED(CI)) u_col (
      .in(col), .sum(s[k]), .carry(cw[k+1]), .cout(co));
  end

  assign c = cw[WO-1:0];
endmodule

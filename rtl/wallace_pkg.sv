// wallace_pkg: elaboration-time bookkeeping for the hierarchical Wallace tree.
//
// A mask marks which bits of a partial-sum vector can ever be nonzero ("live").
// The column reducers use the masks to pick the cell for each column: the fewer
// live bits a column has, the smaller the cell (pass, half adder, full adder,
// 4:2 compressor). Masks are 64 bits wide, enough for a 32x32 product.
package wallace_pkg;

  typedef logic [63:0] mask_t;

  // Reduce four vectors with live masks m0..m3 column by column (a 4:2
  // compressor's carry-out feeding the next column) and return the live mask of
  // the sum vector (carry = 0) or of the carry vector, already placed at its
  // weight (carry = 1). WO is the vector width.
  function automatic mask_t merge_mask(input int WO, input mask_t m0, input mask_t m1,
                                       input mask_t m2, input mask_t m3, input bit carry);
    mask_t s, c;
    bit    cin;
    int    n;
    s = '0; c = '0; cin = 1'b0;
    for (int k = 0; k < WO; k++) begin
      n = int'(m0[k]) + int'(m1[k]) + int'(m2[k]) + int'(m3[k]) + int'(cin);
      s[k] = (n >= 1);
      if (k + 1 < WO) c[k+1] = (n >= 2);
      cin = (n >= 4);
    end
    return carry ? c : s;
  endfunction

  // Number of partial-product bits of a four-row group in relative column c,
  // for a W-bit multiplicand.
  function automatic int group_height(input int W, input int c);
    int h;
    h = 0;
    for (int rr = 0; rr < 4; rr++) if (c - rr >= 0 && c - rr <= W - 1) h++;
    return h;
  endfunction

  // Whether relative column c of a group receives a 4:2 carry-in.
  function automatic bit group_cin(input int W, input int c);
    bit cin;
    cin = 1'b0;
    for (int i = 0; i < c; i++) cin = ((group_height(W, i) + int'(cin)) >= 4);
    return cin;
  endfunction

  // Live mask of stage A's sum or carry vector of group g (rows 4g..4g+3),
  // placed at its weight in a 2W-bit vector.
  function automatic mask_t stage_a_mask(input int W, input int g, input bit carry);
    mask_t s, c;
    int    n;
    s = '0; c = '0;
    for (int cc = 0; cc < W + 4; cc++) begin
      n = group_height(W, cc) + int'(group_cin(W, cc));
      if (4*g + cc < 2*W)     s[4*g + cc]     = (n >= 1);
      if (4*g + cc + 1 < 2*W) c[4*g + cc + 1] = (n >= 2);
    end
    return carry ? c : s;
  endfunction

  // Live mask of the sum (carry = 0) or carry vector of node idx at tree level
  // lvl; level 0 is stage A, each further level merges two nodes of the last.
  function automatic mask_t tree_mask(input int W, input int lvl, input int idx, input bit carry);
    mask_t s [16], c [16];
    int    g;
    g = W / 4;
    for (int i = 0; i < 16; i++) begin
      s[i] = (i < g) ? stage_a_mask(W, i, 1'b0) : '0;
      c[i] = (i < g) ? stage_a_mask(W, i, 1'b1) : '0;
    end
    for (int l = 1; l <= lvl; l++) begin
      for (int i = 0; i < (g >> l); i++) begin
        mask_t ns, nc;
        ns = merge_mask(2*W, s[2*i], c[2*i], s[2*i+1], c[2*i+1], 1'b0);
        nc = merge_mask(2*W, s[2*i], c[2*i], s[2*i+1], c[2*i+1], 1'b1);
        s[i] = ns;
        c[i] = nc;
      end
    end
    return carry ? c[idx] : s[idx];
  endfunction

endpackage

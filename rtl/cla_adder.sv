// cla_adder: two-level carry lookahead adder, sum = a + b + cin (mod 2^W).
//
// Bits are grouped in fours. Each bit forms generate g = a&b and propagate
// p = a^b; each group forms its group generate and propagate. The carry into
// every group is then a flat sum of products of the group signals and cin, and
// inside a group each carry is a flat sum of products of the bit signals and the
// group carry-in, so no carry ripples through more than the two lookahead levels.
// This is the adder used in the multiplier's last stage and in the filter's
// accumulator and output adders. Combinational; W must be a multiple of 4.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = W / 4;

  logic [W-1:0]  g, p;
  logic [W:0]    c;
  logic [NG-1:0] gg, gp;
  logic [NG:0]   gc;

  assign g = a & b;
  assign p = a ^ b;

  // Group generate / propagate.
  always_comb begin
    for (int j = 0; j < NG; j++) begin
      gp[j] = &p[4*j +: 4];
      gg[j] = g[4*j+3]
            | (p[4*j+3] & g[4*j+2])
            | (p[4*j+3] & p[4*j+2] & g[4*j+1])
            | (p[4*j+3] & p[4*j+2] & p[4*j+1] & g[4*j]);
    end
  end

  // Second level: carry into each group, expanded into a sum of products.
  always_comb begin
    for (int j = 0; j <= NG; j++) begin
      logic t, pr;
      pr = 1'b1;
      for (int i = 0; i < j; i++) pr = pr & gp[i];
      t = pr & cin;
      for (int i = 0; i < j; i++) begin
        logic term;
        term = gg[i];
        for (int k = i + 1; k < j; k++) term = term & gp[k];
        t = t | term;
      end
      gc[j] = t;
    end
  end

  // First level: carries inside each group from the group carry-in.
  always_comb begin
    for (int j = 0; j < NG; j++) begin
      c[4*j]   = gc[j];
      c[4*j+1] = g[4*j]   | (p[4*j]   & gc[j]);
      c[4*j+2] = g[4*j+1] | (p[4*j+1] & g[4*j])   | (p[4*j+1] & p[4*j]   & gc[j]);
      c[4*j+3] = g[4*j+2] | (p[4*j+2] & g[4*j+1]) | (p[4*j+2] & p[4*j+1] & g[4*j])
               | (p[4*j+2] & p[4*j+1] & p[4*j] & gc[j]);
    end
    c[W] = gc[NG];
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

  initial assert (W % 4 == 0) else $error("cla_adder: W must be a multiple of 4");
endmodule

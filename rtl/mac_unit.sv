// mac_unit: the multiply-accumulate unit of the DECOR FIR filter (MAC).
//
// It consists of a delay register, the W x W (8x8 by default) Wallace tree
// multiplier, an adder
// (carry lookahead) and the accumulator register. In each active cycle it
// multiplies the sample x (from INPUT_MEM) by the coefficient difference d (from
// CODIFF_MEM) and adds the product to the stored accumulator value, all in the
// same clock period.
//
// The multiplier is unsigned, so the signed operands are handled in sign and
// magnitude: the magnitudes (at most 2^(W-1), which fits W unsigned bits) are
// multiplied and the product is negated when the signs differ. Accumulation is
// modulo 2^ACC_W; the DECOR output stays exact as long as the true filter output
// fits in ACC_W signed bits.
//
// Timing: the controller raises vld (and first, for the first product of an
// output) in the cycle the operands are loaded into INPUT_MEM / CODIFF_MEM. The
// delay register carries vld and first one cycle, to the cycle in which x and d
// are valid; at the end of that cycle acc <= (first ? 0 : acc) + x*d. The
// sign-magnitude wrapper and the control delay register are this design's own.
// Asynchronous active-low reset clears everything.
module mac_unit #(
  parameter int unsigned W     = 8,    // sample and coefficient-difference width
  parameter int unsigned ACC_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    vld,
  input  logic                    first,
  input  logic signed [W-1:0]     x,
  input  logic signed [W-1:0]     d,
  output logic signed [ACC_W-1:0] acc
);
  // Delay register: aligns the control with the registered operands.
  logic vld_d, first_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_d   <= 1'b0;
      first_d <= 1'b0;
    end else begin
      vld_d   <= vld;
      first_d <= first;
    end
  end

  // Sign-magnitude multiplication on the unsigned Wallace tree.
  logic [W-1:0]   mx, md;
  logic [2*W-1:0] pu;
  logic           neg;
  logic signed [ACC_W-1:0] prod;

  assign mx  = x[W-1] ? W'(-x) : W'(x);
  assign md  = d[W-1] ? W'(-d) : W'(d);
  assign neg = x[W-1] ^ d[W-1];

  wallace_mult #(.W(W)) u_mult (.a(mx), .b(md), .p(pu));

  always_comb begin
    prod = ACC_W'(pu);
    if (neg) prod = -prod;
  end

  // Adder and accumulator.
  logic [ACC_W-1:0] addend, sum;
  logic             unused_cout;
  assign addend = first_d ? '0 : acc;

  cla_adder #(.W(ACC_W)) u_add (
    .a(addend), .b(prod), .cin(1'b0), .sum(sum), .cout(unused_cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (vld_d) acc <= sum;
  end

  initial assert (ACC_W >= 2 * W) else $error("mac_unit: ACC_W must hold the 2W-bit product");
endmodule

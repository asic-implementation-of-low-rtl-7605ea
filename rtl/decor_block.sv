// decor_block: the DECOR block of the DECOR FIR filter.
//
// Undoes the coefficient transformation. The MAC sum S_j is the true output
// filtered by T(z) = (1 + ALPHA z^-BETA)^M, so the output is recovered as
//   Y_j = S_j - sum_{i=1..M} binom(M,i) * ALPHA^i * Y_{j-i*BETA}.
// With ALPHA = -1, BETA = 1 this is Y_j = S_j + Y_{j-1} for the default M = 1,
// S_j + 2Y_{j-1} - Y_{j-2} for M = 2 and S_j + 3Y_{j-1} - 3Y_{j-2} + Y_{j-3}
// for M = 3. The block keeps the previous M*BETA outputs in registers and adds
// their combination to S_j; the final addition is a carry lookahead adder.
// Arithmetic is modulo 2^ACC_W.
//
// Interface: y = acc + feedback is combinational. When upd is high (the cycle
// OUT_STORE loads y) the output history shifts by one, y becoming Y_{j-1}.
// Asynchronous active-low reset sets all previous outputs to zero, matching a
// filter whose input history is all zeros.
module decor_block
  import decor_fir_pkg::*;
#(
  parameter int unsigned M     = M_DEF,
  parameter int          ALPHA = ALPHA_DEF,
  parameter int unsigned BETA  = BETA_DEF,
  parameter int unsigned ACC_W = ACC_W_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    upd,
  input  logic signed [ACC_W-1:0] acc,
  output logic signed [ACC_W-1:0] y
);
  localparam int unsigned HL = M * BETA;

  logic signed [ACC_W-1:0] yh [HL];   // yh[i] = Y_{j-1-i}
  logic [ACC_W-1:0]        fb, sum;
  logic                    unused_cout;

  // Combination of previous outputs.
  always_comb begin
    fb = '0;
    for (int i = 1; i <= M; i++) begin
      fb = fb - ACC_W'(tz_weight(M, ALPHA, i)) * yh[i*BETA-1];
    end
  end

  cla_adder #(.W(ACC_W)) u_add (
    .a(acc), .b(fb), .cin(1'b0), .sum(sum), .cout(unused_cout));
  assign y = sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HL; i++) yh[i] <= '0;
    end else if (upd) begin
      yh[0] <= y;
      for (int i = 1; i < HL; i++) yh[i] <= yh[i-1];
    end
  end
endmodule

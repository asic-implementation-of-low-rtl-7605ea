// codiff_mem: the CODIFF_MEM register of the DECOR FIR filter.
//
// The coefficients are read from COEFF_ROM in order C_0, C_1, ...,
// C_{TAPS+M*BETA-1} (addresses past the table read zero). For each one this
// block forms the transformed coefficient, the coefficient sequence convolved
// with T(z) = (1 + ALPHA z^-BETA)^M:
//   D_k = sum_{i=0..M} binom(M,i) * ALPHA^i * C_{k-i*BETA}      (C_{<0} = 0).
// With the defaults (ALPHA = -1, BETA = 1, M = 1) this is the difference of
// adjacent coefficients: D_0 = C_0, D_k = C_k - C_{k-1}, D_TAPS = -C_{TAPS-1}.
// D_k is stored in an 8-bit (COEF_W) flip-flop register that feeds the MAC.
//
// Interface: when ld is high, c_in (the ROM word) is taken; first marks C_0 and
// clears the history of earlier coefficients. q is valid the cycle after ld.
// The history registers (M*BETA previous coefficients) and the subtractor are
// this design's way of producing the difference; the coefficient set must keep
// every D_k within COEF_W signed bits (checked by an assertion). Asynchronous
// active-low reset.
module codiff_mem
  import decor_fir_pkg::*;
#(
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned M      = M_DEF,
  parameter int          ALPHA  = ALPHA_DEF,
  parameter int unsigned BETA   = BETA_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ld,
  input  logic                     first,
  input  logic signed [COEF_W-1:0] c_in,
  output logic signed [COEF_W-1:0] q
);
  localparam int unsigned HL = M * BETA;          // coefficients remembered
  localparam int unsigned DW = COEF_W + M + 1;    // wide enough for any D_k

  logic signed [COEF_W-1:0] hist [HL];   // hist[i] = C_{k-1-i}
  logic signed [DW-1:0]     diff;

  always_comb begin
    diff = DW'(c_in);
    for (int i = 1; i <= M; i++) begin
      logic signed [DW-1:0] h;
      h = first ? '0 : DW'(hist[i*BETA-1]);
      diff = diff + DW'(tz_weight(M, ALPHA, i)) * h;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
      for (int i = 0; i < HL; i++) hist[i] <= '0;
    end else if (ld) begin
      q       <= diff[COEF_W-1:0];
      hist[0] <= c_in;
      for (int i = 1; i < HL; i++) hist[i] <= first ? '0 : hist[i-1];
    end
  end

  // Every transformed coefficient must fit in the register.
  a_diff_fits: assert property (@(posedge clk) disable iff (!rst_n)
    ld |-> (diff >= -(DW'(1) <<< (COEF_W-1))) && (diff < (DW'(1) <<< (COEF_W-1))));

  initial assert ((ALPHA == 1 || ALPHA == -1) && BETA >= 1 && M >= 1)
    else $error("codiff_mem: ALPHA must be +1 or -1, BETA and M at least 1");
endmodule

// decor_fir: low-power FIR filter core using the decorrelating (DECOR)
// transformation with first-order differential coefficients.
//
// The filter computes Y_j = sum_{k=0}^{N-1} C_k X_{j-k} (N = TAPS = 21 for a
// 20th-order filter) in the equivalent form
//   Y_j = C_0 X_j + sum_{k=1}^{N-1} (C_k - C_{k-1}) X_{j-k} - C_{N-1} X_{j-N} + Y_{j-1},
// so the multiplier sees the small differences of neighbouring coefficients
// instead of the coefficients themselves. This is the transformation
// T(z) = (1 + ALPHA z^-BETA)^M with ALPHA = -1, BETA = 1, M = 1; M (order of
// the coefficient difference) may be raised to 2 or 3, and ALPHA = +1 or
// BETA > 1 select the other forms of T(z) (ALPHA = +1 suits high-pass sets,
// whose neighbouring coefficients alternate in sign).
//
// Blocks: CONTROL (decor_control) sequences everything; X_RAM (x_ram) is a
// circular buffer of the last TAPS + M*BETA samples; COEFF_ROM (coeff_rom) holds the
// coefficients; INPUT_MEM and CODIFF_MEM register the sample and the
// coefficient difference for the MAC (mac_unit: delay register, Wallace tree
// multiplier, carry lookahead adder, accumulator); the DECOR block adds the
// previous output(s) back and OUT_STORE holds the result.
//
// Sizes: the defaults are the main configuration, 8-bit samples and
// coefficients, an 8x8 multiplier and a 16-bit output. DATA_W = 16 with
// ACC_W = 32 gives the 16-bit-input version (16x16 multiplier); TAPS = 36 the
// 35th-order filter; both then need a COEFS table of their own.
//
// Interface: a sample x_in is accepted when in_valid && in_ready. After its
// NPROD = TAPS + M*BETA products, y_out holds Y_j and out_valid pulses for
// one cycle, NPROD + 3 = 25 cycles after acceptance at the defaults; in_ready
// rises in the same cycle. After reset, in_ready stays low for NPROD cycles while X_RAM is
// cleared. y_out is exact while the true output fits in ACC_W signed bits (the
// default coefficient set guarantees it for 8-bit inputs).
module decor_fir
  import decor_fir_pkg::*;
#(
  parameter int unsigned TAPS   = TAPS_DEF,
  parameter int unsigned M      = M_DEF,
  parameter int          ALPHA  = ALPHA_DEF,   // T(z) = (1 + ALPHA z^-BETA)^M
  parameter int unsigned BETA   = BETA_DEF,
  parameter int unsigned DATA_W = DATA_W_DEF,   // sample width = multiplier width
  parameter int unsigned COEF_W = DATA_W,       // coefficient-difference width
  parameter int unsigned ACC_W  = ACC_W_DEF,
  parameter int          COEFS [TAPS] = COEFS_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  y_out
);
  localparam int unsigned DEPTH  = TAPS + M * BETA;   // samples kept = products per output
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned KW     = $clog2(DEPTH);

  logic          ram_we, ram_clr, ld, first, upd;
  logic [AW-1:0] ram_waddr, ram_raddr;
  logic [KW-1:0] rom_addr;

  logic signed [DATA_W-1:0] ram_rdata, x_q;
  logic signed [COEF_W-1:0] coef, d_q;
  logic signed [ACC_W-1:0]  acc, y;

  decor_control #(.TAPS(TAPS), .M(M), .BETA(BETA)) u_control (
    .clk, .rst_n, .in_valid, .in_ready,
    .ram_we, .ram_clr, .ram_waddr, .ram_raddr, .rom_addr,
    .ld, .first, .upd);

  x_ram #(.DEPTH(DEPTH), .DATA_W(DATA_W)) u_x_ram (
    .clk, .we(ram_we), .waddr(ram_waddr),
    .wdata(ram_clr ? '0 : x_in), .raddr(ram_raddr), .rdata(ram_rdata));

  coeff_rom #(.TAPS(TAPS), .COEF_W(COEF_W), .AW(KW), .COEFS(COEFS)) u_coeff_rom (
    .addr(rom_addr), .data(coef));

  input_mem #(.DATA_W(DATA_W)) u_input_mem (
    .clk, .rst_n, .ld, .d(ram_rdata), .q(x_q));

  codiff_mem #(.COEF_W(COEF_W), .M(M), .ALPHA(ALPHA), .BETA(BETA)) u_codiff_mem (
    .clk, .rst_n, .ld, .first, .c_in(coef), .q(d_q));

  mac_unit #(.W(DATA_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .vld(ld), .first, .x(x_q), .d(d_q), .acc);

  decor_block #(.M(M), .ALPHA(ALPHA), .BETA(BETA), .ACC_W(ACC_W)) u_decor (
    .clk, .rst_n, .upd, .acc, .y);

  out_store #(.ACC_W(ACC_W)) u_out_store (
    .clk, .rst_n, .ld(upd), .d(y), .q(y_out), .valid(out_valid));

  initial assert (COEF_W == DATA_W)
    else $error("decor_fir: the square multiplier needs COEF_W == DATA_W");
endmodule

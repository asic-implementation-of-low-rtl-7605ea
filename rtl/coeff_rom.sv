// coeff_rom: coefficient ROM of the DECOR FIR filter (COEFF_ROM).
//
// Holds the TAPS filter coefficients C_0 .. C_{TAPS-1} (the impulse response)
// as a constant table, COEFS (integers, stored as COEF_W-bit two's complement),
// whose default is the 21-tap low-pass set of decor_fir_pkg. The read is asynchronous: addr -> data in the same cycle. Any
// address at or past TAPS reads zero; the controller relies on this to form the
// trailing coefficient differences (C_N = 0 gives the -C_{N-1} term).
module coeff_rom
  import decor_fir_pkg::*;
#(
  parameter int unsigned TAPS   = TAPS_DEF,
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned AW     = 5,
  parameter int          COEFS [TAPS] = COEFS_DEF
) (
  input  logic [AW-1:0]            addr,
  output logic signed [COEF_W-1:0] data
);
  always_comb begin
    data = '0;
    for (int i = 0; i < TAPS; i++) begin
      if (int'(addr) == i) data = COEF_W'(COEFS[i]);
    end
  end
endmodule

// tb_decor_fir_configs: end-to-end checks of the filter in the other
// configurations it is built for, each against a direct-form convolution:
//   - 16-bit samples and coefficients, 20th order (21 taps), 32-bit output;
//   - 16-bit samples and coefficients, 35th order (36 taps), 32-bit output;
//   - default 8-bit filter with second-order coefficient differences (M = 2)
//     and with third-order differences (M = 3);
//   - the other forms of T(z) = (1 + ALPHA z^-BETA)^M: ALPHA = +1 on a
//     high-pass set (the default low-pass set with every odd coefficient
//     negated, so neighbouring sums are small), and BETA = 2 on the default set.
// The 16-bit coefficient tables are a deterministic pseudo-random set in
// [-1000, 999], from the recurrence s = s * 1103515245 + 12345 (mod 2^31),
// C = (s >> 8) mod 2000 - 1000; the values only need their differences to fit
// 16 bits and the output 32 bits.
module tb_decor_fir_configs;
  typedef int c21_t [21];
  typedef int c36_t [36];

  function automatic int lcg_next(input int s);
    return int'((longint'(s) * 1103515245 + 12345) % 64'h8000_0000);
  endfunction
  function automatic int lcg_coef(input int s);
    return ((s >>> 8) % 2000) - 1000;
  endfunction
  function automatic c21_t gen21();
    int s;
    c21_t c;
    s = 1;
    for (int k = 0; k < 21; k++) begin
      s = lcg_next(s);
      c[k] = lcg_coef(s);
    end
    return c;
  endfunction
  function automatic c36_t gen36();
    int s;
    c36_t c;
    s = 7;
    for (int k = 0; k < 36; k++) begin
      s = lcg_next(s);
      c[k] = lcg_coef(s);
    end
    return c;
  endfunction

  function automatic c21_t gen_hp();
    c21_t c;
    for (int k = 0; k < 21; k++) c[k] = (k % 2) ? -decor_fir_pkg::COEFS_DEF[k] : decor_fir_pkg::COEFS_DEF[k];
    return c;
  endfunction

  localparam c21_t C21 = gen21();
  localparam c21_t CHP = gen_hp();
  localparam c36_t C36 = gen36();

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks [6], failures [6];
  logic done [6];

  always #5 clk = ~clk;

  decor_fir_driver #(.TAPS(21), .M(1), .DATA_W(16), .ACC_W(32), .COEFS(C21), .NSAMP(150))
    u_w16_o20 (.clk, .rst_n, .checks(checks[0]), .failures(failures[0]), .done(done[0]));
  decor_fir_driver #(.TAPS(36), .M(1), .DATA_W(16), .ACC_W(32), .COEFS(C36), .NSAMP(150))
    u_w16_o35 (.clk, .rst_n, .checks(checks[1]), .failures(failures[1]), .done(done[1]));
  decor_fir_driver #(.TAPS(21), .M(2), .DATA_W(8), .ACC_W(16), .NSAMP(150))
    u_m2 (.clk, .rst_n, .checks(checks[2]), .failures(failures[2]), .done(done[2]));
  decor_fir_driver #(.TAPS(21), .M(3), .DATA_W(8), .ACC_W(16), .NSAMP(150))
    u_m3 (.clk, .rst_n, .checks(checks[3]), .failures(failures[3]), .done(done[3]));
  decor_fir_driver #(.TAPS(21), .M(1), .ALPHA(1), .BETA(1), .DATA_W(8), .ACC_W(16), .COEFS(CHP),
                     .NSAMP(150))
    u_a1 (.clk, .rst_n, .checks(checks[4]), .failures(failures[4]), .done(done[4]));
  decor_fir_driver #(.TAPS(21), .M(1), .ALPHA(-1), .BETA(2), .DATA_W(8), .ACC_W(16), .NSAMP(150))
    u_b2 (.clk, .rst_n, .checks(checks[5]), .failures(failures[5]), .done(done[5]));

  int total_checks, total_failures;

  task automatic report();
    total_checks = 0;
    total_failures = 0;
    for (int i = 0; i < 6; i++) begin
      total_checks   += checks[i];
      total_failures += failures[i];
      // Each configuration must have produced all its outputs.
      total_checks++;
      if (!done[i]) begin
        total_failures++;
        $display("configuration %0d did not finish", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
  endtask

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    @(posedge clk);
    report();
    $finish;
  end
endmodule

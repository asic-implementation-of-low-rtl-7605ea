// tb_codiff_mem: self-check of the CODIFF_MEM coefficient-difference register.
// Streams random coefficient sets (21 values, then M trailing zeros as the ROM
// reads past its end) into a default M = 1 instance and an M = 2 instance, and
// compares each registered difference with the one computed in the testbench
// from the stream: C_k - C_{k-1} and C_k - 2C_{k-1} + C_{k-2}. A third
// instance (ALPHA = +1, BETA = 2) must give C_k + C_{k-2}.
module tb_codiff_mem;
  localparam int TAPS = 21;
  logic              clk = 1'b0, rst_n = 1'b0, ld = 1'b0, first = 1'b0;
  logic signed [7:0] c1 = '0, c2 = '0, q1, q2, q3;
  int checks = 0, failures = 0;

  codiff_mem dut1 (.clk, .rst_n, .ld, .first, .c_in(c1), .q(q1));
  codiff_mem #(.COEF_W(8), .M(2)) dut2 (.clk, .rst_n, .ld, .first, .c_in(c2), .q(q2));
  // ALPHA = +1, BETA = 2: D_k = C_k + C_{k-2}, fed the M = 2 stream.
  codiff_mem #(.COEF_W(8), .M(1), .ALPHA(1), .BETA(2)) dut3 (
    .clk, .rst_n, .ld, .first, .c_in(c2), .q(q3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // len values are streamed; a short set restarts with nonzero history, which
  // first must clear.
  task automatic run_set(input int len);
    int s1 [TAPS + 2], s2 [TAPS + 2];
    for (int k = 0; k < TAPS + 2; k++) begin
      s1[k] = (k < TAPS) ? $urandom_range(0, 127) - 64 : 0;
      s2[k] = (k < TAPS) ? $urandom_range(0, 63) - 32 : 0;
    end
    for (int k = 0; k < len; k++) begin
      int e1, e2, e3, p1, p2, pp2;
      @(negedge clk);
      // Occasionally hold ld low for a cycle: nothing may change.
      if ($urandom_range(0, 5) == 0) begin
        ld = 1'b0;
        @(negedge clk);
      end
      ld    = 1'b1;
      first = (k == 0);
      c1    = 8'(s1[k]);
      c2    = 8'(s2[k]);
      p1  = (k >= 1) ? s1[k-1] : 0;
      p2  = (k >= 1) ? s2[k-1] : 0;
      pp2 = (k >= 2) ? s2[k-2] : 0;
      e1 = s1[k] - p1;
      e2 = s2[k] - 2 * p2 + pp2;
      e3 = s2[k] + pp2;
      @(posedge clk);
      #1;
      checks += 3;
      if (int'(q3) != e3) begin
        failures++;
        if (failures < 10) $display("ALPHA=1 BETA=2 k=%0d: %0d expected %0d", k, q3, e3);
      end
      if (int'(q1) != e1) begin
        failures++;
        if (failures < 10) $display("M=1 k=%0d: %0d expected %0d", k, q1, e1);
      end
      if (k < TAPS + 2 && int'(q2) != e2) begin
        failures++;
        if (failures < 10) $display("M=2 k=%0d: %0d expected %0d", k, q2, e2);
      end
    end
    @(negedge clk);
    ld = 1'b0;
    first = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 50; n++) run_set(TAPS + 2);
    for (int n = 0; n < 50; n++) run_set($urandom_range(2, TAPS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

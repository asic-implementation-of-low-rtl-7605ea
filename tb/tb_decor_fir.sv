// tb_decor_fir: end-to-end self-check of the DECOR FIR filter at its default
// parameters (20th order, 21 coefficients, M = 1, 8-bit samples, 16-bit output).
//
// The reference is the direct-form convolution y_j = sum_k C_k x_{j-k}, taken
// modulo 2^16, computed in the testbench from the package's default coefficient
// set; it does not use the differenced form. Phases: an impulse (the output
// must reproduce the coefficients), full-scale +127 / -128 samples, and random
// samples offered with random gaps and with in_valid held while the filter is
// busy. Checked: every output value, the 25-cycle latency from acceptance to
// out_valid, the length of the X_RAM clear after reset, and that each
// mechanism (clear sweep, input stall, circular-buffer wrap, negative operand,
// nonzero DECOR feedback) happened at least once.
module tb_decor_fir;
  import decor_fir_pkg::*;

  localparam int TAPS    = TAPS_DEF;
  localparam int NPROD   = TAPS + M_DEF;
  localparam int LATENCY = NPROD + 3;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              in_valid = 1'b0;
  logic              in_ready;
  logic signed [7:0] x_in = '0;
  logic              out_valid;
  logic signed [15:0] y_out;

  int checks = 0, failures = 0;
  int n_clear = 0, n_stall = 0, n_wrap = 0, n_neg = 0, n_fb = 0;
  int cycle = 0;

  logic signed [7:0] hist [$];   // accepted samples, newest first

  decor_fir dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .out_valid, .y_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid && !in_ready) n_stall++;

  function automatic logic signed [15:0] ref_y();
    int s;
    s = 0;
    for (int k = 0; k < TAPS && k < hist.size(); k++) s += int'(COEFS_DEF[k]) * int'(hist[k]);
    return 16'(s);
  endfunction

  logic signed [15:0] prev_y = '0;
  logic signed [15:0] exp_q [$];
  int                 t_acc_q [$];
  int                 n_out = 0;

  // Acceptance monitor: records the expected output and the acceptance cycle.
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      hist.push_front(x_in);
      if (hist.size() > NPROD && (hist.size() % NPROD) == 1) n_wrap++;
      if (x_in < 0) n_neg++;
      exp_q.push_back(ref_y());
      t_acc_q.push_back(cycle);
    end
  end

  // Output monitor: value and latency of every output.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic signed [15:0] e;
      int t0;
      n_out++;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("output without a sample");
      end else begin
        e  = exp_q.pop_front();
        t0 = t_acc_q.pop_front();
        if (y_out !== e) begin
          failures++;
          if (failures < 10) $display("output %0d: y=%0d expected %0d", n_out, y_out, e);
        end
        if (cycle - t0 != LATENCY) begin
          failures++;
          $display("latency %0d cycles, expected %0d", cycle - t0, LATENCY);
        end
      end
      if (prev_y != 0) n_fb++;
      prev_y = y_out;
    end
  end

  // Offer one sample after gap idle cycles and return once it is accepted.
  // With gap 0 in_valid stays high from the previous acceptance, so the
  // sample waits (stalls) while the filter is busy.
  task automatic send(input logic signed [7:0] x, input int gap);
    if (gap > 0) begin
      #1 in_valid = 1'b0;
      repeat (gap) @(posedge clk);
    end
    #1;
    in_valid = 1'b1;
    x_in     = x;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
  endtask

  task automatic check_mech(input string name, input int n);
    checks++;
    $display("%-22s happened %0d times", name, n);
    if (n == 0) begin
      failures++;
      $display("mechanism %s never happened", name);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // X_RAM clear sweep: in_ready stays low for NPROD cycles.
    while (!in_ready) begin
      @(posedge clk);
      #1 n_clear++;
    end
    checks++;
    if (n_clear != NPROD) begin
      failures++;
      $display("clear sweep took %0d cycles, expected %0d", n_clear, NPROD);
    end

    // Impulse response.
    send(8'sd1, 0);
    for (int i = 0; i < TAPS + 3; i++) send(8'sd0, i % 3);
    // Full-scale samples.
    for (int i = 0; i < 30; i++) send(8'sd127, 0);
    for (int i = 0; i < 30; i++) send(-8'sd128, 0);
    for (int i = 0; i < 30; i++) send((i % 2) ? 8'sd127 : -8'sd128, 0);
    // Random samples, random gaps, some offered early (stall).
    for (int i = 0; i < 300; i++) begin
      logic signed [7:0] x;
      x = 8'($urandom);
      if ($urandom_range(0, 3) == 0) begin
        // Hold in_valid from right after acceptance of the previous sample.
        send(x, 0);
      end else begin
        send(x, $urandom_range(0, 4));
      end
    end
    #1 in_valid = 1'b0;
    // Drain the last output.
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (n_out != hist.size()) begin
      failures++;
      $display("%0d outputs for %0d samples", n_out, hist.size());
    end

    check_mech("clear sweep", n_clear);
    check_mech("input stall", n_stall);
    check_mech("buffer wrap", n_wrap);
    check_mech("negative operand", n_neg);
    check_mech("DECOR feedback", n_fb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

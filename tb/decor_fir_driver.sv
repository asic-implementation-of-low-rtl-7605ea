// decor_fir_driver: testbench helper that exercises one decor_fir instance of
// a given configuration and checks it.
//
// It offers NSAMP samples back to back (in_valid held high, so each one waits
// while the filter is busy): first full-scale values (most negative, most
// positive, alternating), then random ones. Every output is compared with the
// direct-form convolution sum_k COEFS[k] * x_{j-k}, taken modulo 2^ACC_W, and
// its latency with TAPS + M*BETA + 3 cycles. checks and failures count the results;
// done rises when all outputs have been seen.
module decor_fir_driver #(
  parameter int unsigned TAPS   = 21,
  parameter int unsigned M      = 1,
  parameter int          ALPHA  = -1,
  parameter int unsigned BETA   = 1,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 16,
  parameter int          COEFS [TAPS] = decor_fir_pkg::COEFS_DEF,
  parameter int          NSAMP  = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LATENCY = TAPS + M * BETA + 3;

  logic                     in_valid, in_ready, out_valid;
  logic signed [DATA_W-1:0] x_in;
  logic signed [ACC_W-1:0]  y_out;

  decor_fir #(.TAPS(TAPS), .M(M), .ALPHA(ALPHA), .BETA(BETA), .DATA_W(DATA_W), .COEF_W(DATA_W), .ACC_W(ACC_W),
              .COEFS(COEFS)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .x_in, .out_valid, .y_out);

  longint hist [$];
  longint exp_q [$];
  int     t_q [$];
  int     cycle = 0;
  int     n_in = 0, n_out = 0;

  function automatic logic signed [DATA_W-1:0] sample(input int n);
    logic signed [DATA_W-1:0] mn, mx;
    mn = {1'b1, {(DATA_W-1){1'b0}}};
    mx = {1'b0, {(DATA_W-1){1'b1}}};
    if (n < TAPS + 2)     return mn;
    if (n < 2 * TAPS + 4) return mx;
    if (n < 3 * TAPS + 6) return (n % 2) ? mx : mn;
    return DATA_W'($urandom);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      in_valid <= 1'b0;
      x_in     <= '0;
      checks   <= 0;
      failures <= 0;
      done     <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        longint s;
        hist.push_front(longint'(x_in));
        s = 0;
        for (int k = 0; k < int'(TAPS) && k < hist.size(); k++) s += longint'(COEFS[k]) * hist[k];
        exp_q.push_back(s);
        t_q.push_back(cycle);
        n_in++;
      end
      // Offer the next sample as soon as the current one is taken.
      if (!in_valid || in_ready) begin
        in_valid <= (n_in < NSAMP);
        x_in     <= sample(n_in);
      end
      if (out_valid) begin
        longint e;
        int     t0;
        e  = exp_q.pop_front();
        t0 = t_q.pop_front();
        n_out++;
        checks <= checks + 2;
        if (y_out !== ACC_W'(e) || cycle - t0 != LATENCY) begin
          failures <= failures + 1 + int'(y_out !== ACC_W'(e) && cycle - t0 != LATENCY);
          $display("TAPS=%0d M=%0d ALPHA=%0d BETA=%0d W=%0d: output %0d y=%0d expected %0d, latency %0d",
                   TAPS, M, ALPHA, BETA, DATA_W, n_out, y_out, ACC_W'(e), cycle - t0);
        end
        if (n_out == NSAMP) done <= 1'b1;
      end
    end
  end
endmodule

// tb_decor_block: self-check of the DECOR block for M = 1 (default), 2 and 3.
// Feeds random accumulator values, with random update cycles, and compares the
// combinational output with Y_j = S_j + Y_{j-1}, S_j + 2Y_{j-1} - Y_{j-2} and
// S_j + 3Y_{j-1} - 3Y_{j-2} + Y_{j-3} (modulo 2^16), from a model history.
// A fourth instance (ALPHA = +1, BETA = 2) must give Y_j = S_j - Y_{j-2}.
module tb_decor_block;
  logic               clk = 1'b0, rst_n = 1'b0, upd = 1'b0;
  logic signed [15:0] acc = '0, y1, y2, y3, y4;
  int checks = 0, failures = 0;

  decor_block dut1 (.clk, .rst_n, .upd, .acc, .y(y1));
  decor_block #(.M(2), .ACC_W(16)) dut2 (.clk, .rst_n, .upd, .acc, .y(y2));
  decor_block #(.M(3), .ACC_W(16)) dut3 (.clk, .rst_n, .upd, .acc, .y(y3));
  // ALPHA = +1, BETA = 2: Y_j = S_j - Y_{j-2}.
  decor_block #(.M(1), .ALPHA(1), .BETA(2), .ACC_W(16)) dut4 (.clk, .rst_n, .upd, .acc, .y(y4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string tag, input logic signed [15:0] got, input int e);
    checks++;
    if (got !== 16'(e)) begin
      failures++;
      if (failures < 10) $display("%s: %0d expected %0d", tag, got, 16'(e));
    end
  endtask

  initial begin
    int h1 [1], h2 [2], h3 [3], h4 [2];
    h1 = '{default: 0}; h2 = '{default: 0}; h3 = '{default: 0}; h4 = '{default: 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      int e1, e2, e3, e4;
      @(negedge clk);
      acc = 16'($urandom);
      upd = 1'($urandom_range(0, 2) != 0);
      #1;
      e1 = int'(acc) + h1[0];
      e2 = int'(acc) + 2 * h2[0] - h2[1];
      e3 = int'(acc) + 3 * h3[0] - 3 * h3[1] + h3[2];
      cmp("M=1", y1, e1);
      cmp("M=2", y2, e2);
      e4 = int'(acc) - h4[1];
      cmp("M=3", y3, e3);
      cmp("ALPHA=1 BETA=2", y4, e4);
      @(posedge clk);
      if (upd) begin
        h1[0] = int'(16'(e1));
        h2[1] = h2[0]; h2[0] = int'(16'(e2));
        h3[2] = h3[1]; h3[1] = h3[0]; h3[0] = int'(16'(e3));
        // keep the model history as signed 16-bit values
        h1[0] = int'($signed(16'(h1[0])));
        h2[0] = int'($signed(16'(h2[0])));
        h3[0] = int'($signed(16'(h3[0])));
        h4[1] = h4[0]; h4[0] = int'($signed(16'(e4)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_out_store: self-check of the OUT_STORE register: reset, load on ld, hold
// without ld, and the one-cycle valid pulse after each load.
module tb_out_store;
  logic               clk = 1'b0, rst_n = 1'b0, ld = 1'b0;
  logic signed [15:0] d = '0, q, model;
  logic               valid;
  int checks = 0, failures = 0;

  out_store #(.ACC_W(16)) dut (.clk, .rst_n, .ld, .d, .q, .valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (q !== 16'sd0 || valid !== 1'b0) begin failures++; $display("reset state wrong"); end
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      logic l;
      @(negedge clk);
      l  = 1'($urandom_range(0, 2) == 0);
      ld = l;
      d  = 16'($urandom);
      @(posedge clk);
      if (l) model = d;
      #1;
      checks += 2;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: q=%0d expected %0d", i, q, model);
      end
      if (valid !== l) begin
        failures++;
        if (failures < 10) $display("cycle %0d: valid=%b expected %b", i, valid, l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

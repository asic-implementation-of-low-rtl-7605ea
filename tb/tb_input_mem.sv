// tb_input_mem: self-check of the INPUT_MEM register: reset value, load on ld
// and hold without ld, with random data, against a model register.
module tb_input_mem;
  logic              clk = 1'b0, rst_n = 1'b0, ld = 1'b0;
  logic signed [7:0] d = '0, q, model;
  int checks = 0, failures = 0;

  input_mem #(.DATA_W(8)) dut (.clk, .rst_n, .ld, .d, .q);

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
    if (q !== 8'sd0) begin failures++; $display("reset value %0d", q); end
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ld = 1'($urandom_range(0, 1));
      d  = 8'($urandom);
      @(posedge clk);
      if (ld) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: q=%0d expected %0d", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

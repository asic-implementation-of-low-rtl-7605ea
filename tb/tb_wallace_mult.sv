// tb_wallace_mult: self-check of the Wallace tree multiplier. The default
// 8x8 instance is tested exhaustively (all 65,536 operand pairs); a 16x16
// instance (two merge levels after stage A) gets corner operands and 200,000
// random pairs. Products are compared with the integer product a*b.
module tb_wallace_mult;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;

  wallace_mult dut (.a(a), .b(b), .p(p));
  wallace_mult #(.W(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] e;
    a16 = x; b16 = y;
    #1;
    e = 32'(x) * 32'(y);
    checks++;
    if (p16 !== e) begin
      failures++;
      if (failures < 10) $display("16x16 %0d*%0d: got %0d expected %0d", x, y, p16, e);
    end
  endtask

  initial begin
    a16 = '0; b16 = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("8x8 %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    check16(16'hffff, 16'hffff);
    check16(16'h8000, 16'h8000);
    check16(16'hffff, 16'h0001);
    for (int i = 0; i < 16; i++) check16(16'hffff, 16'(1) << i);
    for (int i = 0; i < 200_000; i++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

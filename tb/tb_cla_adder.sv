// tb_cla_adder: self-check of the 16-bit carry lookahead adder. Random operand
// pairs and carry-ins, plus corner cases that propagate a carry through every
// bit, compared with the integer sum (17 bits: sum and carry-out).
module tb_cla_adder;
  logic [15:0] a, b, s;
  logic        cin, cout;
  int checks = 0, failures = 0;

  cla_adder #(.W(16)) dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] e;
    a = x; b = y; cin = c;
    #1;
    e = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({cout, s} !== e) begin
      failures++;
      if (failures < 10) $display("%h + %h + %b: got %h expected %h", x, y, c, {cout, s}, e);
    end
  endtask

  initial begin
    check(16'hffff, 16'h0000, 1'b1);
    check(16'hffff, 16'hffff, 1'b1);
    check(16'h8000, 16'h8000, 1'b0);
    check(16'h0fff, 16'h0001, 1'b0);
    check(16'h0000, 16'h0000, 1'b0);
    for (int i = 0; i < 16; i++) check(16'hffff >> i, 16'h1, 1'b0);
    for (int i = 0; i < 100_000; i++) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

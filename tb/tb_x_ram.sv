// tb_x_ram: self-check of the input-sample RAM (22 words of 8 bits). Writes
// random data to random addresses, keeping a model array, and checks the
// asynchronous read of every word after each write; also checks that a write
// with we low changes nothing.
module tb_x_ram;
  localparam int DEPTH = 22;
  logic       clk = 1'b0;
  logic       we = 1'b0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  x_ram #(.DEPTH(DEPTH), .DATA_W(8)) dut (
    .clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input logic [7:0] d, input logic en);
    @(negedge clk);
    we = en; waddr = 5'(a); wdata = d;
    @(negedge clk);
    we = 1'b0;
    if (en) model[a] = d;
  endtask

  task automatic check_all();
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 5'(i);
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        if (failures < 10) $display("word %0d: %h expected %h", i, rdata, model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) write(i, 8'(i * 7 + 3), 1'b1);
    check_all();
    for (int n = 0; n < 300; n++) begin
      write($urandom_range(0, DEPTH - 1), 8'($urandom), 1'($urandom_range(0, 4) != 0));
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mac_unit: self-check of the MAC unit. Each cycle the testbench chooses a
// valid flag, a first flag and two signed 8-bit operands; the flags go to the
// MAC in that cycle and the operands one cycle later, as the INPUT_MEM and
// CODIFF_MEM registers deliver them. A model accumulator (clear on first,
// otherwise add x*d, modulo 2^16) is compared after every clock. Operands
// include -128 and 127.
module tb_mac_unit;
  logic               clk = 1'b0, rst_n = 1'b0, vld = 1'b0, first = 1'b0;
  logic signed [7:0]  x = '0, d = '0;
  logic signed [15:0] acc;
  int checks = 0, failures = 0;

  mac_unit #(.W(8), .ACC_W(16)) dut (.clk, .rst_n, .vld, .first, .x, .d, .acc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [7:0] pick();
    case ($urandom_range(0, 7))
      0: return -8'sd128;
      1: return 8'sd127;
      2: return 8'sd0;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    logic               v_p = 1'b0, f_p = 1'b0;
    logic signed [15:0] model = '0;
    int n_first = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20_000; i++) begin
      logic v, f;
      logic signed [7:0] nx, nd;
      v  = 1'($urandom_range(0, 4) != 0);
      f  = v && ($urandom_range(0, 21) == 0);
      nx = pick();
      nd = pick();
      @(negedge clk);
      vld = v; first = f;
      x = nx; d = nd;          // operands of the previous cycle's flags
      // model: flags of the previous cycle act on this cycle's operands
      @(posedge clk);
      if (v_p) model = f_p ? 16'(int'(nx) * int'(nd)) : 16'(int'(model) + int'(nx) * int'(nd));
      if (f_p) n_first++;
      v_p = v; f_p = f;
      #1;
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: acc=%0d expected %0d", i, acc, model);
      end
    end
    checks++;
    if (n_first == 0) begin failures++; $display("no accumulator clear exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

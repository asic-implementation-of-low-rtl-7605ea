// tb_coeff_rom: self-check of the coefficient ROM. Reads every address of a
// 5-bit address space and compares with an independently written copy of the
// 21 default coefficients; addresses 21..31 must read zero.
module tb_coeff_rom;
  logic [4:0]        addr;
  logic signed [7:0] data;
  int checks = 0, failures = 0;

  // Expected contents, written out independently of the package.
  int expected [21] = '{0, 0, -1, -1, 2, 3, -4, -10, 6, 39, 58, 39, 6, -10, -4, 3,
                        2, -1, -1, 0, 0};

  coeff_rom dut (.addr(addr), .data(data));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int e;
      addr = 5'(i);
      #1;
      e = (i < 21) ? expected[i] : 0;
      checks++;
      if (int'(data) != e) begin
        failures++;
        $display("addr %0d: %0d expected %0d", i, data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_decor_control: self-check of the filter controller's schedule at the
// default size (21 taps, M = 1: 22 products, 22-word buffer). Checks the clear
// sweep after reset (addresses 0..21 with the clear flag), then for 60 samples
// offered with random gaps: the write address of each sample (next word of the
// circular buffer), the 22 RUN cycles (ld, first only at k = 0, ROM address k,
// RAM read address cur - k mod 22), one idle cycle, the single upd cycle, and
// in_ready low from acceptance until 25 cycles later.
module tb_decor_control;
  localparam int TAPS = 21, M = 1, NPROD = TAPS + M, DEPTH = TAPS + M;
  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic       in_ready, ram_we, ram_clr, ld, first, upd;
  logic [4:0] ram_waddr, ram_raddr, rom_addr;
  int checks = 0, failures = 0;

  decor_control dut (.clk, .rst_n, .in_valid, .in_ready, .ram_we, .ram_clr,
                     .ram_waddr, .ram_raddr, .rom_addr, .ld, .first, .upd);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_that(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    int cur;
    cur = DEPTH - 1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Clear sweep, sampled mid-cycle.
    for (int i = 0; i < DEPTH; i++) begin
      #1;
      expect_that(ram_we && ram_clr && int'(ram_waddr) == i && !in_ready && !ld,
                  $sformatf("clear cycle %0d wrong", i));
      @(negedge clk);
    end
    for (int n = 0; n < 60; n++) begin
      int gap;
      gap = $urandom_range(0, 3);
      for (int g = 0; g < gap; g++) begin
        expect_that(in_ready && !ram_we && !ld && !upd, "idle outputs wrong");
        @(negedge clk);
      end
      expect_that(in_ready, "not ready in idle");
      in_valid = 1'b1;
      #1;
      cur = (cur + 1) % DEPTH;
      expect_that(ram_we && !ram_clr && int'(ram_waddr) == cur, "sample write wrong");
      @(negedge clk);
      in_valid = 1'b1;   // held high: must be ignored while busy
      for (int k = 0; k < NPROD; k++) begin
        int ra;
        ra = (cur - k + DEPTH) % DEPTH;
        expect_that(ld && (first == (k == 0)) && int'(rom_addr) == k && int'(ram_raddr) == ra
                    && !in_ready && !ram_we && !upd,
                    $sformatf("run cycle k=%0d wrong (raddr %0d expected %0d)", k, ram_raddr, ra));
        @(negedge clk);
      end
      expect_that(!ld && !upd && !in_ready && !ram_we, "wait cycle wrong");
      @(negedge clk);
      expect_that(upd && !ld && !in_ready && !ram_we, "done cycle wrong");
      @(negedge clk);
      in_valid = 1'b0;
      #1;
      expect_that(in_ready && !upd, "ready not back after 25 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// input_mem: the INPUT_MEM register of the DECOR FIR filter.
//
// A DATA_W-bit (8-bit) flip-flop register that captures the sample read from
// X_RAM when ld is high, so that the operand reaches the MAC multiplier in step
// with the clock. It holds its value otherwise and resets to zero
// (asynchronous, active-low rst_n). One cycle latency from d to q.
module input_mem #(
  parameter int unsigned DATA_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ld,
  input  logic signed [DATA_W-1:0] d,
  output logic signed [DATA_W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end
endmodule

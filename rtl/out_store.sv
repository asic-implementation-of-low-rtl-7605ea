// out_store: the OUT_STORE register of the DECOR FIR filter.
//
// An ACC_W-bit (16-bit) flip-flop register that loads the filter output Y_j when
// ld is high and holds it until the next output. valid is a one-cycle pulse in
// the cycle after a load, marking that q holds a new output. Asynchronous,
// active-low reset clears q and valid.
module out_store #(
  parameter int unsigned ACC_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ld,
  input  logic signed [ACC_W-1:0] d,
  output logic signed [ACC_W-1:0] q,
  output logic                    valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= ld;
      if (ld) q <= d;
    end
  end
endmodule

// x_ram: input-sample RAM of the DECOR FIR filter (X_RAM).
//
// DEPTH words of DATA_W bits, used by the controller as a circular buffer of the
// newest DEPTH input samples X_j, X_{j-1}, ... One synchronous write port (we,
// waddr, wdata, written at the rising clock edge) and one asynchronous read
// port (raddr -> rdata in the same cycle); the read data is captured by the
// INPUT_MEM register. The array has no reset: after reset the controller writes
// zero to every word before it accepts a sample. Flip-flop or latch-array
// implementation is left to synthesis; the storage style is this design's choice.
module x_ram #(
  parameter int unsigned DEPTH  = 22,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule

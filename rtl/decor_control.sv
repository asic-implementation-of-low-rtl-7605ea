// decor_control: the CONTROL block of the DECOR FIR filter.
//
// Sequences one time-shared MAC through the TAPS + M*BETA products of each
// output (TAPS + 1 = 22 at the defaults M = 1, BETA = 1):
//
//   CLEAR  after reset, writes zero into every X_RAM word (one per cycle), so
//          the filter starts from an all-zero input history as the DECOR
//          recursion requires.
//   IDLE   in_ready is high; when in_valid is high the sample is written into
//          the next circular-buffer word of X_RAM (cur advances) -> RUN.
//   RUN    NPROD = TAPS + M*BETA cycles, k = 0 .. NPROD-1: X_RAM read address
//          cur - k (mod DEPTH), i.e. X_{j-k}, COEFF_ROM address k; ld loads
//          INPUT_MEM and CODIFF_MEM, with first marking k = 0.
//   WAIT   the MAC adds the last product.
//   DONE   upd: the DECOR block forms Y_j, OUT_STORE loads it and the output
//          history shifts -> IDLE.
//
// A sample accepted in cycle 0 gives out_valid (from OUT_STORE) in cycle
// NPROD + 3, which is also the first cycle in_ready is high again: one output
// every NPROD + 3 = 25 cycles at the defaults. The X_RAM holds DEPTH = NPROD
// samples, X_j back to X_{j-NPROD+1}. The state encoding and this
// schedule are this design's own; the source design describes only the controller's role.
module decor_control #(
  parameter int unsigned TAPS  = 21,
  parameter int unsigned M     = 1,
  parameter int unsigned BETA  = 1,
  localparam int unsigned NPROD = TAPS + M * BETA,
  localparam int unsigned DEPTH = TAPS + M * BETA,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned KW    = $clog2(NPROD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          ram_we,
  output logic          ram_clr,     // write data is zero (clearing)
  output logic [AW-1:0] ram_waddr,
  output logic [AW-1:0] ram_raddr,
  output logic [KW-1:0] rom_addr,
  output logic          ld,          // load INPUT_MEM / CODIFF_MEM, MAC operand valid
  output logic          first,       // first product of an output
  output logic          upd          // DECOR update and OUT_STORE load
);
  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_RUN, S_WAIT, S_DONE} state_t;

  state_t        state;
  logic [AW-1:0] cur;    // X_RAM word of the newest sample
  logic [AW-1:0] cnt;    // clear address
  logic [KW-1:0] k;      // product index

  logic [AW-1:0] nxt;
  assign nxt = (int'(cur) == DEPTH - 1) ? '0 : cur + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLEAR;
      cur   <= AW'(DEPTH - 1);
      cnt   <= '0;
      k     <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == DEPTH - 1) state <= S_IDLE;
        end
        S_IDLE: begin
          if (in_valid) begin
            cur   <= nxt;
            k     <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          k <= k + 1'b1;
          if (int'(k) == NPROD - 1) state <= S_WAIT;
        end
        S_WAIT: state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_CLEAR;
      endcase
    end
  end

  always_comb begin
    in_ready  = (state == S_IDLE);
    ram_clr   = (state == S_CLEAR);
    ram_we    = ram_clr || (in_ready && in_valid);
    ram_waddr = ram_clr ? cnt : nxt;
    ram_raddr = (cur >= AW'(k)) ? cur - AW'(k) : AW'(int'(cur) + DEPTH - int'(k));
    rom_addr  = k;
    ld        = (state == S_RUN);
    first     = ld && (k == '0);
    upd       = (state == S_DONE);
  end

  // X_RAM is never addressed past its last word; a sample is only taken in IDLE.
  a_waddr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    ram_we |-> int'(ram_waddr) < DEPTH);
  a_raddr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    ld |-> int'(ram_raddr) < DEPTH);
  a_accept_in_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (ram_we && !ram_clr) |-> in_ready);
endmodule

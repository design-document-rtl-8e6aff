// drop_timer: the fall timer used in the hold state.
//
// A prescaler divides the clock into ticks of TICK_CYCLES cycles (1 ms at
// the 100 MHz system clock with the default). The timer counts ticks up to
// the speed value, the fall interval in ticks, and then raises expired,
// which stays high until restart. restart clears both counters; it is
// pulsed by the FSM when a new block appears and whenever the block falls
// one row. A speed of 0 behaves as 1. The tick length is this design's
// choice; the 16-bit speed value comes from the game's speed register.
module drop_timer #(
  parameter int unsigned TICK_CYCLES = 100_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,       // count only while a game is running
  input  logic        restart,
  input  logic [15:0] speed,     // fall interval in ticks
  output logic        expired
);

  localparam int unsigned PW = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;

  logic [PW-1:0] pre_q;
  logic [15:0]   ticks_q;
  logic          tick;
  logic [15:0]   limit;

  assign tick  = (pre_q == PW'(TICK_CYCLES - 1));
  assign limit = (speed == 16'd0) ? 16'd1 : speed;

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      pre_q   <= '0;
      ticks_q <= '0;
      expired <= 1'b0;
    end else if (run && !expired) begin
      pre_q <= tick ? '0 : pre_q + 1'b1;
      if (tick) begin
        ticks_q <= ticks_q + 16'd1;
        if (ticks_q + 16'd1 >= limit) expired <= 1'b1;
      end
    end
  end

endmodule

// duration_timer: times how long a note sounds.
//
// The count pulse period is the shortest note of the piece: UNIT_CYCLES
// clock cycles (an eighth note at 120 beats per minute, 0.25 s at 100 MHz,
// by default). A start pulse loads len, the note length in units; busy is
// high for len * UNIT_CYCLES cycles after start, and done is high for the
// one cycle that follows. len = 0 ends after one cycle. With an eighth-note unit,
// a quarter note is len 2 and a whole note len 8. The unit length is this
// design's choice.
module duration_timer #(
  parameter int unsigned UNIT_CYCLES = 25_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [15:0] len,
  output logic        busy,
  output logic        done
);

  localparam int unsigned UW = (UNIT_CYCLES > 1) ? $clog2(UNIT_CYCLES) : 1;

  logic [UW-1:0] pre_q;
  logic [15:0]   left_q;
  logic          unit_end;

  assign unit_end = (pre_q == UW'(UNIT_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      pre_q  <= '0;
      left_q <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        pre_q  <= '0;
        left_q <= len;
        busy   <= 1'b1;
      end else if (busy) begin
        if (left_q == 16'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (unit_end) begin
          pre_q  <= '0;
          left_q <= left_q - 16'd1;
          if (left_q == 16'd1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          pre_q <= pre_q + 1'b1;
        end
      end
    end
  end

endmodule

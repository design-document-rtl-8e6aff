// tone_gen: the buzzer's pitch divider.
//
// A count pulse of COUNT_HZ (3 MHz) is made from the CLK_HZ system clock by
// a fractional accumulator, so its average rate is exact even though
// 100 MHz / 3 MHz is not an integer (pulses are 33 or 34 cycles apart).
// A 14-bit counter is loaded with the preset 16384 - N, counts count
// pulses up to 16383 and overflows, which reloads it: a modulo-N counter
// whose overflow rate is COUNT_HZ / N. Each overflow toggles the buzzer,
// so the buzzer square wave has frequency COUNT_HZ / (2N). An octave is
// raised or lowered, without changing N, by doubling or halving the count
// pulse rate (octave = 1 up, 2 down, 0 or 3 as given). N = 0 is silence
// (buzzer held low). A change of N or octave takes effect at the next
// overflow, or at once when leaving silence. The preset formula is taken
// from the pitch table's preset column; the accumulator is this design's.
module tone_gen #(
  parameter int unsigned CLK_HZ   = 100_000_000,
  parameter int unsigned COUNT_HZ = 3_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [13:0] fdr,       // division ratio N
  input  logic [1:0]  octave,
  output logic        buzzer
);

  localparam logic [31:0] INC_1 = 32'(COUNT_HZ);

  logic [31:0] acc_q, inc, acc_sum;
  logic        cnt_en, silent_q;
  logic [13:0] cnt_q, preset;

  always_comb begin
    unique case (octave)
      2'd1:    inc = INC_1 << 1;
      2'd2:    inc = INC_1 >> 1;
      default: inc = INC_1;
    endcase
  end

  assign acc_sum = acc_q + inc;
  assign cnt_en  = (acc_sum >= 32'(CLK_HZ));
  assign preset  = 14'(15'd16384 - {1'b0, fdr});

  always_ff @(posedge clk) begin
    if (rst) acc_q <= '0;
    else     acc_q <= cnt_en ? acc_sum - 32'(CLK_HZ) : acc_sum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q    <= '0;
      buzzer   <= 1'b0;
      silent_q <= 1'b1;
    end else if (fdr == 14'd0) begin
      buzzer   <= 1'b0;
      silent_q <= 1'b1;
    end else if (silent_q) begin
      cnt_q    <= preset;
      silent_q <= 1'b0;
    end else if (cnt_en) begin
      if (cnt_q == 14'h3FFF) begin
        cnt_q  <= preset;
        buzzer <= ~buzzer;
      end else begin
        cnt_q <= cnt_q + 14'd1;
      end
    end
  end

endmodule

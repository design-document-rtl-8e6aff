// sound_player: audio triggering.
//
// A trigger pulse starts playback of the sound chosen by the 4-bit
// selector; a new trigger restarts playback. Selector 0 plays one note
// given by software: the pitch register holds the division ratio N in
// bits 13:0 and an octave shift in bits 15:14, the duration register the
// note length in shortest-note units. Selectors 1..3 play short built-in
// effects, sequences of up to four (note, length) steps taken from the
// note table: 1 = row removed (middle 1, 3, 5 rising), 2 = game over
// (middle 5, 3, 1, bass 5 falling, two units each), 3 = a short click
// (high 1, one unit). Other selectors are silent. Each step holds the
// pitch on tone_gen for its length, timed by duration_timer; playing is
// high until the last step ends. The effect contents, the selector
// assignment and the use of bits 15:14 are this design's choice.
module sound_player #(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned COUNT_HZ    = 3_000_000,
  parameter int unsigned UNIT_CYCLES = 25_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        trigger,
  input  logic [3:0]  selector,
  input  logic [15:0] pitch,
  input  logic [15:0] duration,
  output logic        playing,
  output logic        buzzer
);

  typedef struct packed {
    logic       last;    // final step of the effect
    logic [4:0] note;    // note table index, 0 = rest
    logic [3:0] units;   // length in shortest-note units
  } step_t;

  function automatic step_t effect_step(input logic [3:0] sel, input logic [1:0] idx);
    step_t s;
    s = '{last: 1'b1, note: 5'd0, units: 4'd0};
    unique case ({sel, idx})
      {4'd1, 2'd0}: s = '{1'b0, 5'd8,  4'd1};
      {4'd1, 2'd1}: s = '{1'b0, 5'd10, 4'd1};
      {4'd1, 2'd2}: s = '{1'b1, 5'd12, 4'd1};
      {4'd2, 2'd0}: s = '{1'b0, 5'd12, 4'd2};
      {4'd2, 2'd1}: s = '{1'b0, 5'd10, 4'd2};
      {4'd2, 2'd2}: s = '{1'b0, 5'd8,  4'd2};
      {4'd2, 2'd3}: s = '{1'b1, 5'd5,  4'd2};
      {4'd3, 2'd0}: s = '{1'b1, 5'd15, 4'd1};
      default: ;
    endcase
    return s;
  endfunction

  logic [3:0]  sel_q;
  logic [1:0]  idx_q;
  logic        start_note, dur_busy, dur_done;
  step_t       step;
  logic [13:0] rom_fdr, fdr;
  logic [1:0]  octave;
  logic [15:0] len;

  assign step = effect_step(sel_q, idx_q);

  note_rom u_notes (.note(step.note), .fdr(rom_fdr));

  always_comb begin
    if (sel_q == 4'd0) begin
      fdr    = pitch[13:0];
      octave = pitch[15:14];
      len    = duration;
    end else begin
      fdr    = rom_fdr;
      octave = 2'd0;
      len    = 16'(step.units);
    end
    if (!playing) fdr = 14'd0;
  end

  duration_timer #(.UNIT_CYCLES(UNIT_CYCLES)) u_dur (
    .clk, .rst, .start(start_note), .len, .busy(dur_busy), .done(dur_done));

  tone_gen #(.CLK_HZ(CLK_HZ), .COUNT_HZ(COUNT_HZ)) u_tone (
    .clk, .rst, .fdr, .octave, .buzzer);

  // start_note is a registered pulse, so len and fdr are already those of
  // the new step when the timer loads.
  always_ff @(posedge clk) begin
    if (rst) begin
      sel_q      <= '0;
      idx_q      <= '0;
      playing    <= 1'b0;
      start_note <= 1'b0;
    end else begin
      start_note <= 1'b0;
      if (trigger) begin
        sel_q      <= selector;
        idx_q      <= '0;
        playing    <= (selector <= 4'd3);
        start_note <= (selector <= 4'd3);
      end else if (playing && dur_done && !start_note) begin
        if (sel_q == 4'd0 || step.last) begin
          playing <= 1'b0;
        end else begin
          idx_q      <= idx_q + 2'd1;
          start_note <= 1'b1;
        end
      end
    end
  end

endmodule

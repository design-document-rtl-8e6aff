// tb_scale_pitch: plays the whole three-octave scale through the note table
// and the pitch divider at the real settings (100 MHz clock, 3 MHz count
// pulse) and measures each pitch at the buzzer.
//
// For notes 1..21 the division ratio from note_rom drives tone_gen; after
// the first toggle, four half periods are timed in clock cycles and the
// frequency 100 MHz / (2 * half period) is compared with the equal-tempered
// pitch (A4 = 440 Hz; middle 1 = C4, bass one octave lower, high one
// higher; 1..7 = C D E F G A B) within 0.3 %. The octave shift is then
// checked without changing the ratio: each middle note with octave = 1
// must sound like the high note, and with octave = 2 like the bass note.
// The note numbering and the 3 MHz count pulse are this design's reading
// of the pitch table; the octave doubling/halving follows the divider's
// description. About 61 million clock cycles are simulated.
module tb_scale_pitch;
  logic clk = 0, rst = 1;
  logic [4:0] note = '0;
  logic [13:0] fdr;
  logic [1:0] octave = '0;
  logic buzzer;
  int checks = 0, failures = 0;

  note_rom u_rom (.note, .fdr);
  tone_gen u_tone (.clk, .rst, .fdr, .octave, .buzzer);

  always #5 clk = ~clk;

  initial begin
    repeat (150_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // semitones above C4 of the C major scale degrees
  function automatic real ref_hz(int nt, int shift);
    int deg, oct;
    int semi [7] = '{0, 2, 4, 5, 7, 9, 11};
    deg = (nt - 1) % 7;
    oct = (nt - 1) / 7 - 1 + shift;        // bass -1, middle 0, high +1
    return 440.0 * $pow(2.0, real'(semi[deg] + 12 * oct - 9) / 12.0);
  endfunction

  task automatic measure(output real hz);
    logic b0;
    longint cyc;
    // wait for a toggle to align, then time four half periods
    b0 = buzzer;
    while (buzzer == b0) @(posedge clk);
    cyc = 0;
    for (int h = 0; h < 4; h++) begin
      b0 = buzzer;
      while (buzzer == b0) begin
        @(posedge clk);
        cyc++;
      end
    end
    hz = 100.0e6 / (2.0 * real'(cyc) / 4.0);
  endtask

  task automatic play(input int nt, input logic [1:0] oc, input int shift, input string what);
    real hz, want, err;
    @(negedge clk);
    note = 5'(nt);
    octave = oc;
    // a new ratio takes effect at the next overflow: skip one half period
    measure(hz);
    measure(hz);
    want = ref_hz(nt, shift);
    err = (hz - want) / want;
    if (err < 0) err = -err;
    checks++;
    if (err > 0.003) begin
      failures++;
      $display("FAIL %s note %0d: %0.2f Hz, want %0.2f Hz", what, nt, hz, want);
    end else
      $display("%s note %0d: ratio %0d  %0.2f Hz (equal temperament %0.2f Hz)",
               what, nt, fdr, hz, want);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int nt = 1; nt <= 21; nt++) play(nt, 2'd0, 0, "scale");
    for (int nt = 8; nt <= 14; nt++) play(nt, 2'd1, 1, "octave up");
    for (int nt = 8; nt <= 14; nt++) play(nt, 2'd2, -1, "octave down");
    // silence for a rest
    @(negedge clk);
    note = 5'd0;
    repeat (400000) @(posedge clk);
    begin
      logic b0;
      automatic int toggles = 0;
      b0 = buzzer;
      repeat (400000) begin
        @(posedge clk);
        if (buzzer != b0) toggles++;
        b0 = buzzer;
      end
      checks++;
      if (toggles != 0) begin
        failures++;
        $display("FAIL rest: %0d toggles", toggles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_note_rom: every note's division ratio must give the standard
// equal-tempered pitch within 0.2 % when the 3 MHz count pulse is divided
// by the ratio and then by two (the buzzer toggles on each overflow). The
// expected frequencies come from A4 = 440 Hz, not from the table: middle 1
// is C4 (261.63 Hz), bass one octave lower, high one octave higher, and
// notes 1..7 are the C major scale C D E F G A B. Notes 0 and 22..31 must
// be rests.
// Purely combinational; each note is checked after a short delay.
module tb_note_rom;
  logic [4:0]  note;
  logic [13:0] fdr;
  int checks = 0, failures = 0;

  note_rom dut (.note, .fdr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int semis [7] = '{0, 2, 4, 5, 7, 9, 11};
    for (int k = 0; k < 32; k++) begin
      note = 5'(k);
      #1;
      checks++;
      if (k == 0 || k > 21) begin
        if (fdr != 0) begin failures++; $display("FAIL note %0d not a rest", k); end
      end else begin
        real f_exp, f_got, err;
        int oct, deg;
        oct = (k - 1) / 7;        // 0 bass, 1 middle, 2 high
        deg = (k - 1) % 7;
        // C4 is 9 semitones below A4
        f_exp = 440.0 * (2.0 ** ((semis[deg] - 9 + 12 * (oct - 1)) / 12.0));
        f_got = 3.0e6 / (2.0 * fdr);
        err = (f_got - f_exp) / f_exp;
        if (err > 0.002 || err < -0.002) begin
          failures++;
          $display("FAIL note %0d ratio %0d gives %f Hz, exp %f Hz", k, fdr, f_got, f_exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// note_rom: frequency division ratios of the three-octave scale.
//
// Maps a note number to the division ratio N of the modulo-N pitch
// counter (the FDR column of the pitch table). Note 0 is a rest (ratio 0,
// no sound); notes 1..7 are bass 1..7, 8..14 middle 1..7 and 15..21 high
// 1..7; other numbers are rests. With a 3 MHz count pulse and the buzzer
// toggled on each counter overflow, ratio 5736 gives 261.5 Hz, middle C.
// The note numbering is this design's choice. Purely combinational.
module note_rom (
  input  logic [4:0]  note,
  output logic [13:0] fdr
);

  always_comb begin
    unique case (note)
      5'd1:  fdr = 14'd11468;  // bass 1
      5'd2:  fdr = 14'd10222;
      5'd3:  fdr = 14'd9102;
      5'd4:  fdr = 14'd8592;
      5'd5:  fdr = 14'd7653;
      5'd6:  fdr = 14'd6818;
      5'd7:  fdr = 14'd6073;
      5'd8:  fdr = 14'd5736;   // middle 1
      5'd9:  fdr = 14'd5111;
      5'd10: fdr = 14'd4552;
      5'd11: fdr = 14'd4296;
      5'd12: fdr = 14'd3827;
      5'd13: fdr = 14'd3409;
      5'd14: fdr = 14'd3036;
      5'd15: fdr = 14'd2867;   // high 1
      5'd16: fdr = 14'd2555;
      5'd17: fdr = 14'd2276;
      5'd18: fdr = 14'd2148;
      5'd19: fdr = 14'd1913;
      5'd20: fdr = 14'd1704;
      5'd21: fdr = 14'd1518;
      default: fdr = 14'd0;    // rest
    endcase
  end

endmodule

// tb_sound_player: with the count pulse at half the clock rate (so a
// division ratio N gives a buzzer half period of 2N cycles) and a 60000-cycle unit,
// plays the register note (selector 0), the row-removed and game-over
// effects and an undefined selector. Checks the sequence of half periods
// against the note table values, the playing time (length in units plus a
// few cycles per step) and silence when nothing plays.
// Clock parameters are scaled (2000 Hz clock, 1000 Hz count pulse); the
// effect contents checked are this design's own.
module tb_sound_player;
  localparam int UNIT = 60000;
  logic clk = 0, rst = 1, trigger = 0;
  logic [3:0] selector = '0;
  logic [15:0] pitch = '0, duration = '0;
  logic playing, buzzer;
  int checks = 0, failures = 0;
  longint cyc = 0, last_toggle = 0;
  int halves [$];
  logic bq = 0;

  sound_player #(.CLK_HZ(2000), .COUNT_HZ(1000), .UNIT_CYCLES(UNIT)) dut (
    .clk, .rst, .trigger, .selector, .pitch, .duration, .playing, .buzzer);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (buzzer != bq) begin
      halves.push_back(int'(cyc - last_toggle));
      last_toggle = cyc;
    end
    bq <= buzzer;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic play(input int sel, input int exp_notes [$], input int units);
    longint t0;
    int seq [$];
    int len;
    @(negedge clk);
    selector = 4'(sel);
    trigger = 1;
    t0 = cyc;
    @(negedge clk);
    trigger = 0;
    halves.delete();
    last_toggle = cyc;
    while (playing) @(negedge clk);
    len = int'(cyc - t0);
    foreach (halves[i])
      if (halves[i] inside {exp_notes} && (seq.size() == 0 || seq[$] != halves[i]))
        seq.push_back(halves[i]);
    checks++;
    if (seq != exp_notes) begin
      failures++;
      $display("FAIL selector %0d: half periods %p, exp %p", sel, seq, exp_notes);
    end
    checks++;
    if (len < units * UNIT || len > units * UNIT + 3 * exp_notes.size() + 3) begin
      failures++;
      $display("FAIL selector %0d played %0d cycles, exp %0d", sel, len, units * UNIT);
    end
    // silent afterwards (the buzzer returns low one cycle after the end)
    repeat (2) @(negedge clk);
    halves.delete();
    repeat (20000) @(negedge clk);
    checks++;
    if (halves.size() != 0 || buzzer) begin failures++; $display("FAIL not silent after selector %0d", sel); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    pitch = 16'd1000;
    duration = 16'd3;
    play(0, '{2000}, 3);
    play(1, '{11472, 9104, 7654}, 3);
    play(2, '{7654, 9104, 11472, 15306}, 8);
    play(3, '{5734}, 1);
    // an undefined selector plays nothing
    @(negedge clk);
    selector = 4'd9;
    trigger = 1;
    @(negedge clk);
    trigger = 0;
    checks++;
    if (playing) begin failures++; $display("FAIL selector 9 plays"); end
    // octave up on the register note: half period halves
    pitch = {2'b01, 14'd1000};
    duration = 16'd2;
    play(0, '{1000}, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tone_gen: at the default 100 MHz clock and 3 MHz count pulse, the
// buzzer must toggle every N count pulses, i.e. every N * 100/3 clock
// cycles on average. Measured over 20 half periods for several ratios,
// for the octave up (half) and down (double) settings, and silence for
// N = 0.
// About 10 ms of 100 MHz clock are simulated. The 3 MHz count pulse is
// this design's reading of the pitch table.
module tb_tone_gen;
  logic clk = 0, rst = 1;
  logic [13:0] fdr = '0;
  logic [1:0] octave = '0;
  logic buzzer;
  int checks = 0, failures = 0;

  tone_gen dut (.clk, .rst, .fdr, .octave, .buzzer);

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int n, input int oct);
    longint t0, t1;
    real exp_c;
    logic b0;
    fdr = 14'(n);
    octave = 2'(oct);
    // skip two toggles to settle
    repeat (2) begin b0 = buzzer; @(posedge clk iff buzzer != b0); end
    t0 = $time;
    repeat (20) begin b0 = buzzer; @(posedge clk iff buzzer != b0); end
    t1 = $time;
    exp_c = 20.0 * n * (100.0 / 3.0);
    if (oct == 1) exp_c = exp_c / 2.0;
    if (oct == 2) exp_c = exp_c * 2.0;
    checks++;
    if ((t1 - t0) / 10.0 > exp_c + 70.0 || (t1 - t0) / 10.0 < exp_c - 70.0) begin
      failures++;
      $display("FAIL N %0d octave %0d: 20 half periods took %0d cycles, exp %f",
               n, oct, (t1 - t0) / 10, exp_c);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // silence
    repeat (1000) begin
      @(posedge clk);
      if (buzzer) begin checks++; failures++; end
    end
    checks++;
    measure(1518, 0);
    measure(2867, 0);
    measure(100, 0);
    measure(1518, 1);
    measure(1518, 2);
    measure(7, 0);
    fdr = 0;
    repeat (3) @(posedge clk);
    repeat (1000) begin
      @(posedge clk);
      if (buzzer) begin checks++; failures++; end
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

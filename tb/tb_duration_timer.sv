// tb_duration_timer: with a 10-cycle unit, busy must last exactly
// len * 10 cycles (1 for len 0) and done must pulse once right after.
// The unit is shortened to 10 cycles; counts are checked exactly.
module tb_duration_timer;
  localparam int UNIT = 10;
  logic clk = 0, rst = 1, start = 0;
  logic [15:0] len = '0;
  logic busy, done;
  int checks = 0, failures = 0;

  duration_timer #(.UNIT_CYCLES(UNIT)) dut (.clk, .rst, .start, .len, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [7] = '{1, 2, 8, 0, 3, 17, 4};
    repeat (2) @(posedge clk);
    rst <= 0;
    foreach (lens[i]) begin
      int hi, dones;
      hi = 0; dones = 0;
      @(negedge clk);
      len = 16'(lens[i]);
      start = 1;
      @(negedge clk);
      start = 0;
      while (busy) begin
        hi++;
        if (done) dones++;
        @(negedge clk);
      end
      checks++;
      if (hi != ((lens[i] == 0) ? 1 : lens[i] * UNIT) || !done) begin
        failures++;
        $display("FAIL len %0d busy %0d cycles, done %0d", lens[i], hi, done);
      end
      @(negedge clk);
      checks++;
      if (done || dones != 0) begin failures++; $display("FAIL done not a single pulse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

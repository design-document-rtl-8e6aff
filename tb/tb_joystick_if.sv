// tb_joystick_if: random switch activity; each rising edge of a switch
// must give exactly one pulse on its output and one queue command with
// the matching bit, two clock cycles after the pins change.
// Random switch levels change every few cycles on a 100 MHz clock.
module tb_joystick_if;
  import tetris_pkg::*;
  logic clk = 0, rst = 1;
  logic [4:0] pins = '0;
  logic up, down, left, right, start, cmd_valid;
  cmd_t cmd;
  logic [4:0] hist [4];
  int checks = 0, failures = 0;
  int edges = 0;

  joystick_if dut (.clk, .rst, .pins, .up, .down, .left, .right, .start, .cmd, .cmd_valid);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      logic [4:0] exp;
      @(negedge clk);
      // hist[k] = pins as they were k+1 cycles ago at the sampling edge
      exp = hist[1] & ~hist[2];
      checks++;
      if ({start, right, left, down, up} !== exp ||
          cmd_valid !== (|exp) ||
          {cmd.start, cmd.right, cmd.left, cmd.down, cmd.up} !== exp ||
          cmd.reserved !== 3'b000) begin
        failures++;
        if (failures < 10) $display("FAIL t %0d got %b exp %b", t, {start, right, left, down, up}, exp);
      end
      edges += $countones(exp);
      if ($urandom_range(3) == 0) pins = 5'($urandom);
      @(posedge clk);
      #1;
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = pins;
    end
    checks++;
    if (edges == 0) failures++;
    $display("edges %0d", edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

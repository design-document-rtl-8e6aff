// tb_drop_timer: with a short tick, expired must rise exactly
// speed * TICK_CYCLES cycles after restart, stay high, and not advance
// while run is low. Speed 0 behaves as 1.
// Runs with a 7-cycle tick; the cycle counts are checked exactly.
module tb_drop_timer;
  localparam int TICK = 7;
  logic clk = 0, rst = 1, run = 0, restart = 0;
  logic [15:0] speed = 16'd5;
  logic expired;
  int checks = 0, failures = 0;

  drop_timer #(.TICK_CYCLES(TICK)) dut (.clk, .rst, .run, .restart, .speed, .expired);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int spd, input int expect_cycles);
    int cyc = 0;
    speed   <= 16'(spd);
    restart <= 1;
    run     <= 1;
    @(posedge clk);
    restart <= 0;
    while (1) begin
      @(posedge clk);
      cyc++;
      #1;
      if (expired || cyc > 100000) break;
    end
    checks++;
    if (cyc != expect_cycles) begin
      failures++;
      $display("FAIL speed %0d expired after %0d cycles, exp %0d", spd, cyc, expect_cycles);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (!expired) begin failures++; $display("FAIL expired dropped"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    measure(5, 5 * TICK);
    measure(1, TICK);
    measure(0, TICK);
    measure(37, 37 * TICK);
    // pausing: run low for a while must not count
    speed <= 16'd3; restart <= 1; run <= 1;
    @(posedge clk);
    restart <= 0;
    repeat (TICK) @(posedge clk);
    run <= 0;
    repeat (100) @(posedge clk);
    #1;
    checks++;
    if (expired) begin failures++; $display("FAIL counted while stopped"); end
    run <= 1;
    repeat (2 * TICK) @(posedge clk);
    #1;
    checks++;
    if (!expired) begin failures++; $display("FAIL did not resume"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

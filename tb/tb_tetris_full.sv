// tb_tetris_full: one complete operation of the chip at its real
// parameters (100 MHz clock, 1 ms fall-timer tick, 25 MHz pixel rate,
// 3 MHz pitch count pulse, 0.25 s note unit). The joystick starts a game,
// moves the first block left, rotates it and pushes it down until it
// lands; the software side then reads the command queue, the registers
// and, after the next VGA frame, the display buffer, and plays middle C
// for one unit. Checks: the landed block's four cells in the matrix and in
// the buffer, the queued commands, the VGA line period (3200 clocks), the
// buzzer frequency (about 261.6 Hz: 130 or 131 toggles in 0.25 s).
// Every parameter of the top is left at its default; about 26 million
// clock cycles are simulated.
module tb_tetris_full;
  import tetris_pkg::*;
  import tb_shapes_pkg::*;

  logic clk = 0, rst = 1;
  logic [4:0] joy = '0;
  logic [9:0] avs_address = '0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic [3:0] ob, og, orr;
  logic hs, vs, buzzer;
  int checks = 0, failures = 0;
  logic [7:0] pressed [$];

  tetris_top dut (
    .clk, .rst, .joy, .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .OutBlue(ob), .OutGreen(og), .OutRad(orr), .hsync_r(hs), .vsync_r(vs), .buzzer);

  always #5 clk = ~clk;

  initial begin
    #600000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", s, $time);
    end
  endtask

  task automatic bus_write(input int a, input logic [31:0] d);
    @(negedge clk);
    avs_address = 10'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic bus_read(input int a, output logic [31:0] d);
    @(negedge clk);
    avs_address = 10'(a); avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    d = avs_readdata;
  endtask

  task automatic press(input int b);
    logic [7:0] c;
    @(negedge clk);
    joy[b] = 1;
    repeat (3) @(negedge clk);
    joy[b] = 0;
    repeat (6) @(negedge clk);
    c = '0;
    c[b] = 1'b1;
    pressed.push_back(c);
  endtask

  longint hs_last = 0, hs_period = 0;
  logic hs_q = 1;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (hs_q && !hs) begin
      if (hs_last != 0) hs_period = cyc - hs_last;
      hs_last = cyc;
    end
    hs_q <= hs;
  end

  initial begin
    logic [31:0] d, h, t;
    int code, nn, mm, lands = 0;
    logic [199:0] exp_bg;
    bit o;
    repeat (4) @(posedge clk);
    rst <= 0;
    bus_read(A_SPEED, d);
    chk(d == 32'd1000, "speed reset value");
    press(4);                                  // start
    chk(dut.u_game.state == S_HOLD, "game running");
    press(2);                                  // left
    press(2);                                  // left
    press(0);                                  // rotate
    // remember the block to predict where it lands
    code = int'(dut.u_game.cur_blk);
    mm = int'(dut.u_game.m);
    chk(mm == 2, $sformatf("block column %0d after two lefts", mm));
    nn = int'(dut.u_game.n);
    while (legal_at(code, nn + 1, mm)) nn++;
    exp_bg = ref_mask(code, nn, mm, o);
    while (dut.u_game.background == '0 && lands < 40) begin
      press(1);
      lands++;
    end
    repeat (10) @(negedge clk);
    chk(dut.u_game.background == exp_bg, "landed block in the matrix");
    chk($countones(dut.u_game.background) == 4, "four cells landed");
    chk(dut.u_game.state == S_HOLD && dut.u_game.n == SPAWN_N, "next block spawned");

    // software: read the command queue
    bus_read(A_QUEUE_HEAD, h);
    bus_read(A_QUEUE_TAIL, t);
    chk((t - h + 16) % 16 == 15 || (t - h + 16) % 16 == pressed.size(), "queue length");
    for (int i = 0; i < int'((t - h + 16) % 16); i++) begin
      bus_read(int'((h + i) % 16), d);
      chk(d[7:0] == pressed[i], $sformatf("queue entry %0d: %h exp %h", i, d[7:0], pressed[i]));
    end
    bus_write(A_QUEUE_HEAD, t);

    // display buffer after the next frame
    begin
      logic [15:0] s0;
      int bad = 0;
      logic [199:0] act;
      logic [2:0] grp;
      s0 = dut.buf_swaps;
      wait (dut.buf_swaps != s0);
      act = dut.u_game.active_mask;
      grp = dut.u_game.cur_group;
      for (int a = 0; a < 200; a++) begin
        logic [7:0] e;
        bus_read(256 + a, d);
        e = {act[a], act[a] | exp_bg[a], 3'b000, act[a] ? grp : 3'b000};
        if (d[7:0] != e) bad++;
      end
      chk(bad == 0, $sformatf("display buffer: %0d bytes differ", bad));
    end
    chk(hs_period == 3200, $sformatf("VGA line period %0d clocks", hs_period));

    // middle C for one unit
    begin
      int toggles = 0;
      logic b0;
      bus_write(A_PITCH, 32'd5736);
      bus_write(A_DURATION, 32'd1);
      bus_write(A_SELECTOR, 32'd0);
      bus_write(A_TRIGGER, 32'd1);
      b0 = buzzer;
      while (dut.u_snd.playing) begin
        @(negedge clk);
        if (buzzer != b0) begin toggles++; b0 = buzzer; end
      end
      chk(toggles >= 129 && toggles <= 132, $sformatf("%0d buzzer toggles in one unit", toggles));
      $display("buzzer toggles in 0.25 s: %0d (261.6 Hz gives 130.8)", toggles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit legal_at(int code, int nn, int mm);
    bit o;
    logic [199:0] k;
    k = ref_mask(code, nn, mm, o);
    return !o;
  endfunction
endmodule

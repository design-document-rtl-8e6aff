// tb_tetris_top: end-to-end test of the whole chip with shortened timers
// (2 kHz nominal clock for the audio dividers, 30000-cycle note unit, 4-cycle fall-timer tick, 60-tick
// fall interval set by software, pixel enable every cycle).
//
// A software model on the bus sets the speed, starts games (from the
// joystick and from the bus), drains the input command queue and checks
// every command against the presses made, reads score, level and high
// score, reads the display buffer and plays sounds. The joystick side plays
// with a greedy placement that clears rows. Checks: register reset values,
// queue contents and overflow, score = rows removed (counted from the
// engine's matrix), level = rows / 10, high score after each game over,
// display buffer bytes against the engine's matrix after a swap, VGA sync
// activity and lit pixels, buzzer activity while a sound plays. Each
// mechanism is counted and a failure is counted for one that never
// happened: bus start, joystick start, timer fall, each key, refused move,
// row removal, level-up, game over, queue overflow, buffer swap, sound.
// The FSM sequence, register addresses and widths checked follow the
// game's design; the bus protocol details are this design's own.
module tb_tetris_top;
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

  tetris_top #(.CLK_HZ(2000), .TICK_CYCLES(4), .PIX_DIV(1), .COUNT_HZ(1000),
               .UNIT_CYCLES(30000)) dut (
    .clk, .rst, .joy, .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .OutBlue(ob), .OutGreen(og), .OutRad(orr), .hsync_r(hs), .vsync_r(vs), .buzzer);

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", s, $time);
    end
  endtask

  // ------------------------------------------------------------ bus master
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

  // ------------------------------------------------------- observed events
  int rows_removed = 0, game_rows = 0, best_game = 0;
  int c_timer = 0, c_over = 0, c_bus_start = 0, c_joy_start = 0, c_refused = 0;
  int c_swap = 0, c_sound = 0, c_levelup = 0, c_overflow = 0, c_lit = 0, c_hs = 0;
  int c_key [5] = '{0, 0, 0, 0, 0};
  logic [7:0] pressed [$];
  bit key_down_sent = 0;
  logic hs_q = 1;

  always @(negedge clk) if (!rst) begin
    if (dut.line_cleared) begin rows_removed++; game_rows++; end
    if (dut.game_start) game_rows = 0;
    if (dut.game_over) begin
      c_over++;
      if (game_rows > best_game) best_game = game_rows;
    end
    if (dut.state == S_DOWN) begin
      if (key_down_sent) key_down_sent = 0; else c_timer++;
    end
    if (dut.state == S_MOVE && !dut.u_game.cand_ok) c_refused++;
    if (orr != 0) c_lit++;
    if (hs_q && !hs) c_hs++;
    hs_q = hs;
  end

  // ------------------------------------------------------ joystick driver
  // bit order of joy: {start, right, left, down, up}
  task automatic press(input int b);
    logic [7:0] c;
    @(negedge clk);
    joy[b] = 1;
    repeat (2) @(negedge clk);
    joy[b] = 0;
    repeat (2) @(negedge clk);
    c = '0;
    c[b] = 1'b1;
    pressed.push_back(c);
    c_key[b]++;
  endtask

  function automatic int rot_of(int code);
    case (code)
      0: return 0; 4: return 1; 8: return 5; 10: return 9;
      14: return 11; 16: return 15; 18: return 17;
      default: return code + 1;
    endcase
  endfunction

  function automatic bit legal(int code, int nn, int mm, logic [199:0] bg);
    bit o;
    logic [199:0] k;
    k = ref_mask(code, nn, mm, o);
    return !o && ((k & bg) == '0);
  endfunction

  task automatic plan(output int n_rot, output int target_m);
    int best = -1;
    int cur = int'(dut.u_game.cur_blk);
    int n0 = int'(dut.u_game.n);
    logic [199:0] bg = dut.u_game.background;
    n_rot = 0;
    target_m = int'(dut.u_game.m);
    for (int r = 0; r < 4; r++) begin
      int code = cur;
      for (int i = 0; i < r; i++) code = rot_of(code);
      for (int mm = 0; mm < 10; mm++) begin
        int nn, sc;
        logic [199:0] k, k2;
        bit o;
        if (!legal(code, n0, mm, bg)) continue;
        nn = n0;
        while (legal(code, nn + 1, mm, bg)) nn++;
        k = ref_mask(code, nn, mm, o);
        sc = 0;
        k2 = bg | k;
        for (int row = 0; row < 20; row++) begin
          if (&k2[row*10 +: 10]) sc += 1000;
          for (int c = 0; c < 10; c++) if (k[row*10 + c]) sc += row;
        end
        if (sc > best) begin best = sc; n_rot = r; target_m = mm; end
      end
    end
  endtask

  task automatic wait_hold();
    while (dut.state != S_HOLD && dut.state != S_IDLE) @(negedge clk);
  endtask

  // Play one piece; greedy unless dumb, which drops it straight down.
  task automatic play_piece(input bit dumb);
    int nr, tm, guard;
    logic [199:0] seen_bg;
    wait_hold();
    if (dut.state == S_IDLE) return;
    if (!dumb) begin
      plan(nr, tm);
      repeat (nr) begin press(0); wait_hold(); end
      drain_queue();
      guard = 0;
      while (dut.state != S_IDLE && int'(dut.u_game.m) != tm && guard < 12) begin
        press(int'(dut.u_game.m) > tm ? 2 : 3);
        wait_hold();
        guard++;
      end
    end else begin
      // push against the wall to see a refused move
      repeat (6) begin press(2); wait_hold(); end
    end
    seen_bg = dut.u_game.background;
    while (dut.state != S_IDLE && dut.state != S_NEW && dut.u_game.background == seen_bg) begin
      key_down_sent = 1;
      press(1);
      if (pressed.size() >= 10) drain_queue();
      if ($urandom_range(7) == 0) repeat (300) @(negedge clk);  // let the timer act
    end
  endtask

  // --------------------------------------------------------------- software
  // Drain the queue: read every entry between head and tail, compare with
  // the presses made, and consume them.
  task automatic drain_queue();
    logic [31:0] h, t, d, st;
    bus_read(A_GAME_STATE, st);
    if (st[5]) c_overflow++;
    bus_read(A_QUEUE_HEAD, h);
    bus_read(A_QUEUE_TAIL, t);
    while (h != t) begin
      bus_read(int'(h), d);
      if (st[5] == 0) begin
        chk(pressed.size() > 0 && d[7:0] == pressed[0], $sformatf("queue entry %h exp %h", d[7:0], pressed.size() ? pressed[0] : 8'hxx));
      end
      if (pressed.size() > 0) void'(pressed.pop_front());
      h = (h + 1) % 16;
    end
    bus_write(A_QUEUE_HEAD, h);
    if (st[5]) pressed.delete();   // after an overflow the record is resynchronised
  endtask

  task automatic check_scores();
    logic [31:0] sc, lv, hi;
    bus_read(A_SCORE, sc);
    bus_read(A_LEVEL, lv);
    bus_read(A_HIGH_SCORE, hi);
    chk(sc == 32'(game_rows), $sformatf("score %0d exp %0d", sc, game_rows));
    chk(lv == 32'(game_rows / 10), $sformatf("level %0d exp %0d", lv, game_rows / 10));
    chk(hi == 32'(best_game), $sformatf("high score %0d exp %0d", hi, best_game));
    if (lv != 0) c_levelup++;
  endtask

  // Wait for a buffer swap while the game is at rest, then compare the
  // front bank with the engine's matrix.
  task automatic check_buffer();
    logic [31:0] d;
    logic [15:0] s0;
    logic [199:0] bg, act;
    logic [2:0] grp;
    int bad = 0;
    // hold the fall timer off while waiting for a frame
    bus_write(A_SPEED, 32'd65535);
    s0 = dut.buf_swaps;
    wait (dut.buf_swaps != s0);
    c_swap++;
    bg = dut.u_game.background;
    act = dut.u_game.active_mask;
    grp = dut.u_game.cur_group;
    for (int a = 0; a < 256; a++) begin
      logic [7:0] e;
      bus_read(256 + a, d);
      e = (a < 200) ? {act[a], act[a] | bg[a], 3'b000, act[a] ? grp : 3'b000} : 8'h00;
      if (d[7:0] != e) bad++;
    end
    chk(bad == 0, $sformatf("display buffer: %0d bytes differ", bad));
    bus_write(A_SPEED, 32'd60);
  endtask

  task automatic play_sound(input int sel, input int units);
    logic [31:0] p;
    int toggles = 0;
    logic b0;
    bus_write(A_SELECTOR, 32'(sel));
    bus_write(A_TRIGGER, 32'd1);
    bus_read(A_TRIGGER, p);
    chk(p[0] == 1'b1, "playing flag");
    b0 = buzzer;
    repeat (units * 30000 - 10) begin
      @(negedge clk);
      if (buzzer != b0) begin toggles++; b0 = buzzer; end
    end
    repeat (50) @(negedge clk);
    bus_read(A_TRIGGER, p);
    chk(p[0] == 1'b0 && toggles > 0, $sformatf("sound %0d: %0d toggles, playing %0d", sel, toggles, p[0]));
    if (toggles > 0) c_sound++;
  endtask

  initial begin
    logic [31:0] d;
    repeat (4) @(posedge clk);
    rst <= 0;
    bus_read(A_SPEED, d);
    chk(d == 32'd1000, $sformatf("speed reset value %0d", d));
    bus_read(A_GAME_STATE, d);
    chk(d[3:0] == 4'(S_IDLE), "idle after reset");
    bus_write(A_SPEED, 32'd60);

    // game 1: started from the bus, greedy play until game over or 150 pieces
    bus_write(A_GAME_STATE, 32'd1);
    c_bus_start++;
    repeat (3) @(negedge clk);
    bus_read(A_GAME_STATE, d);
    chk(d[3:0] != 4'(S_IDLE), "bus start");
    pressed.delete();
    for (int p = 0; p < 150 && dut.state != S_IDLE; p++) begin
      play_piece(p % 10 == 9);
      if (p % 3 == 0) drain_queue();
      if (p % 20 == 5) begin wait_hold(); check_scores(); end
      if (p % 40 == 7) check_buffer();
    end
    // finish game 1 by stacking
    while (dut.state != S_IDLE) play_piece(1);
    repeat (5) @(negedge clk);
    check_scores();
    bus_read(A_GAME_STATE, d);
    chk(d[4] == 1'b1 && d[3:0] == 4'(S_IDLE), "game over flag");
    drain_queue();

    // overflow: 20 presses of right with nobody reading (start is pressed
    // last so the game begins from the joystick)
    for (int i = 0; i < 20; i++) press(3);
    drain_queue();
    press(4);
    c_joy_start++;
    repeat (5) @(negedge clk);
    chk(dut.state != S_IDLE, "joystick start");
    drain_queue();

    // game 2: a few pieces, then a check of buffer and sounds
    for (int p = 0; p < 40 && dut.state != S_IDLE; p++) begin
      play_piece(0);
      if (p % 4 == 0) drain_queue();
    end
    check_buffer();
    bus_write(A_PITCH, 32'd500);
    bus_write(A_DURATION, 32'd2);
    play_sound(0, 2);
    play_sound(1, 3);
    while (dut.state != S_IDLE) play_piece(1);
    repeat (5) @(negedge clk);
    check_scores();
    drain_queue();

    $display("rows %0d (best game %0d) timer falls %0d game overs %0d refused moves %0d",
             rows_removed, best_game, c_timer, c_over, c_refused);
    $display("keys up %0d down %0d left %0d right %0d start %0d, queue overflows %0d",
             c_key[0], c_key[1], c_key[2], c_key[3], c_key[4], c_overflow);
    $display("buffer swaps checked %0d, sounds %0d, level-ups seen %0d, lit pixel cycles %0d, lines %0d",
             c_swap, c_sound, c_levelup, c_lit, c_hs);
    chk(c_bus_start > 0 && c_joy_start > 0, "starts");
    chk(c_timer > 0, "timer fall never happened");
    for (int b = 0; b < 5; b++) chk(c_key[b] > 0, $sformatf("key %0d never pressed", b));
    chk(c_refused > 0, "no refused move");
    chk(rows_removed > 0, "no row removed");
    chk(c_levelup > 0, "no level-up");
    chk(c_over >= 2, "game overs");
    chk(c_overflow > 0, "no queue overflow");
    chk(c_swap > 0 && c_sound >= 2, "buffer swap or sound missing");
    chk(c_lit > 0 && c_hs > 0, "no VGA activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_game_ctrl: plays many games with random joystick keys and a short
// fall timer, and follows the engine with a reference model kept in the
// testbench (block pictures from tb_shapes_pkg, its own background
// matrix). Every cycle the model executes the state the FSM is in and
// predicts the next state; whenever the FSM is back in S_hold the active
// block, its position, the background matrix and the displayed picture are
// compared. Counts timer falls, key falls, moves and rotations (done and
// refused), landings, removed rows (several at once too) and game overs,
// and fails if one of them never happened.
// Runs with a 4-cycle timer tick and a short fall interval; the state
// sequence checked is the state transition diagram as this design reads
// it (a refused move returns to S_hold, S_stop returns to S_idle).
module tb_game_ctrl;
  import tetris_pkg::*;
  import tb_shapes_pkg::*;

  localparam int TICK = 4;
  logic clk = 0, rst = 1, start = 0;
  logic key_up = 0, key_down = 0, key_left = 0, key_right = 0;
  logic [15:0] speed = 16'd40;
  state_t state;
  blk_t cur_blk, next_blk;
  logic [4:0] n;
  logic [3:0] m;
  logic [2:0] cur_group;
  logic [199:0] background, active_mask, number;
  logic line_cleared, game_start, game_over;
  int checks = 0, failures = 0;

  game_ctrl #(.TICK_CYCLES(TICK)) dut (.clk, .rst, .start, .key_up, .key_down, .key_left,
    .key_right, .speed, .state, .cur_blk, .n, .m, .next_blk, .cur_group, .background,
    .active_mask, .number, .line_cleared, .game_start, .game_over);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  logic [199:0] m_bg = '0;
  int m_cur = 0, m_n = 1, m_m = 4;
  int p_cur, p_n, p_m;         // judged candidate, applied in S_shift
  state_t exp_next;
  bit have_exp = 0;
  move_t last_move = MV_LEFT;
  int rows_in_landing = 0;
  int c_timer = 0, c_keydown = 0, c_move_ok = 0, c_move_no = 0, c_rot_ok = 0, c_rot_no = 0;
  int c_land = 0, c_rows = 0, c_multi = 0, c_over = 0, c_pieces = 0;
  bit key_down_pending = 0;
  int n_move_seen = 0;

  function automatic bit legal(int code, int nn, int mm, logic [199:0] bg);
    bit o;
    logic [199:0] k;
    k = ref_mask(code, nn, mm, o);
    return !o && ((k & bg) == '0);
  endfunction

  function automatic int lowest_full(logic [199:0] bg);
    int f = -1;
    for (int r = 0; r < 20; r++) if (&bg[r*10 +: 10]) f = r;
    return f;
  endfunction

  function automatic int rot_of(int code);
    case (code)
      0: return 0; 4: return 1; 8: return 5; 10: return 9;
      14: return 11; 16: return 15; 18: return 17;
      default: return code + 1;
    endcase
  endfunction

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s (t=%0t)", s, $time);
  endtask

  state_t prev_state = S_IDLE;

  always @(negedge clk) if (!rst) begin
    if (have_exp) begin
      checks++;
      if (state != exp_next) fail($sformatf("state %s, expected %s after %s", state.name(), exp_next.name(), prev_state.name()));
    end
    have_exp = 0;
    if (state == S_HOLD && prev_state != S_HOLD) begin
      bit o;
      logic [199:0] k;
      k = ref_mask(m_cur, m_n, m_m, o);
      checks++;
      if (int'(cur_blk) != m_cur || int'(n) != m_n || int'(m) != m_m || background != m_bg || number != (m_bg | k))
        fail($sformatf("hold: blk %0d/%0d n %0d/%0d m %0d/%0d bg %0d", cur_blk, m_cur, n, m_n, m, m_m, background == m_bg));
    end
    unique case (state)
      S_IDLE: begin
        if (prev_state != S_IDLE) begin
          checks++;
          if (number != '0) fail("screen not blank in idle");
        end
      end
      S_NEW: begin
        m_cur = int'(next_blk); m_n = 1; m_m = 4;
        c_pieces++;
        exp_next = S_HOLD; have_exp = 1;
      end
      S_DOWN: begin
        if (key_down_pending) begin c_keydown++; key_down_pending = 0; end
        else c_timer++;
        if (legal(m_cur, m_n + 1, m_m, m_bg)) begin
          p_cur = m_cur; p_n = m_n + 1; p_m = m_m;
          exp_next = S_SHIFT;
        end else begin
          exp_next = S_REMOVE_1;
          c_land++;
        end
        have_exp = 1;
      end
      S_MOVE: begin
        int cc, mm2;
        n_move_seen++;
        cc = m_cur; mm2 = m_m;
        if (last_move == MV_LEFT) mm2 = m_m - 1;
        else if (last_move == MV_RIGHT) mm2 = m_m + 1;
        else cc = rot_of(m_cur);
        if (legal(cc, m_n, mm2, m_bg)) begin
          p_cur = cc; p_n = m_n; p_m = mm2;
          exp_next = S_SHIFT;
          if (last_move == MV_ROTATE) c_rot_ok++; else c_move_ok++;
        end else begin
          exp_next = S_HOLD;
          if (last_move == MV_ROTATE) c_rot_no++; else c_move_no++;
        end
        have_exp = 1;
      end
      S_SHIFT: begin
        m_cur = p_cur; m_n = p_n; m_m = p_m;
        exp_next = S_HOLD; have_exp = 1;
      end
      S_REMOVE_1: begin
        bit o;
        m_bg = m_bg | ref_mask(m_cur, m_n, m_m, o);
        rows_in_landing = 0;
        exp_next = S_REMOVE_2; have_exp = 1;
      end
      S_REMOVE_2: begin
        int f;
        f = lowest_full(m_bg);
        checks++;
        if (line_cleared != (f >= 0)) fail("line_cleared");
        if (f >= 0) begin
          for (int r = f; r > 0; r--) m_bg[r*10 +: 10] = m_bg[(r-1)*10 +: 10];
          m_bg[9:0] = '0;
          c_rows++;
          rows_in_landing++;
          if (rows_in_landing == 2) c_multi++;
          exp_next = S_REMOVE_2;
        end else begin
          exp_next = S_ISDIE;
        end
        have_exp = 1;
      end
      S_ISDIE: begin
        checks++;
        if (background != m_bg) fail("background after row removal");
        exp_next = legal(int'(next_blk), 1, 4, m_bg) ? S_NEW : S_STOP;
        have_exp = 1;
      end
      S_STOP: begin
        m_bg = '0;
        c_over++;
        checks++;
        if (!game_over) fail("game_over pulse");
        exp_next = S_IDLE; have_exp = 1;
      end
      default: ;
    endcase
    prev_state = state;
  end

  // --------------------------------------------------------------- driver
  task automatic pulse(ref logic k);
    @(negedge clk);
    k = 1;
    @(negedge clk);
    k = 0;
  endtask

  // Greedy placement: over all rotations and columns, the one that
  // completes most rows, then puts the cells deepest.
  task automatic plan(output int n_rot, output int target_m);
    int best = -1;
    n_rot = 0;
    target_m = m_m;
    for (int r = 0; r < 4; r++) begin
      int code = m_cur;
      for (int i = 0; i < r; i++) code = rot_of(code);
      for (int mm = 0; mm < 10; mm++) begin
        int nn, sc;
        logic [199:0] b2, k;
        bit o;
        if (!legal(code, m_n, mm, m_bg)) continue;
        nn = m_n;
        while (legal(code, nn + 1, mm, m_bg)) nn++;
        k = ref_mask(code, nn, mm, o);
        b2 = m_bg | k;
        sc = 0;
        for (int row = 0; row < 20; row++) begin
          if (&b2[row*10 +: 10]) sc += 1000;
          for (int c = 0; c < 10; c++) if (k[row*10 + c]) sc += row;
        end
        if (sc > best) begin best = sc; n_rot = r; target_m = mm; end
      end
    end
  endtask

  task automatic move_key(input move_t mv);
    automatic int seen0 = n_move_seen;
    last_move = mv;
    if (mv == MV_LEFT) pulse(key_left);
    else if (mv == MV_RIGHT) pulse(key_right);
    else pulse(key_up);
    // wait until the FSM has judged it, so the model knows which move
    // S_move is serving
    while (n_move_seen == seen0 && state != S_IDLE) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    while (c_pieces < 1500) begin
      @(negedge clk);
      if (state == S_IDLE) begin
        pulse(start);
      end else if (state == S_HOLD && (c_pieces % 4 != 0)) begin
        // planned piece: rotate, shift, then fall with the down key
        int nr, tm, p0;
        p0 = c_pieces;
        plan(nr, tm);
        repeat (nr) move_key(MV_ROTATE);
        while (state != S_IDLE && c_pieces == p0 && m_m != tm) begin
          automatic int before_m = m_m;
          move_key(m_m > tm ? MV_LEFT : MV_RIGHT);
          repeat (2) @(negedge clk);
          if (m_m == before_m) break;  // blocked
        end
        while (state != S_IDLE && c_pieces == p0) begin
          key_down_pending = 1;
          pulse(key_down);
          repeat ($urandom_range(1, 6)) @(negedge clk);
        end
      end else if (state == S_HOLD) begin
        // random keys
        int r;
        r = $urandom_range(99);
        if (r < 25) move_key(MV_LEFT);
        else if (r < 50) move_key(MV_RIGHT);
        else if (r < 65) move_key(MV_ROTATE);
        else if (r < 85) begin
          key_down_pending = 1;
          pulse(key_down);
        end
        repeat ($urandom_range(2, 30)) @(negedge clk);
      end
    end
    $display("pieces %0d timer falls %0d key falls %0d moves %0d/%0d refused, rotations %0d/%0d refused",
             c_pieces, c_timer, c_keydown, c_move_ok, c_move_no, c_rot_ok, c_rot_no);
    $display("landings %0d rows removed %0d multi-row landings %0d game overs %0d",
             c_land, c_rows, c_multi, c_over);
    checks++;
    if (c_timer == 0 || c_keydown == 0 || c_move_ok == 0 || c_move_no == 0 || c_rot_ok == 0 ||
        c_rot_no == 0 || c_land == 0 || c_rows == 0 || c_over == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

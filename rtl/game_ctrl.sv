// game_ctrl: the hardware Tetris engine and its ten-state control FSM.
//
// The falling (active) block is held as a code and an anchor position
// (row n, column m); settled (inactive) cells live in the background
// matrix. The FSM follows the state transition diagram:
//   S_idle     blank screen; a start pulse begins a game.
//   S_new      the waiting next block becomes the active block at the
//              spawn point and gen_random draws a new next block.
//   S_hold     waits; the fall timer or a down key leads to S_down, an
//              up (rotate), left or right key to S_move.
//   S_down     judges the block one row lower: legal -> S_shift,
//              otherwise the block has landed -> S_remove_1.
//   S_move     judges the shifted or rotated block: legal -> S_shift,
//              otherwise back to S_hold.
//   S_shift    commits the judged coordinates, returns to S_hold.
//   S_remove_1 copies the active block into the background matrix.
//   S_remove_2 removes one full row per cycle and stays until none is left.
//   S_isdie    the game is over when the next block cannot enter at the
//              spawn point: -> S_stop, otherwise -> S_new.
//   S_stop     clears the matrix and returns to S_idle.
// Each state lasts one clock cycle except S_idle, S_hold and S_remove_2.
// Key pulses arriving outside S_hold are latched until S_hold serves them;
// down has priority, then up, left, right. The judgment is combinational
// in the deciding state. S_stop going back to S_idle, the game-over test on
// the next block, the spawn point and the key priority are this design's
// reading of the diagram.
module game_ctrl
  import tetris_pkg::*;
#(
  parameter int unsigned TICK_CYCLES = 100_000,
  parameter logic [15:0] SEED        = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             key_up,      // rotate
  input  logic             key_down,
  input  logic             key_left,
  input  logic             key_right,
  input  logic [15:0]      speed,       // fall interval in timer ticks
  output state_t           state,
  output blk_t             cur_blk,
  output logic [4:0]       n,
  output logic [3:0]       m,
  output blk_t             next_blk,
  output logic [2:0]       cur_group,
  output logic [CELLS-1:0] background,
  output logic [CELLS-1:0] active_mask,
  output logic [CELLS-1:0] number,      // what the screen shows
  output logic             line_cleared,  // one row removed (pulse)
  output logic             game_start,    // pulse
  output logic             game_over      // pulse
);

  state_t     state_d;
  blk_t       cand_blk, cand_blk_q, rot_blk;
  logic [4:0] cand_n, cand_n_q;
  logic [3:0] cand_m, cand_m_q;
  logic       cand_ok;
  move_t      mv;
  logic       pend_up, pend_down, pend_left, pend_right;
  logic       drop_expired, drop_restart, rand_next;
  logic       pf_clear, pf_merge, pf_remove, full_found;
  logic [4:0] full_row;
  logic       act_oob;
  cell_off_t  off_unused [3];

  // ---------------------------------------------------------------- blocks
  tetromino_rom u_rot (.blk(cur_blk), .off(off_unused), .rot(rot_blk), .group(cur_group));

  collision_check u_judge (
    .blk(cand_blk), .n(cand_n), .m(cand_m), .background(background), .ok(cand_ok));

  block_mask u_active (.blk(cur_blk), .n(n), .m(m), .mask(active_mask), .oob(act_oob));

  playfield u_pf (
    .clk, .rst, .clear(pf_clear), .merge(pf_merge), .merge_mask(active_mask),
    .remove(pf_remove), .background, .full_found, .full_row);

  lfsr_rand #(.SEED(SEED)) u_rand (.clk, .rst, .next(rand_next), .blk(next_blk));

  drop_timer #(.TICK_CYCLES(TICK_CYCLES)) u_timer (
    .clk, .rst, .run(state != S_IDLE), .restart(drop_restart), .speed,
    .expired(drop_expired));

  // ------------------------------------------------------- candidate block
  always_comb begin
    cand_blk = cur_blk;
    cand_n   = n;
    cand_m   = m;
    unique case (state)
      S_DOWN:  cand_n = n + 5'd1;
      S_MOVE: begin
        unique case (mv)
          MV_LEFT:  cand_m = m - 4'd1;   // wraps to 15, which is out of bounds
          MV_RIGHT: cand_m = m + 4'd1;
          default:  cand_blk = rot_blk;
        endcase
      end
      S_ISDIE: begin
        cand_blk = next_blk;
        cand_n   = SPAWN_N;
        cand_m   = SPAWN_M;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------ next state
  always_comb begin
    state_d      = state;
    pf_clear     = 1'b0;
    pf_merge     = 1'b0;
    pf_remove    = 1'b0;
    drop_restart = 1'b0;
    rand_next    = 1'b0;
    unique case (state)
      S_IDLE:     if (start) state_d = S_NEW;
      S_NEW: begin
        rand_next    = 1'b1;
        drop_restart = 1'b1;
        state_d      = S_HOLD;
      end
      S_HOLD: begin
        if (drop_expired || pend_down)             state_d = S_DOWN;
        else if (pend_up || pend_left || pend_right) state_d = S_MOVE;
      end
      S_DOWN: begin
        drop_restart = 1'b1;
        state_d      = cand_ok ? S_SHIFT : S_REMOVE_1;
      end
      S_MOVE:     state_d = cand_ok ? S_SHIFT : S_HOLD;
      S_SHIFT:    state_d = S_HOLD;
      S_REMOVE_1: begin
        pf_merge = 1'b1;
        state_d  = S_REMOVE_2;
      end
      S_REMOVE_2: begin
        pf_remove = 1'b1;
        if (!full_found) state_d = S_ISDIE;
      end
      S_ISDIE:    state_d = cand_ok ? S_NEW : S_STOP;
      S_STOP: begin
        pf_clear = 1'b1;
        state_d  = S_IDLE;
      end
      default:    state_d = S_IDLE;
    endcase
  end

  assign line_cleared = (state == S_REMOVE_2) && full_found;
  assign game_start   = (state == S_IDLE) && start;
  assign game_over    = (state == S_STOP);

  // --------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cur_blk    <= BLK_A1;
      n          <= SPAWN_N;
      m          <= SPAWN_M;
      cand_blk_q <= BLK_A1;
      cand_n_q   <= SPAWN_N;
      cand_m_q   <= SPAWN_M;
      mv         <= MV_ROTATE;
      pend_up    <= 1'b0;
      pend_down  <= 1'b0;
      pend_left  <= 1'b0;
      pend_right <= 1'b0;
    end else begin
      state <= state_d;

      // Latch key presses; S_hold consumes them below.
      if (key_up)    pend_up    <= 1'b1;
      if (key_down)  pend_down  <= 1'b1;
      if (key_left)  pend_left  <= 1'b1;
      if (key_right) pend_right <= 1'b1;

      unique case (state)
        S_IDLE: begin
          pend_up <= 1'b0; pend_down <= 1'b0; pend_left <= 1'b0; pend_right <= 1'b0;
        end
        S_NEW: begin
          cur_blk <= next_blk;
          n       <= SPAWN_N;
          m       <= SPAWN_M;
        end
        S_HOLD: begin
          if (drop_expired || pend_down) begin
            pend_down <= 1'b0;
          end else if (pend_up) begin
            pend_up <= 1'b0;
            mv      <= MV_ROTATE;
          end else if (pend_left) begin
            pend_left <= 1'b0;
            mv        <= MV_LEFT;
          end else if (pend_right) begin
            pend_right <= 1'b0;
            mv         <= MV_RIGHT;
          end
        end
        S_DOWN, S_MOVE: begin
          cand_blk_q <= cand_blk;
          cand_n_q   <= cand_n;
          cand_m_q   <= cand_m;
        end
        S_SHIFT: begin
          cur_blk <= cand_blk_q;
          n       <= cand_n_q;
          m       <= cand_m_q;
        end
        default: ;
      endcase
    end
  end

  // The active block is only drawn while it is falling.
  always_comb begin
    if (state == S_IDLE)
      number = '0;
    else if (state == S_REMOVE_2 || state == S_ISDIE || state == S_STOP)
      number = background;
    else
      number = background | active_mask;
  end

  // A block that is shown never reaches outside the field.
  a_active_in_bounds: assert property (@(posedge clk) disable iff (rst)
    (state == S_HOLD) |-> !act_oob);

endmodule

// tetris_top: FPGA side of the Tetris game.
//
// The game runs entirely in hardware: game_ctrl holds the falling block and
// the 20x10 background matrix and steps through its ten-state FSM on
// joystick commands and the fall timer; vga_ctrl draws the matrix on a
// 640x480 VGA screen; sound_player drives the buzzer. The processor reaches
// the game over an Avalon-MM slave port (avalon_regs): it reads joystick
// commands from the input command queue, reads game state, level, score
// and high score, sets the fall speed, can start a game, reads the picture
// from the double-buffered display buffer and plays notes and effects.
// A game starts on the joystick's start button or a bus write.
// Clock: one 100 MHz system clock; reset is synchronous and active high.
// The parameters shorten the timers for simulation; their defaults are
// those of the real board.
// Ports: joy (five switches), an Avalon-MM slave with word addresses and
// one-cycle read latency, the VGA colour and sync pins (names as on the
// VGA block symbol) and the buzzer. The partition into blocks and the
// register addresses follow the system design; the split of game logic
// into hardware, the bus start bit and the bus sound effects are this
// design's choice.
module tetris_top
  import tetris_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned TICK_CYCLES = 100_000,      // fall timer tick, 1 ms
  parameter logic [15:0] SPEED_INIT  = 16'd1000,     // fall interval, ticks
  parameter int unsigned PIX_DIV     = 4,            // 100 MHz -> 25 MHz
  parameter int unsigned COUNT_HZ    = 3_000_000,    // pitch count pulse
  parameter int unsigned UNIT_CYCLES = 25_000_000,   // shortest note
  parameter int unsigned QDEPTH      = 16,
  parameter logic [15:0] SEED        = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst,
  // joystick switches {start, right, left, down, up}, active high
  input  logic [4:0]  joy,
  // Avalon-MM slave port to the processor
  input  logic [9:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // VGA
  output logic [3:0]  OutBlue,
  output logic [3:0]  OutGreen,
  output logic [3:0]  OutRad,
  output logic        hsync_r,
  output logic        vsync_r,
  // buzzer
  output logic        buzzer
);

  localparam int unsigned QW = $clog2(QDEPTH);

  // joystick
  logic j_up, j_down, j_left, j_right, j_start, cmd_valid;
  cmd_t cmd;
  // game engine
  state_t           state;
  blk_t             cur_blk, next_blk;
  logic [4:0]       n;
  logic [3:0]       m;
  logic [2:0]       cur_group;
  logic [CELLS-1:0] background, active_mask, number;
  logic             line_cleared, game_start, game_over, game_over_flag;
  logic             bus_start;
  logic [15:0]      speed;
  logic [31:0]      score, high_score;
  logic [7:0]       level;
  // queue
  logic [QW-1:0]    q_rd_idx, q_head, q_tail, q_head_wdata;
  logic [7:0]       q_rd_data;
  logic             q_head_we, q_overflow;
  // display buffer
  logic             frame_start, buf_front, buf_busy;
  logic [7:0]       buf_rd_addr, buf_rd_data;
  logic [15:0]      buf_swaps;
  // audio
  logic [15:0]      pitch, duration;
  logic             trigger, playing;
  logic [3:0]       selector;

  joystick_if u_joy (
    .clk, .rst, .pins(joy), .up(j_up), .down(j_down), .left(j_left),
    .right(j_right), .start(j_start), .cmd, .cmd_valid);

  game_ctrl #(.TICK_CYCLES(TICK_CYCLES), .SEED(SEED)) u_game (
    .clk, .rst, .start(j_start | bus_start),
    .key_up(j_up), .key_down(j_down), .key_left(j_left), .key_right(j_right),
    .speed, .state, .cur_blk, .n, .m, .next_blk, .cur_group,
    .background, .active_mask, .number, .line_cleared, .game_start, .game_over);

  score_keeper u_score (
    .clk, .rst, .game_start, .line_cleared, .game_over,
    .score, .high_score, .level);

  always_ff @(posedge clk) begin
    if (rst || game_start) game_over_flag <= 1'b0;
    else if (game_over)    game_over_flag <= 1'b1;
  end

  cmd_queue #(.DEPTH(QDEPTH)) u_queue (
    .clk, .rst, .push(cmd_valid), .push_data(cmd), .head_we(q_head_we),
    .head_wdata(q_head_wdata), .rd_idx(q_rd_idx), .rd_data(q_rd_data),
    .head(q_head), .tail(q_tail), .overflow(q_overflow));

  vga_ctrl #(.PIX_DIV(PIX_DIV)) u_vga (
    .clk, .rst, .number, .OutBlue, .OutGreen, .OutRad, .hsync_r, .vsync_r,
    .frame_start);

  block_buffer u_buf (
    .clk, .rst, .frame_start, .background, .active_mask, .group(cur_group),
    .rd_addr(buf_rd_addr), .rd_data(buf_rd_data), .front(buf_front),
    .busy(buf_busy), .swaps(buf_swaps));

  sound_player #(.CLK_HZ(CLK_HZ), .COUNT_HZ(COUNT_HZ), .UNIT_CYCLES(UNIT_CYCLES)) u_snd (
    .clk, .rst, .trigger, .selector, .pitch, .duration, .playing, .buzzer);

  avalon_regs #(.QDEPTH(QDEPTH), .SPEED_INIT(SPEED_INIT)) u_regs (
    .clk, .rst, .address(avs_address), .read(avs_read), .write(avs_write),
    .writedata(avs_writedata), .readdata(avs_readdata),
    .state, .game_over_flag, .level, .score, .high_score,
    .start(bus_start), .speed,
    .q_rd_idx, .q_rd_data, .q_head, .q_tail, .q_overflow, .q_head_we, .q_head_wdata,
    .buf_rd_addr, .buf_rd_data,
    .pitch, .duration, .trigger, .selector, .playing);

endmodule

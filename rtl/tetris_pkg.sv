// tetris_pkg: types and constants shared by the Tetris game engine.
//
// The playfield is 20 rows by 10 columns. Row 0 is the top row and column 0
// the left column; a cell (r, c) is bit r*10+c of a 200-bit vector, the same
// numbering the VGA renderer uses for its number[199:0] input. The 19 block
// codes follow the block model list: seven shapes A..G, each with one to
// four rotations. Register addresses are the word addresses of the
// processor-visible register map. The numeric encodings of the enums are
// this design's own choice.
package tetris_pkg;

  localparam int unsigned ROWS  = 20;
  localparam int unsigned COLS  = 10;
  localparam int unsigned CELLS = ROWS * COLS;

  // Spawn position of the anchor of a new block (row, column).
  localparam logic [4:0] SPAWN_N = 5'd1;
  localparam logic [3:0] SPAWN_M = 4'd4;

  // The 19 block codes of the block model list (shape letter, rotation).
  typedef enum logic [4:0] {
    BLK_A1 = 5'd0,
    BLK_B1 = 5'd1,  BLK_B2 = 5'd2,  BLK_B3 = 5'd3,  BLK_B4 = 5'd4,
    BLK_C1 = 5'd5,  BLK_C2 = 5'd6,  BLK_C3 = 5'd7,  BLK_C4 = 5'd8,
    BLK_D1 = 5'd9,  BLK_D2 = 5'd10,
    BLK_E1 = 5'd11, BLK_E2 = 5'd12, BLK_E3 = 5'd13, BLK_E4 = 5'd14,
    BLK_F1 = 5'd15, BLK_F2 = 5'd16,
    BLK_G1 = 5'd17, BLK_G2 = 5'd18
  } blk_t;

  // Offset of one cell of a block from its anchor, in rows (down is +)
  // and columns (right is +).
  typedef struct packed {
    logic signed [2:0] dr;
    logic signed [2:0] dc;
  } cell_off_t;

  // The ten states of the control FSM.
  typedef enum logic [3:0] {
    S_IDLE     = 4'd0,
    S_NEW      = 4'd1,
    S_HOLD     = 4'd2,
    S_DOWN     = 4'd3,
    S_MOVE     = 4'd4,
    S_SHIFT    = 4'd5,
    S_REMOVE_1 = 4'd6,
    S_REMOVE_2 = 4'd7,
    S_ISDIE    = 4'd8,
    S_STOP     = 4'd9
  } state_t;

  // Kind of sideways move or rotation requested in S_hold.
  typedef enum logic [1:0] {
    MV_LEFT   = 2'd0,
    MV_RIGHT  = 2'd1,
    MV_ROTATE = 2'd2
  } move_t;

  // Joystick command byte, as stored in the input command queue.
  typedef struct packed {
    logic [2:0] reserved;
    logic       start;
    logic       right;
    logic       left;
    logic       down;
    logic       up;
  } cmd_t;

  // Register map (word addresses on the processor bus).
  localparam logic [9:0] A_QUEUE_HEAD = 10'd30;
  localparam logic [9:0] A_QUEUE_TAIL = 10'd31;
  localparam logic [9:0] A_GAME_STATE = 10'd32;
  localparam logic [9:0] A_LEVEL      = 10'd33;
  localparam logic [9:0] A_SPEED      = 10'd34;
  localparam logic [9:0] A_SCORE      = 10'd35;
  localparam logic [9:0] A_HIGH_SCORE = 10'd36;
  localparam logic [9:0] A_PITCH      = 10'd39;
  localparam logic [9:0] A_DURATION   = 10'd40;
  localparam logic [9:0] A_TRIGGER    = 10'd41;
  localparam logic [9:0] A_SELECTOR   = 10'd42;
  // Queue entries are read from address 0 up, the front display buffer
  // at 256..511.
  localparam logic [9:0] A_BUF_BASE   = 10'd256;

endpackage

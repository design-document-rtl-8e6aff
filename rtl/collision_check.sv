// collision_check: the judgment step of a block move.
//
// A transformed block (candidate code and anchor) is legal when none of its
// cells leaves the playfield and none lands on an occupied cell of the
// background matrix. ok is high when both tests pass. Purely
// combinational; the control FSM evaluates it in the cycle it decides.
// The two-step judgment (bounds, then background overlap) follows the
// game's description; the AND-of-masks form is this design's choice.
module collision_check
  import tetris_pkg::*;
(
  input  blk_t             blk,
  input  logic [4:0]       n,
  input  logic [3:0]       m,
  input  logic [CELLS-1:0] background,
  output logic             ok
);

  logic [CELLS-1:0] mask;
  logic             oob;

  block_mask u_mask (.blk(blk), .n(n), .m(m), .mask(mask), .oob(oob));

  assign ok = !oob && ((mask & background) == '0);

endmodule

// block_mask: places a block on the 20x10 grid.
//
// From a block code and the anchor position (row n, column m) it forms the
// 200-bit occupancy mask of the block's four cells (bit r*10+c) and flags
// whether any cell falls outside the playfield. A cell that falls outside
// sets oob and is left out of the mask. This is the first half of the
// move judgment and also feeds the display and the merge into the
// background matrix. Purely combinational.
// The out-of-bounds test and the row/column numbering follow the move
// judgment described for the game; building it as a separate mask
// generator is this design's choice.
module block_mask
  import tetris_pkg::*;
(
  input  blk_t               blk,
  input  logic [4:0]         n,     // anchor row
  input  logic [3:0]         m,     // anchor column
  output logic [CELLS-1:0]   mask,
  output logic               oob    // some cell lies outside the field
);

  cell_off_t  off [3];
  blk_t       rot_unused;
  logic [2:0] group_unused;

  tetromino_rom u_rom (.blk(blk), .off(off), .rot(rot_unused), .group(group_unused));

  always_comb begin
    cell_off_t  c4 [4];
    logic signed [6:0] r, c;
    mask = '0;
    oob  = 1'b0;
    c4[0] = '0;
    c4[1] = off[0];
    c4[2] = off[1];
    c4[3] = off[2];
    for (int i = 0; i < 4; i++) begin
      r = $signed({2'b00, n}) + 7'(c4[i].dr);
      c = $signed({3'b000, m}) + 7'(c4[i].dc);
      if (r < 0 || r >= 7'(ROWS) || c < 0 || c >= 7'(COLS))
        oob = 1'b1;
      else
        mask[32'(r) * COLS + 32'(c)] = 1'b1;
    end
  end

endmodule

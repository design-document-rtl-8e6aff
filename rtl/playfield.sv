// playfield: the background matrix.
//
// Holds the 20x10 matrix of inactive cells (1 = occupied, shown white).
// Three commands, each taking one clock cycle, with clear > merge > remove
// priority when several are raised:
//   clear  - empties the whole matrix (game stop, reset).
//   merge  - ORs the active block's mask into the matrix (state remove_1:
//            the falling block becomes inactive).
//   remove - one step of row elimination (state remove_2): the lowest full
//            row is deleted and every row above it moves down one row, the
//            top row becoming empty. full_found tells, combinationally from
//            the current matrix, whether a full row exists, so the FSM
//            repeats the step until it drops. Clearing one row per step is
//            this design's choice.
module playfield
  import tetris_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             merge,
  input  logic [CELLS-1:0] merge_mask,
  input  logic             remove,
  output logic [CELLS-1:0] background,
  output logic             full_found,   // a full row exists now
  output logic [4:0]       full_row      // the lowest full row
);

  logic [COLS-1:0] rows_q [ROWS];

  always_comb begin
    full_found = 1'b0;
    full_row   = '0;
    for (int r = 0; r < ROWS; r++)
      if (&rows_q[r]) begin
        full_found = 1'b1;
        full_row   = 5'(r);
      end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int r = 0; r < ROWS; r++) rows_q[r] <= '0;
    end else if (merge) begin
      for (int r = 0; r < ROWS; r++)
        rows_q[r] <= rows_q[r] | merge_mask[r*COLS +: COLS];
    end else if (remove && full_found) begin
      for (int r = 0; r < ROWS; r++)
        if (5'(r) <= full_row)
          rows_q[r] <= (r == 0) ? '0 : rows_q[(r == 0) ? 0 : r-1];
    end
  end

  always_comb
    for (int r = 0; r < ROWS; r++)
      background[r*COLS +: COLS] = rows_q[r];

endmodule

// score_keeper: score, high score and level.
//
// Each removed row adds POINTS_PER_LINE to the 32-bit score. Every
// LINES_PER_LEVEL removed rows raise the 8-bit level by one (saturating at
// 255). A game start clears score and level; at game over the high score
// takes the score if it is higher. The high score survives games and is
// cleared only by reset. Register widths follow the register map; the
// points per row and rows per level are this design's choice.
module score_keeper #(
  parameter int unsigned POINTS_PER_LINE = 1,
  parameter int unsigned LINES_PER_LEVEL = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        game_start,
  input  logic        line_cleared,
  input  logic        game_over,
  output logic [31:0] score,
  output logic [31:0] high_score,
  output logic [7:0]  level
);

  localparam int unsigned LW = (LINES_PER_LEVEL > 1) ? $clog2(LINES_PER_LEVEL) : 1;
  logic [LW-1:0] in_level_q;   // rows removed since the last level-up

  always_ff @(posedge clk) begin
    if (rst) begin
      score      <= '0;
      high_score <= '0;
      level      <= '0;
      in_level_q <= '0;
    end else if (game_start) begin
      score      <= '0;
      level      <= '0;
      in_level_q <= '0;
    end else begin
      if (line_cleared) begin
        score <= score + 32'(POINTS_PER_LINE);
        if (in_level_q == LW'(LINES_PER_LEVEL - 1)) begin
          in_level_q <= '0;
          if (level != 8'hFF) level <= level + 8'd1;
        end else begin
          in_level_q <= in_level_q + 1'b1;
        end
      end
      if (game_over && score > high_score) high_score <= score;
    end
  end

endmodule

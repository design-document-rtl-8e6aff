// joystick_if: joystick input stage.
//
// The five joystick switches (up, down, left, right, start; active high)
// pass a two-flip-flop synchronizer, and a rising edge of each makes a
// one-cycle pulse, two cycles after the edge at the pins. Any pulse also
// forms the command byte (cmd_t) pushed into the input command queue,
// with cmd_valid for one cycle. The switches are assumed to be
// debounced on the board; no debouncer is built.
// The five directions follow the game's controls; the synchronizer, the
// edge detection and the command byte layout are this design's choice.
module joystick_if
  import tetris_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] pins,       // {start, right, left, down, up}
  output logic       up,
  output logic       down,
  output logic       left,
  output logic       right,
  output logic       start,
  output cmd_t       cmd,
  output logic       cmd_valid
);

  logic [4:0] s1_q, s2_q, prev_q, rise;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_q   <= '0;
      s2_q   <= '0;
      prev_q <= '0;
    end else begin
      s1_q   <= pins;
      s2_q   <= s1_q;
      prev_q <= s2_q;
    end
  end

  assign rise  = s2_q & ~prev_q;
  assign up    = rise[0];
  assign down  = rise[1];
  assign left  = rise[2];
  assign right = rise[3];
  assign start = rise[4];

  always_comb begin
    cmd          = '0;
    cmd.up       = rise[0];
    cmd.down     = rise[1];
    cmd.left     = rise[2];
    cmd.right    = rise[3];
    cmd.start    = rise[4];
    cmd_valid    = |rise;
  end

endmodule

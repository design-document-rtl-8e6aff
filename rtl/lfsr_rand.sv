// lfsr_rand: pseudo-random block generator (gen_random).
//
// A 16-bit maximal-length Galois LFSR (taps x^16+x^14+x^13+x^11+1) steps
// every clock cycle, so the value taken depends on how many cycles pass
// between player actions. On a next pulse the low bits are reduced to one
// of the seven shapes, and the new block enters in that shape's first
// rotation (A1, B1, C1, D1, E1, F1 or G1). The generator, its polynomial and
// the choice of the first rotation are this design's own.
module lfsr_rand
  import tetris_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic clk,
  input  logic rst,
  input  logic next,     // take a new value
  output blk_t blk       // registered; changes the cycle after next
);

  logic [15:0] lfsr_q;
  logic [2:0]  shape;

  always_ff @(posedge clk) begin
    if (rst) lfsr_q <= SEED;
    else     lfsr_q <= {1'b0, lfsr_q[15:1]} ^ (lfsr_q[0] ? 16'hB400 : 16'h0000);
  end

  // 0..7 folded onto 0..6.
  assign shape = (lfsr_q[2:0] == 3'd7) ? lfsr_q[5:3] % 3'd7 : lfsr_q[2:0];

  function automatic blk_t first_rot(input logic [2:0] s);
    unique case (s)
      3'd0:    return BLK_A1;
      3'd1:    return BLK_B1;
      3'd2:    return BLK_C1;
      3'd3:    return BLK_D1;
      3'd4:    return BLK_E1;
      3'd5:    return BLK_F1;
      default: return BLK_G1;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst)       blk <= first_rot(SEED[2:0] % 3'd7);
    else if (next) blk <= first_rot(shape);
  end

endmodule

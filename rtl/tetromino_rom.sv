// tetromino_rom: the block model.
//
// For each of the 19 block codes it gives the offsets of the three cells
// that surround the anchor (the anchor itself is offset (0,0) and is the
// fourth cell), the code the block turns into when rotated, and its shape
// group (1 = A ... 7 = G). The offsets are read from the block model list;
// the anchor is the grid point that stays put during rotation. Every
// rotation turns the block a quarter turn counter-clockwise about the
// anchor and steps to the next code of the same shape, wrapping from the
// last rotation to the first (D2 -> D1, F2 -> F1, G2 -> G1, A1 -> A1).
// Purely combinational.
// The 19 codes and their pictures follow the block model list; which cell
// is the anchor and the turning direction are this design's choice.
module tetromino_rom
  import tetris_pkg::*;
(
  input  blk_t       blk,
  output cell_off_t  off [3],   // the three non-anchor cells
  output blk_t       rot,       // code after one rotation
  output logic [2:0] group      // 1..7 for shapes A..G
);

  function automatic cell_off_t co(input logic signed [2:0] r, input logic signed [2:0] c);
    cell_off_t x;
    x.dr = r;
    x.dc = c;
    return x;
  endfunction

  always_comb begin
    off[0] = co(0, 0);
    off[1] = co(0, 0);
    off[2] = co(0, 0);
    rot    = blk;
    group  = 3'd0;
    unique case (blk)
      BLK_A1: begin off[0]=co( 0, 1); off[1]=co( 1, 0); off[2]=co( 1, 1); rot=BLK_A1; group=3'd1; end
      BLK_B1: begin off[0]=co(-1, 0); off[1]=co( 1, 0); off[2]=co( 1, 1); rot=BLK_B2; group=3'd2; end
      BLK_B2: begin off[0]=co( 0,-1); off[1]=co( 0, 1); off[2]=co(-1, 1); rot=BLK_B3; group=3'd2; end
      BLK_B3: begin off[0]=co(-1,-1); off[1]=co(-1, 0); off[2]=co( 1, 0); rot=BLK_B4; group=3'd2; end
      BLK_B4: begin off[0]=co( 0,-1); off[1]=co( 0, 1); off[2]=co( 1,-1); rot=BLK_B1; group=3'd2; end
      BLK_C1: begin off[0]=co(-1, 0); off[1]=co( 1, 0); off[2]=co( 1,-1); rot=BLK_C2; group=3'd3; end
      BLK_C2: begin off[0]=co( 0,-1); off[1]=co( 0, 1); off[2]=co( 1, 1); rot=BLK_C3; group=3'd3; end
      BLK_C3: begin off[0]=co(-1, 0); off[1]=co(-1, 1); off[2]=co( 1, 0); rot=BLK_C4; group=3'd3; end
      BLK_C4: begin off[0]=co(-1,-1); off[1]=co( 0,-1); off[2]=co( 0, 1); rot=BLK_C1; group=3'd3; end
      BLK_D1: begin off[0]=co(-1, 0); off[1]=co( 1, 0); off[2]=co( 2, 0); rot=BLK_D2; group=3'd4; end
      BLK_D2: begin off[0]=co( 0,-1); off[1]=co( 0, 1); off[2]=co( 0, 2); rot=BLK_D1; group=3'd4; end
      BLK_E1: begin off[0]=co(-1, 0); off[1]=co( 0,-1); off[2]=co( 0, 1); rot=BLK_E2; group=3'd5; end
      BLK_E2: begin off[0]=co(-1, 0); off[1]=co( 0,-1); off[2]=co( 1, 0); rot=BLK_E3; group=3'd5; end
      BLK_E3: begin off[0]=co( 0,-1); off[1]=co( 0, 1); off[2]=co( 1, 0); rot=BLK_E4; group=3'd5; end
      BLK_E4: begin off[0]=co(-1, 0); off[1]=co( 0, 1); off[2]=co( 1, 0); rot=BLK_E1; group=3'd5; end
      BLK_F1: begin off[0]=co(-1, 0); off[1]=co( 0,-1); off[2]=co( 1,-1); rot=BLK_F2; group=3'd6; end
      BLK_F2: begin off[0]=co( 0,-1); off[1]=co( 1, 0); off[2]=co( 1, 1); rot=BLK_F1; group=3'd6; end
      BLK_G1: begin off[0]=co(-1, 0); off[1]=co( 0, 1); off[2]=co( 1, 1); rot=BLK_G2; group=3'd7; end
      BLK_G2: begin off[0]=co(-1, 0); off[1]=co(-1, 1); off[2]=co( 0,-1); rot=BLK_G1; group=3'd7; end
      default: begin rot = BLK_A1; group = 3'd0; end
    endcase
  end

endmodule

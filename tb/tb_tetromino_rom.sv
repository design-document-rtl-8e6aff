// tb_tetromino_rom: checks the block model against reference pictures.
// For each of the 19 codes: the anchor plus the three offsets give exactly
// the four cells of the picture, the group is right, the rotation stays in
// the group and returns to the start after as many steps as the shape has
// rotations, and for shapes B, C, E the rotated picture is the quarter
// turn counter-clockwise about the anchor.
// Purely combinational; each code is checked after a short delay.
module tb_tetromino_rom;
  import tetris_pkg::*;
  import tb_shapes_pkg::*;

  blk_t       blk;
  cell_off_t  off [3];
  blk_t       rot;
  logic [2:0] group;
  int checks = 0, failures = 0;

  tetromino_rom dut (.blk, .off, .rot, .group);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nrot [8] = '{0, 1, 4, 4, 2, 4, 2, 2};
    for (int code = 0; code < 19; code++) begin
      logic [15:0] pic;
      int cnt;
      blk = blk_t'(code);
      #1;
      pic = '0;
      pic[15 - 5] = 1'b1;  // anchor (0,0)
      for (int i = 0; i < 3; i++)
        pic[15 - ((int'(off[i].dr) + 1) * 4 + (int'(off[i].dc) + 1))] = 1'b1;
      cnt = $countones(pic);
      check(cnt == 4, $sformatf("code %0d has %0d distinct cells", code, cnt));
      check(pic == ref_bitmap(code), $sformatf("code %0d picture %h exp %h", code, pic, ref_bitmap(code)));
      check(int'(group) == ref_group(code), $sformatf("code %0d group %0d", code, group));
      check(ref_group(int'(rot)) == ref_group(code), $sformatf("code %0d rotates out of its group", code));
      // quarter turn check for 4-rotation shapes: cell (dr,dc) -> (-dc,dr)
      if (nrot[ref_group(code)] == 4) begin
        automatic bit good = 1'b1;
        for (int dr = -1; dr <= 2; dr++)
          for (int dc = -1; dc <= 2; dc++)
            if (ref_cell(code, dr, dc) && !ref_cell(int'(rot), -dc, dr)) good = 1'b0;
        check(good, $sformatf("code %0d rotation is not a quarter turn", code));
      end
    end
    // cycle length per shape
    for (int code = 0; code < 19; code++) begin
      automatic int steps = 0;
      blk = blk_t'(code);
      do begin
        #1;
        blk = rot;
        steps++;
      end while (int'(blk) != code && steps < 10);
      #1;
      check(steps == nrot[ref_group(code)], $sformatf("code %0d rotation cycle %0d", code, steps));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

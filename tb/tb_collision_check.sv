// tb_collision_check: random backgrounds of varying density and random
// block placements; the judgment must pass exactly when the reference
// block is inside the field and overlaps no background cell.
// Purely combinational; 4000 random cases after a short delay each.
module tb_collision_check;
  import tetris_pkg::*;
  import tb_shapes_pkg::*;

  blk_t         blk;
  logic [4:0]   n;
  logic [3:0]   m;
  logic [199:0] bg;
  logic         ok;
  int checks = 0, failures = 0;
  int n_ok = 0, n_hit = 0, n_oob = 0;

  collision_check dut (.blk, .n, .m, .background(bg), .ok);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int code, nn, mm, dens;
      logic [199:0] k;
      bit o, exp_ok;
      code = $urandom_range(18);
      nn   = $urandom_range(21);
      mm   = $urandom_range(11);
      dens = $urandom_range(20);
      for (int i = 0; i < 200; i++) bg[i] = ($urandom_range(99) < dens);
      blk = blk_t'(code);
      n = 5'(nn);
      m = 4'(mm);
      #1;
      k = ref_mask(code, nn, mm, o);
      exp_ok = !o && ((k & bg) == '0);
      if (o) n_oob++;
      else if (!exp_ok) n_hit++;
      else n_ok++;
      checks++;
      if (ok !== exp_ok) begin
        failures++;
        if (failures < 10) $display("FAIL code %0d n %0d m %0d ok %0d", code, nn, mm, ok);
      end
    end
    checks++;
    if (n_ok == 0 || n_hit == 0 || n_oob == 0) failures++;
    $display("legal %0d overlap %0d out of bounds %0d", n_ok, n_hit, n_oob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

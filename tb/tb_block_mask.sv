// tb_block_mask: places every block code at random and at edge positions
// and compares mask and out-of-bounds flag with the reference pictures.
// Purely combinational; each case is checked after a short delay. The
// pictures are the block model list as read by this design.
module tb_block_mask;
  import tetris_pkg::*;
  import tb_shapes_pkg::*;

  blk_t         blk;
  logic [4:0]   n;
  logic [3:0]   m;
  logic [199:0] mask, exp_mask;
  logic         oob;
  bit           exp_oob;
  int checks = 0, failures = 0;
  int n_oob = 0;

  block_mask dut (.blk, .n, .m, .mask, .oob);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int code, nn, mm;
      code = $urandom_range(18);
      nn   = (t < 2000) ? $urandom_range(31) : $urandom_range(21);
      mm   = (t % 3 == 0) ? $urandom_range(15) : $urandom_range(10);
      blk = blk_t'(code);
      n = 5'(nn);
      m = 4'(mm);
      #1;
      exp_mask = ref_mask(code, nn, mm, exp_oob);
      checks++;
      if (mask !== exp_mask || oob !== exp_oob) begin
        failures++;
        if (failures < 10)
          $display("FAIL code %0d n %0d m %0d oob %0d exp %0d", code, nn, mm, oob, exp_oob);
      end
      if (exp_oob) n_oob++;
    end
    checks++;
    if (n_oob == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lfsr_rand: the generator must only produce first rotations (A1, B1,
// C1, D1, E1, F1, G1), must produce every one of them over many draws,
// must hold its output between draws and its state must follow the
// x^16+x^14+x^13+x^11+1 Galois sequence computed here.
// The generator is this design's own; the test checks it as specified
// in its module.
module tb_lfsr_rand;
  import tetris_pkg::*;

  logic clk = 0, rst = 1, next = 0;
  blk_t blk;
  int checks = 0, failures = 0;
  int seen [19];
  logic [15:0] model;

  lfsr_rand dut (.clk, .rst, .next, .blk);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic blk_t first_of(input logic [15:0] s);
    logic [2:0] k;
    k = (s[2:0] == 3'd7) ? 3'(s[5:3] % 7) : s[2:0];
    case (k)
      0: return BLK_A1; 1: return BLK_B1; 2: return BLK_C1; 3: return BLK_D1;
      4: return BLK_E1; 5: return BLK_F1; default: return BLK_G1;
    endcase
  endfunction

  initial begin
    foreach (seen[i]) seen[i] = 0;
    model = 16'hACE1;
    @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      blk_t exp;
      int gap;
      gap = $urandom_range(5);
      repeat (gap) begin
        @(negedge clk);
        model = {1'b0, model[15:1]} ^ (model[0] ? 16'hB400 : 16'h0);
      end
      exp = first_of(model);
      next = 1;
      @(negedge clk);
      next = 0;
      model = {1'b0, model[15:1]} ^ (model[0] ? 16'hB400 : 16'h0);
      checks++;
      if (blk !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL draw %0d got %0d exp %0d", t, blk, exp);
      end
      seen[int'(blk)]++;
      // hold between draws
      @(negedge clk);
      model = {1'b0, model[15:1]} ^ (model[0] ? 16'hB400 : 16'h0);
      checks++;
      if (blk !== exp) failures++;
    end
    foreach (seen[i]) begin
      automatic bit first = (i == 0 || i == 1 || i == 5 || i == 9 || i == 11 || i == 15 || i == 17);
      checks++;
      if (first && seen[i] == 0) begin failures++; $display("FAIL code %0d never drawn", i); end
      if (!first && seen[i] != 0) begin failures++; $display("FAIL code %0d drawn", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

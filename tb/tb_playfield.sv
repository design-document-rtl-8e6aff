// tb_playfield: merges random masks, fills rows and runs the remove step
// until no full row is left, against a reference model of rows kept in
// the testbench. Also checks clear.
// One command per clock cycle; the matrix is compared after each one.
module tb_playfield;
  import tetris_pkg::*;

  logic clk = 0, rst = 1;
  logic clear = 0, merge = 0, remove = 0;
  logic [199:0] merge_mask = '0, background;
  logic full_found;
  logic [4:0] full_row;
  logic [9:0] model [20];
  int checks = 0, failures = 0;
  int removed = 0;

  playfield dut (.clk, .rst, .clear, .merge, .merge_mask, .remove,
                 .background, .full_found, .full_row);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [199:0] flat();
    logic [199:0] f;
    for (int r = 0; r < 20; r++) f[r*10 +: 10] = model[r];
    return f;
  endfunction

  function automatic int lowest_full();
    int k = -1;
    for (int r = 0; r < 20; r++) if (&model[r]) k = r;
    return k;
  endfunction

  task automatic compare(input string what);
    checks++;
    if (background !== flat()) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int r = 0; r < 20; r++) model[r] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    compare("after reset");
    for (int round = 0; round < 60; round++) begin
      // merge a mask that fills some rows completely and scatters cells
      logic [199:0] k;
      k = '0;
      for (int r = 10; r < 20; r++)
        if ($urandom_range(2) == 0) k[r*10 +: 10] = '1;
        else for (int c = 0; c < 10; c++) k[r*10 + c] = ($urandom_range(3) == 0);
      merge_mask <= k;
      merge <= 1;
      @(posedge clk);
      merge <= 0;
      for (int r = 0; r < 20; r++) model[r] = model[r] | k[r*10 +: 10];
      @(negedge clk);
      compare("after merge");
      // remove until none left
      while (1) begin
        int f;
        f = lowest_full();
        checks++;
        if (full_found !== (f >= 0) || (f >= 0 && int'(full_row) != f)) begin
          failures++;
          $display("FAIL full_found %0d row %0d exp %0d", full_found, full_row, f);
        end
        if (f < 0) break;
        remove <= 1;
        @(posedge clk);
        remove <= 0;
        for (int r = f; r > 0; r--) model[r] = model[r-1];
        model[0] = '0;
        removed++;
        @(negedge clk);
        compare("after remove");
      end
      if (round % 5 == 4) begin
        clear <= 1;
        @(posedge clk);
        clear <= 0;
        for (int r = 0; r < 20; r++) model[r] = '0;
        @(negedge clk);
        compare("after clear");
      end
    end
    checks++;
    if (removed == 0) failures++;
    $display("rows removed %0d", removed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

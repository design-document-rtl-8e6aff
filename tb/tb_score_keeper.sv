// tb_score_keeper: plays several games with random row removals and checks
// score, level (one per 10 rows) and high score against a model.
// One event per clock cycle. Points per row and rows per level are this
// design's own values (1 and 10).
module tb_score_keeper;
  logic clk = 0, rst = 1, game_start = 0, line_cleared = 0, game_over = 0;
  logic [31:0] score, high_score;
  logic [7:0] level;
  int checks = 0, failures = 0;
  int m_score = 0, m_hi = 0, m_lines = 0;

  score_keeper dut (.clk, .rst, .game_start, .line_cleared, .game_over,
                    .score, .high_score, .level);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp();
    checks++;
    if (score != 32'(m_score) || high_score != 32'(m_hi) || level != 8'(m_lines / 10)) begin
      failures++;
      $display("FAIL score %0d/%0d hi %0d/%0d level %0d/%0d", score, m_score,
               high_score, m_hi, level, m_lines / 10);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int g = 0; g < 6; g++) begin
      automatic int rows = $urandom_range(60);
      game_start <= 1;
      @(posedge clk);
      game_start <= 0;
      m_score = 0; m_lines = 0;
      @(negedge clk);
      cmp();
      for (int i = 0; i < rows; i++) begin
        line_cleared <= 1;
        @(posedge clk);
        line_cleared <= 0;
        m_score++; m_lines++;
        repeat ($urandom_range(3)) @(posedge clk);
        @(negedge clk);
        cmp();
      end
      game_over <= 1;
      @(posedge clk);
      game_over <= 0;
      if (m_score > m_hi) m_hi = m_score;
      @(negedge clk);
      cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cmd_queue: random pushes and software head updates against a queue
// model; checks the entries between head and tail, the indices, the
// dropping of pushes into a full queue and the overflow flag.
// Clock period 100 time units; outputs are sampled one time unit after
// each edge. Depth 16 and the ring protocol are this design's own.
module tb_cmd_queue;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1;
  logic push = 0, head_we = 0;
  logic [7:0] push_data = '0, rd_data;
  logic [3:0] head_wdata = '0, rd_idx = '0, head, tail;
  logic overflow;
  logic [7:0] model [$];
  int m_head = 0, m_tail = 0;
  bit m_ovf = 0;
  int checks = 0, failures = 0;
  int n_full = 0;
  int old_head;

  cmd_queue #(.DEPTH(DEPTH)) dut (.clk, .rst, .push, .push_data, .head_we, .head_wdata,
                                  .rd_idx, .rd_data, .head, .tail, .overflow);

  always #50 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      automatic int pushp = (t % 400 < 200) ? 3 : 1;
      @(negedge clk);
      // check indices and every entry in the queue
      checks++;
      if (int'(head) != m_head || int'(tail) != m_tail || overflow !== m_ovf) begin
        failures++;
        if (failures < 10) $display("FAIL head %0d/%0d tail %0d/%0d ovf %0d/%0d",
                                    head, m_head, tail, m_tail, overflow, m_ovf);
      end
      for (int i = 0; i < model.size(); i++) begin
        rd_idx = 4'((m_head + i) % DEPTH);
        #1;
        checks++;
        if (rd_data !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL entry %0d got %h exp %h", i, rd_data, model[i]);
        end
      end
      push = ($urandom_range(3) < pushp);
      push_data = 8'($urandom);
      head_we = ($urandom_range(3) == 0) && model.size() > 0;
      if (head_we) begin
        automatic int k = $urandom_range(model.size());
        head_wdata = 4'((m_head + k) % DEPTH);
      end
      @(posedge clk);
      #1;
      // model update: a head write clears the overflow flag, a push judged
      // full against the head before that write sets it again
      old_head = m_head;
      if (head_we) begin
        automatic int k = (int'(head_wdata) - m_head + DEPTH) % DEPTH;
        repeat (k) void'(model.pop_front());
        m_head = int'(head_wdata);
        m_ovf = 0;
      end
      if (push) begin
        if (((m_tail + 1) % DEPTH) == old_head) begin
          m_ovf = 1;
          n_full++;
        end else begin
          model.push_back(push_data);
          m_tail = (m_tail + 1) % DEPTH;
        end
      end
      head_we = 0;
      push = 0;
    end
    checks++;
    if (n_full == 0) failures++;
    $display("pushes into a full queue %0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

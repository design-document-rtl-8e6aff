// tb_block_buffer: starts copies of random pictures and checks that the
// front bank keeps the previous picture while a copy runs, that the banks
// swap 256 cycles after frame_start and that every byte has the specified
// layout; a frame_start during a copy must be ignored.
// Clock period 100 time units; reads are sampled just after the clock
// edge. The two 256-byte banks are the register map's; the byte layout
// checked is this design's own.
module tb_block_buffer;
  logic clk = 0, rst = 1, frame_start = 0;
  logic [199:0] bg = '0, act = '0;
  logic [2:0] group = '0;
  logic [7:0] rd_addr = '0, rd_data;
  logic front, busy;
  logic [15:0] swaps;
  logic [7:0] shown [256];
  int checks = 0, failures = 0;
  int busy_cycles = 0;

  always @(posedge clk) if (busy) busy_cycles++;

  block_buffer dut (.clk, .rst, .frame_start, .background(bg), .active_mask(act), .group,
                    .rd_addr, .rd_data, .front, .busy, .swaps);

  always #50 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] cell_byte(int a, logic [199:0] b, logic [199:0] k, logic [2:0] g);
    if (a >= 200) return 8'h00;
    return {k[a], k[a] | b[a], 3'b000, k[a] ? g : 3'b000};
  endfunction

  task automatic check_front(input string what);
    int bad = 0;
    for (int a = 0; a < 256; a++) begin
      rd_addr = 8'(a);
      #0.001;
      if (rd_data !== shown[a]) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d bytes differ", what, bad);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    busy_cycles = 0;
    for (int f = 0; f < 8; f++) begin
      logic [199:0] nb, nk;
      logic [2:0] ng;
      int cyc;
      bit f0;
      for (int i = 0; i < 200; i++) begin
        nb[i] = ($urandom_range(2) == 0);
        nk[i] = ($urandom_range(30) == 0);
      end
      ng = 3'($urandom_range(1, 7));
      @(negedge clk);
      bg = nb; act = nk; group = ng;
      f0 = front;
      frame_start = 1;
      @(negedge clk);
      frame_start = 0;
      // mid-copy: front unchanged, a second frame_start ignored
      repeat (100) @(negedge clk);
      if (f > 0) check_front("front bank changed during a copy");
      frame_start = 1;
      @(negedge clk);
      frame_start = 0;
      while (busy) @(negedge clk);
      cyc = busy_cycles;
      busy_cycles = 0;
      checks++;
      if (cyc != 256 || front == f0 || swaps != 16'(f + 1)) begin
        failures++;
        $display("FAIL copy took %0d cycles, front %0d->%0d, swaps %0d", cyc, f0, front, swaps);
      end
      for (int a = 0; a < 256; a++) shown[a] = cell_byte(a, nb, nk, ng);
      check_front("new picture");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_avalon_regs: random reads and writes on the slave port against a
// register model. The engine, queue and buffer inputs are driven with
// values known to the testbench (queue entry i reads as 8'hA0+i, buffer
// byte a as a XOR 8'h5A). Checks read data one cycle after read, the
// stored registers, the start / trigger / head-write pulses, and the
// speed reset value of 1000.
// Runs on a 100 MHz clock for a few thousand cycles; the addresses and
// widths checked are those of the register map, the rest is this
// design's own protocol.
module tb_avalon_regs;
  import tetris_pkg::*;
  logic clk = 0, rst = 1;
  logic [9:0] address = '0;
  logic read = 0, write = 0;
  logic [31:0] writedata = '0, readdata;
  state_t state = S_HOLD;
  logic game_over_flag = 0;
  logic [7:0] level = 8'd3;
  logic [31:0] score = 32'd1234, high_score = 32'd99999;
  logic start;
  logic [15:0] speed, pitch, duration;
  logic [3:0] q_rd_idx, q_head = 4'd2, q_tail = 4'd9, q_head_wdata;
  logic [7:0] q_rd_data, buf_rd_addr, buf_rd_data;
  logic q_overflow = 1, q_head_we, trigger, playing = 1;
  logic [3:0] selector;
  int checks = 0, failures = 0;
  int n_start = 0, n_trig = 0, n_head = 0;
  logic [15:0] m_speed = 16'd1000, m_pitch = 0, m_dur = 0;
  logic [3:0] m_sel = 0;

  assign q_rd_data   = 8'hA0 + 8'(q_rd_idx);
  assign buf_rd_data = buf_rd_addr ^ 8'h5A;

  avalon_regs dut (.clk, .rst, .address, .read, .write, .writedata, .readdata,
    .state, .game_over_flag, .level, .score, .high_score, .start, .speed,
    .q_rd_idx, .q_rd_data, .q_head, .q_tail, .q_overflow, .q_head_we, .q_head_wdata,
    .buf_rd_addr, .buf_rd_data, .pitch, .duration, .trigger, .selector, .playing);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model_read(input int a);
    if (a >= 256) return 32'((a[7:0]) ^ 8'h5A);
    if (a < 16)   return 32'(8'hA0 + 8'(a));
    case (a)
      30: return 32'(q_head);
      31: return 32'(q_tail);
      32: return {26'd0, q_overflow, game_over_flag, 4'(state)};
      33: return 32'(level);
      34: return 32'(m_speed);
      35: return score;
      36: return high_score;
      39: return 32'(m_pitch);
      40: return 32'(m_dur);
      41: return 32'(playing);
      42: return 32'(m_sel);
      default: return 32'd0;
    endcase
  endfunction

  int addrs [16] = '{0, 5, 15, 30, 31, 32, 33, 34, 35, 36, 39, 40, 41, 42, 300, 50};

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      int a;
      bit do_write;
      a = (t % 7 == 0) ? $urandom_range(256, 511) : addrs[$urandom_range(15)];
      do_write = ($urandom_range(2) == 0);
      @(negedge clk);
      address = 10'(a);
      writedata = $urandom;
      read = !do_write;
      write = do_write;
      #1;
      if (do_write) begin
        checks++;
        if (start !== (a == 32 && writedata[0]) || trigger !== (a == 41 && writedata[0]) ||
            q_head_we !== (a == 30) || (a == 30 && q_head_wdata !== writedata[3:0])) begin
          failures++;
          $display("FAIL write pulses at address %0d", a);
        end
        n_start += start; n_trig += trigger; n_head += q_head_we;
      end
      @(negedge clk);
      read = 0;
      write = 0;
      if (do_write) begin
        case (a)
          34: m_speed = writedata[15:0];
          39: m_pitch = writedata[15:0];
          40: m_dur   = writedata[15:0];
          42: m_sel   = writedata[3:0];
          default: ;
        endcase
        checks++;
        if (speed !== m_speed || pitch !== m_pitch || duration !== m_dur || selector !== m_sel) begin
          failures++;
          $display("FAIL registers after write to %0d", a);
        end
      end else begin
        checks++;
        if (readdata !== model_read(a)) begin
          failures++;
          $display("FAIL read %0d got %h exp %h", a, readdata, model_read(a));
        end
      end
    end
    checks++;
    if (n_start == 0 || n_trig == 0 || n_head == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

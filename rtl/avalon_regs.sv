// avalon_regs: processor-side register map on an Avalon-MM slave port.
//
// Word addresses (32-bit data, read latency fixed at one cycle, no wait
// states):
//    0..15  R   input command queue entries (8-bit commands)
//   30      RW  queue head index; software writes it to consume commands
//   31      R   queue tail index
//   32      RW  game state: [3:0] FSM state, [4] game over, [5] queue
//               overflow; writing 1 to bit 0 starts a game
//   33      R   level (8-bit)
//   34      RW  speed: fall interval in timer ticks (16-bit)
//   35      R   score (32-bit)
//   36      R   high score (32-bit)
//   39      RW  pitch: division ratio N in [13:0], octave shift in [15:14]
//   40      RW  note duration in shortest-note units (16-bit)
//   41      W   trigger: writing 1 to bit 0 starts playback; reads give
//               the playing flag
//   42      RW  sound selector (4-bit)
//  256..511 R   front bank of the display buffer, one byte per cell
// Other addresses read as 0 and ignore writes. The register numbers
// 30..42 and their widths follow the register map; the head/tail
// protocol, the start bit, the buffer window and the state byte layout
// are this design's choice.
module avalon_regs
  import tetris_pkg::*;
#(
  parameter int unsigned QDEPTH     = 16,
  parameter logic [15:0] SPEED_INIT = 16'd1000
) (
  input  logic        clk,
  input  logic        rst,
  // Avalon-MM slave
  input  logic [9:0]  address,
  input  logic        read,
  input  logic        write,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  // game engine
  input  state_t      state,
  input  logic        game_over_flag,
  input  logic [7:0]  level,
  input  logic [31:0] score,
  input  logic [31:0] high_score,
  output logic        start,
  output logic [15:0] speed,
  // command queue
  output logic [$clog2(QDEPTH)-1:0] q_rd_idx,
  input  logic [7:0]                q_rd_data,
  input  logic [$clog2(QDEPTH)-1:0] q_head,
  input  logic [$clog2(QDEPTH)-1:0] q_tail,
  input  logic                      q_overflow,
  output logic                      q_head_we,
  output logic [$clog2(QDEPTH)-1:0] q_head_wdata,
  // display buffer
  output logic [7:0]  buf_rd_addr,
  input  logic [7:0]  buf_rd_data,
  // audio
  output logic [15:0] pitch,
  output logic [15:0] duration,
  output logic        trigger,
  output logic [3:0]  selector,
  input  logic        playing
);

  localparam int unsigned QW = $clog2(QDEPTH);

  assign q_rd_idx     = QW'(address);
  assign buf_rd_addr  = address[7:0];
  assign q_head_we    = write && (address == A_QUEUE_HEAD);
  assign q_head_wdata = QW'(writedata);
  assign start        = write && (address == A_GAME_STATE) && writedata[0];
  assign trigger      = write && (address == A_TRIGGER) && writedata[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      speed    <= SPEED_INIT;
      pitch    <= '0;
      duration <= '0;
      selector <= '0;
    end else if (write) begin
      unique case (address)
        A_SPEED:    speed    <= writedata[15:0];
        A_PITCH:    pitch    <= writedata[15:0];
        A_DURATION: duration <= writedata[15:0];
        A_SELECTOR: selector <= writedata[3:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      readdata <= '0;
    end else if (read) begin
      readdata <= '0;
      if (address >= A_BUF_BASE)
        readdata <= 32'(buf_rd_data);
      else if (address < 10'(QDEPTH))
        readdata <= 32'(q_rd_data);
      else
        unique case (address)
          A_QUEUE_HEAD: readdata <= 32'(q_head);
          A_QUEUE_TAIL: readdata <= 32'(q_tail);
          A_GAME_STATE: readdata <= {26'd0, q_overflow, game_over_flag, state};
          A_LEVEL:      readdata <= 32'(level);
          A_SPEED:      readdata <= 32'(speed);
          A_SCORE:      readdata <= score;
          A_HIGH_SCORE: readdata <= high_score;
          A_PITCH:      readdata <= 32'(pitch);
          A_DURATION:   readdata <= 32'(duration);
          A_TRIGGER:    readdata <= 32'(playing);
          A_SELECTOR:   readdata <= 32'(selector);
          default: ;
        endcase
    end
  end

  a_no_read_write: assert property (@(posedge clk) disable iff (rst) !(read && write));

endmodule

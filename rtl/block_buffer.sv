// block_buffer: the double-buffered dynamic block buffer.
//
// Two banks of 256 bytes, one byte per playfield cell (cell r*10+c at byte
// r*10+c; bytes 200..255 stay zero). While the processor reads the front
// bank, a frame_start pulse makes the writer copy the current picture
// into the back bank, one byte per clock cycle for 256 cycles; then the
// banks swap, so a reader never sees a half-written picture. A
// frame_start that arrives while a copy is running is ignored.
// Byte format: bit 7 = cell belongs to the active block, bit 6 = cell
// occupied (active or inactive), bits 2:0 = shape group 1..7 of the active
// block (0 for inactive cells), other bits 0. The walk order, the swap
// point and the byte layout are this design's choice.
module block_buffer
  import tetris_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             frame_start,
  input  logic [CELLS-1:0] background,
  input  logic [CELLS-1:0] active_mask,
  input  logic [2:0]       group,
  input  logic [7:0]       rd_addr,
  output logic [7:0]       rd_data,     // combinational read of the front bank
  output logic             front,       // which bank is shown
  output logic             busy,        // a copy is running
  output logic [15:0]      swaps        // completed copies
);

  logic [7:0] mem [512];
  logic [7:0] wa_q;
  logic [7:0] wbyte;

  always_comb begin
    wbyte = '0;
    if (wa_q < 8'(CELLS)) begin
      wbyte[7]   = active_mask[wa_q];
      wbyte[6]   = active_mask[wa_q] | background[wa_q];
      wbyte[2:0] = active_mask[wa_q] ? group : 3'd0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wa_q  <= '0;
      busy  <= 1'b0;
      front <= 1'b0;
      swaps <= '0;
    end else if (busy) begin
      wa_q <= wa_q + 8'd1;
      if (wa_q == 8'hFF) begin
        busy  <= 1'b0;
        front <= ~front;
        swaps <= swaps + 16'd1;
      end
    end else if (frame_start) begin
      busy <= 1'b1;
      wa_q <= '0;
    end
  end

  always_ff @(posedge clk)
    if (busy) mem[{~front, wa_q}] <= wbyte;

  assign rd_data = mem[{front, rd_addr}];

endmodule

// vga_ctrl: VGA timing and playfield rendering.
//
// The 100 MHz system clock is divided by PIX_DIV (4) into a 25 MHz pixel
// enable, close to the 25.175 MHz of the 640x480 at 60 Hz mode. Horizontal
// and vertical counters run over 800 x 525 pixel periods (640 visible +
// 16 front porch + 96 sync + 48 back porch; 480 + 10 + 2 + 33), giving a
// 31.25 kHz line rate and a 59.5 Hz frame rate. hsync_r and vsync_r are
// active low. The 200-bit number input is the 20x10 matrix (bit r*10+c);
// each cell is drawn as a CELL_PX x CELL_PX square, white when its bit is
// 1 and black otherwise, with the field placed from pixel (X0, Y0); the
// rest of the screen is black. Colour and sync outputs are registered and
// change on pixel enables, one pixel period after the counters.
// frame_start pulses for one cycle when the visible area ends, which
// starts the copy into the display buffer. Port names follow the block
// symbol of the VGA module (OutRad carries red); frame_start is added.
// The standard 640x480 timing values, the cell size and position are this
// design's choice.
module vga_ctrl
  import tetris_pkg::*;
#(
  parameter int unsigned PIX_DIV = 4,
  parameter int unsigned H_VIS = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33,
  parameter int unsigned CELL_PX = 24,
  parameter int unsigned X0 = 200,
  parameter int unsigned Y0 = 0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CELLS-1:0] number,
  output logic [3:0]       OutBlue,
  output logic [3:0]       OutGreen,
  output logic [3:0]       OutRad,
  output logic             hsync_r,
  output logic             vsync_r,
  output logic             frame_start
);

  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int unsigned DW    = (PIX_DIV > 1) ? $clog2(PIX_DIV) : 1;

  logic [DW-1:0] div_q;
  logic          pix_en;
  logic [10:0]   hc, vc;
  logic          in_field, lit;
  logic [10:0]   fx, fy;
  logic [4:0]    row;
  logic [3:0]    col;

  // Pixel clock enable: one cycle in PIX_DIV.
  always_ff @(posedge clk) begin
    if (rst) div_q <= '0;
    else     div_q <= (div_q == DW'(PIX_DIV - 1)) ? '0 : div_q + 1'b1;
  end
  assign pix_en = (div_q == DW'(PIX_DIV - 1));

  // Scan counters.
  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= '0;
      vc <= '0;
    end else if (pix_en) begin
      if (hc == 11'(H_TOT - 1)) begin
        hc <= '0;
        vc <= (vc == 11'(V_TOT - 1)) ? '0 : vc + 11'd1;
      end else begin
        hc <= hc + 11'd1;
      end
    end
  end

  // Which playfield cell the current pixel falls in.
  always_comb begin
    fx       = hc - 11'(X0);
    fy       = vc - 11'(Y0);
    in_field = (hc >= 11'(X0)) && (hc < 11'(X0 + COLS * CELL_PX)) &&
               (vc >= 11'(Y0)) && (vc < 11'(Y0 + ROWS * CELL_PX));
    row      = 5'(fy / 11'(CELL_PX));
    col      = 4'(fx / 11'(CELL_PX));
    lit      = in_field && number[32'(row) * COLS + 32'(col)];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hsync_r  <= 1'b1;
      vsync_r  <= 1'b1;
      OutRad   <= '0;
      OutGreen <= '0;
      OutBlue  <= '0;
    end else if (pix_en) begin
      hsync_r  <= !((hc >= 11'(H_VIS + H_FP)) && (hc < 11'(H_VIS + H_FP + H_SYNC)));
      vsync_r  <= !((vc >= 11'(V_VIS + V_FP)) && (vc < 11'(V_VIS + V_FP + V_SYNC)));
      OutRad   <= lit ? 4'hF : 4'h0;
      OutGreen <= lit ? 4'hF : 4'h0;
      OutBlue  <= lit ? 4'hF : 4'h0;
    end
  end

  assign frame_start = pix_en && (hc == 11'(H_TOT - 1)) && (vc == 11'(V_VIS - 1));

endmodule

// tb_vga_ctrl: runs the full 640x480 timing from a 100 MHz clock for two
// frames. Checks the line period (3200 clocks = 800 pixels at 25 MHz), sync
// widths (96 pixels, 2 lines), frame period (525 lines), one frame_start
// per frame, and that the colour of sampled pixels matches the cell bit
// of number (white or black) at the pixel position worked out from the
// sync edges.
// Every parameter is left at its default, so about 3.4 million clock
// cycles are simulated. The 800 x 525 timing is standard VGA, not taken
// from elsewhere in the design.
module tb_vga_ctrl;
  logic clk = 0, rst = 1;
  logic [199:0] number;
  logic [3:0] b, g, r;
  logic hs, vs, fs;
  int checks = 0, failures = 0;

  vga_ctrl dut (.clk, .rst, .number, .OutBlue(b), .OutGreen(g), .OutRad(r),
                .hsync_r(hs), .vsync_r(vs), .frame_start(fs));

  always #5 clk = ~clk;

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  longint cyc = 0;
  longint hs_fall [$], vs_fall [$], fs_at [$];
  longint hs_low_start, vs_low_start;
  int hs_w [$], vs_w [$];
  logic hs_q = 1, vs_q = 1;
  int pix_bad = 0, pix_lit = 0, pix_dark = 0;

  always @(posedge clk) begin
    cyc++;
    if (hs_q && !hs) begin hs_fall.push_back(cyc); hs_low_start = cyc; end
    if (!hs_q && hs) hs_w.push_back(int'(cyc - hs_low_start));
    if (vs_q && !vs) begin vs_fall.push_back(cyc); vs_low_start = cyc; end
    if (!vs_q && vs) vs_w.push_back(int'(cyc - vs_low_start));
    if (fs) fs_at.push_back(cyc);
    hs_q <= hs;
    vs_q <= vs;
    // Pixel position from the sync edges: hsync falls 656 pixels after the
    // start of a line, vsync falls 490 lines after the start of a frame.
    if (vs_fall.size() > 0 && hs_fall.size() > 1) begin
      longint line_start, frame_start_c;
      int x, y;
      line_start = hs_fall[$] - 656 * 4;
      frame_start_c = vs_fall[$] + (525 - 490) * 3200;
      x = int'(((cyc - line_start) % 3200) / 4);
      y = int'((cyc - frame_start_c) / 3200);
      if (cyc > frame_start_c && x < 640 && y < 480 && ((cyc - line_start) % 4) == 2) begin
        bit exp;
        exp = (x >= 200 && x < 440) ? number[(y / 24) * 10 + (x - 200) / 24] : 1'b0;
        if ({r, g, b} !== (exp ? 12'hFFF : 12'h000)) pix_bad++;
        if (exp) pix_lit++; else pix_dark++;
      end
    end
  end

  initial begin
    for (int i = 0; i < 200; i++) number[i] = ($urandom_range(1) == 1);
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (vs_fall.size() == 3);
    repeat (10) @(posedge clk);
    chk(hs_fall.size() > 1000, "too few lines");
    for (int i = 1; i < hs_fall.size(); i++)
      chk(hs_fall[i] - hs_fall[i-1] == 3200, $sformatf("line period %0d", hs_fall[i] - hs_fall[i-1]));
    for (int i = 0; i < hs_w.size(); i++)
      chk(hs_w[i] == 96 * 4, $sformatf("hsync width %0d", hs_w[i]));
    chk(vs_fall[2] - vs_fall[1] == 525 * 3200, "frame period");
    chk(vs_fall[1] - vs_fall[0] == 525 * 3200, "frame period");
    for (int i = 0; i < vs_w.size(); i++)
      chk(vs_w[i] == 2 * 3200, $sformatf("vsync width %0d", vs_w[i]));
    chk(fs_at.size() == 3, $sformatf("frame_start count %0d", fs_at.size()));
    // frame_start comes with the last pixel enable of the last visible
    // line: 10 lines plus one pixel (4 clocks) before vsync, plus one clock
    // of output register
    for (int i = 0; i < fs_at.size(); i++)
      chk(vs_fall[i] - fs_at[i] == 10 * 3200 + 5, $sformatf("frame_start to vsync %0d", vs_fall[i] - fs_at[i]));
    chk(pix_bad == 0 && pix_lit > 10000 && pix_dark > 10000,
        $sformatf("pixels: %0d wrong, %0d lit, %0d dark", pix_bad, pix_lit, pix_dark));
    $display("pixels checked: %0d lit, %0d dark, %0d wrong", pix_lit, pix_dark, pix_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

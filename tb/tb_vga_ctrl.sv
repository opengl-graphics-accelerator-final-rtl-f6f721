// tb_vga_ctrl: runs two full frames at the 640x480@60Hz timing and measures
// the line and frame periods, the sync pulse positions and widths, the
// visible pixel and line counts, the vblank pulse and the pixel doubling of
// the frame-buffer address.
// Timing: 10 ns clock standing in for the 25 MHz pixel clock (only clock
// counts are measured); the frame-buffer stand-in holds a random picture
// from $urandom; a watchdog ends the run after 20 ms. The sync
// positions follow the original timing figure; the 2x2 doubling of a
// 320x240 buffer is this design's choice.
module tb_vga_ctrl;
  logic clk = 0, rst_n = 0;
  logic [8:0] fb_x;
  logic [7:0] fb_y;
  logic [2:0] fb_rgb, rgb;
  logic hsync_n, vsync_n, de, vblank;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vga_ctrl dut (.*);

  // frame buffer stand-in: random picture, read one clock late
  logic [2:0] pic [240][320];
  initial
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 320; x++) pic[y][x] = 3'($urandom);
  always @(posedge clk) fb_rgb <= pic[fb_y][fb_x];

  task automatic expect_eq(int got, int e, string what);
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, e);
    end
  endtask

  int cyc = 0;
  int h_fall [$], h_rise [$], v_fall [$], v_rise [$], vb [$];
  int de_in_line = 0, de_lines = 0, max_de_run = 0, rgb_err = 0;
  logic hs_q = 1, vs_q = 1, de_q = 0;
  int x_pix = 0, line_no = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (hs_q && !hsync_n) h_fall.push_back(cyc);
    if (!hs_q && hsync_n) h_rise.push_back(cyc);
    if (vs_q && !vsync_n) v_fall.push_back(cyc);
    if (!vs_q && vsync_n) v_rise.push_back(cyc);
    if (vblank) vb.push_back(cyc);
    if (de) begin
      // outputs are one clock behind the counters: pixel (x_pix, line_no)
      if (rgb != pic[239 - line_no / 2][x_pix / 2]) rgb_err++;
      de_in_line++;
      x_pix++;
    end
    if (de_q && !de) begin
      if (de_in_line > max_de_run) max_de_run = de_in_line;
      de_lines++;
      de_in_line = 0;
      x_pix = 0;
      line_no = (line_no + 1) % 480;
    end
    hs_q = hsync_n; vs_q = vsync_n; de_q = de;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2 * 800 * 525 + 10) @(posedge clk);
    expect_eq(h_fall[1] - h_fall[0], 800, "line period");
    expect_eq(h_rise[0] - h_fall[0], 755 - 659, "hsync width");
    // counters start at 0 on the first clock; the sync register adds one
    expect_eq(h_fall[0], 659 + 2, "hsync start (clocks after reset)");
    expect_eq(v_fall[1] - v_fall[0], 800 * 525, "frame period");
    expect_eq(v_rise[0] - v_fall[0], 800 * (491 - 489), "vsync width");
    expect_eq(v_fall[0], 800 * 489 + 2, "vsync start");
    expect_eq(vb[1] - vb[0], 800 * 525, "vblank period");
    expect_eq(vb[0], 800 * 480 + 1, "vblank position");
    expect_eq(max_de_run, 640, "visible pixels per line");
    expect_eq(de_lines, 2 * 480, "visible lines in two frames");
    expect_eq(rgb_err, 0, "pixel-doubled colour errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

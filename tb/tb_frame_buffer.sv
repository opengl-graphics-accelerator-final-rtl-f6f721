// tb_frame_buffer: on a 16x8 frame buffer, draws patterns into the hidden
// buffer, requests swaps and checks: the swap waits for vblank, the drawn
// picture then appears on the read port, the buffer leaving the display is
// cleared before fb_ready returns (and a clear takes W*H clocks), and the
// displayed buffer is never disturbed by drawing.
// Timing: 10 ns clock; vblank pulses are driven by the testbench after a
// random wait, and the pictures come from random seeds ($urandom); a
// watchdog ends the run after 2 ms. Double buffering and the swap after the
// end of a frame follow the original design; swapping at vblank and the
// clear at one pixel per clock are this design's choices, checked here.
module tb_frame_buffer;
  localparam int W = 16, H = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, raster_finish = 0, vblank = 0, fb_ready, front;
  logic [3:0] wr_x = 0, rd_x = 0;
  logic [2:0] wr_y = 0, rd_y = 0;
  logic [2:0] wr_rgb = 0, rd_rgb;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  frame_buffer #(.W(W), .H(H)) dut (.*);

  function automatic logic [2:0] pat(int x, int y, int seed);
    return 3'((x * 3 + y * 5 + seed) % 8);
  endfunction

  task automatic draw(int seed);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        wr_en = 1; wr_x = 4'(x); wr_y = 3'(y); wr_rgb = pat(x, y, seed);
      end
    @(negedge clk) wr_en = 0;
  endtask

  task automatic check_screen(int seed, bit zero, string what);
    int bad = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        rd_x = 4'(x); rd_y = 3'(y);
        @(posedge clk); #1;
        if (rd_rgb != (zero ? 3'b000 : pat(x, y, seed))) bad++;
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d wrong pixels", what, bad);
    end
  endtask

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic swap_and_clear(logic exp_front);
    int t0;
    @(negedge clk) raster_finish = 1;
    @(negedge clk) raster_finish = 0;
    expect_true(!fb_ready, "fb_ready low after raster_finish");
    repeat ($urandom_range(2, 40)) @(negedge clk);
    expect_true(front != exp_front, "no swap before vblank");
    vblank = 1;
    @(negedge clk) vblank = 0;
    t0 = cyc;
    expect_true(front == exp_front, "swap at vblank");
    while (!fb_ready) @(negedge clk);
    expect_true(cyc - t0 == W * H, "clear takes W*H clocks");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int s1, s2;
  initial begin
    s1 = $urandom_range(1, 1000);
    s2 = s1 + $urandom_range(1, 7);   // a different picture
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!fb_ready) @(negedge clk);
    check_screen(0, 1, "display cleared after reset");
    // vblank with no pending swap changes nothing
    @(negedge clk) vblank = 1;
    @(negedge clk) vblank = 0;
    expect_true(front == 1'b0, "no swap without request");
    draw(s1);
    check_screen(0, 1, "display untouched while drawing");
    swap_and_clear(1'b1);
    check_screen(s1, 0, "first frame displayed");
    draw(s2);
    check_screen(s1, 0, "first frame still displayed while drawing second");
    swap_and_clear(1'b0);
    check_screen(s2, 0, "second frame displayed");
    swap_and_clear(1'b1);   // nothing drawn: old buffer must have been cleared
    check_screen(0, 1, "cleared buffer displayed (no trails)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rasterizer: rasterizes fixed and random triangles (both windings,
// partly off screen, degenerate) and compares the drawn pixels and their
// 3-bit colours with a floating-point evaluation of the same bounding-box /
// edge-function / barycentric algorithm. Pixels whose barycentric
// coordinates or interpolated colours lie within rounding distance of a
// decision boundary are not counted. Also checks the one-pixel-per-clock
// scan (busy time = 2 set-up + box area + 9 drain clocks), that no triangle
// is taken while fb_ready is low, and the end-of-frame handshake.
// Timing: 10 ns clock; triangles are offered on the valid/ready port,
// fb_ready is dropped once to hold one back; random triangles come from
// $urandom; a watchdog ends the run after 50 ms. The algorithm follows the
// original design; the colour threshold, integer sample points and the
// latency are this design's choices.
module tb_rasterizer;
  import gpu_pkg::*;
  localparam int SW = 320, SH = 240;
  logic clk = 0, rst_n = 0;
  logic tri_valid = 0, tri_ready, end_valid = 0, end_ready, fb_ready = 1;
  fx_t [2:0][2:0] tri_pos = '0, tri_col = '0;
  logic px_we, raster_finish, busy;
  logic [8:0] px_x;
  logic [7:0] px_y;
  logic [2:0] px_rgb;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  rasterizer dut (.*);

  function automatic fx_t fx(real r);
    return fx_t'($rtoi(r * 2048.0));
  endfunction
  function automatic real rl(fx_t v);
    return real'(v) / 2048.0;
  endfunction

  logic [2:0] drawn [int];
  int busy_clocks = 0;
  always @(posedge clk) if (busy) busy_clocks++;
  always @(posedge clk) if (px_we) drawn[int'(px_y) * SW + int'(px_x)] = px_rgb;

  function automatic real f(real xa, real ya, real xb, real yb, real x, real y);
    return (ya - yb) * x + (xb - xa) * y + xa * yb - xb * ya;
  endfunction

  task automatic run_tri(real x [3], real y [3], real c [3][3]);
    real d0, d1, d2, xs [3], ys [3];
    int xmin, xmax, ymin, ymax, area, t0, bad, nexp, boundary;
    for (int v = 0; v < 3; v++) begin
      tri_pos[v] = {fx(0.0), fx(y[v]), fx(x[v])};
      tri_col[v] = {fx(c[v][2]), fx(c[v][1]), fx(c[v][0])};
      xs[v] = rl(fx(x[v])); ys[v] = rl(fx(y[v]));
    end
    drawn.delete();
    busy_clocks = 0;
    @(negedge clk);
    tri_valid = 1;
    @(posedge clk);
    while (!tri_ready) @(posedge clk);
    t0 = cyc;
    @(negedge clk) tri_valid = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    // reference
    xmin = $rtoi($floor(xs[0] < xs[1] ? (xs[0] < xs[2] ? xs[0] : xs[2]) : (xs[1] < xs[2] ? xs[1] : xs[2])));
    xmax = $rtoi($ceil (xs[0] > xs[1] ? (xs[0] > xs[2] ? xs[0] : xs[2]) : (xs[1] > xs[2] ? xs[1] : xs[2])));
    ymin = $rtoi($floor(ys[0] < ys[1] ? (ys[0] < ys[2] ? ys[0] : ys[2]) : (ys[1] < ys[2] ? ys[1] : ys[2])));
    ymax = $rtoi($ceil (ys[0] > ys[1] ? (ys[0] > ys[2] ? ys[0] : ys[2]) : (ys[1] > ys[2] ? ys[1] : ys[2])));
    d0 = f(xs[1], ys[1], xs[2], ys[2], xs[0], ys[0]);
    d1 = f(xs[2], ys[2], xs[0], ys[0], xs[1], ys[1]);
    d2 = f(xs[0], ys[0], xs[1], ys[1], xs[2], ys[2]);
    bad = 0; nexp = 0; boundary = 0;
    if (xmin < 0) xmin = 0;
    if (ymin < 0) ymin = 0;
    if (xmax > SW - 1) xmax = SW - 1;
    if (ymax > SH - 1) ymax = SH - 1;
    for (int py = ymin; py <= ymax; py++)
      for (int px = xmin; px <= xmax; px++) begin
        real a, b, g, m, col [3];
        bit in_tri, near, got;
        logic [2:0] e;
        if (d0 == 0.0) continue;
        a = f(xs[1], ys[1], xs[2], ys[2], px, py) / d0;
        b = f(xs[2], ys[2], xs[0], ys[0], px, py) / d1;
        g = f(xs[0], ys[0], xs[1], ys[1], px, py) / d2;
        in_tri = (a > 0.0) && (b > 0.0) && (g > 0.0);
        m = (a < b) ? a : b;
        m = (m < g) ? m : g;
        near = (m < 0.002) && (m > -0.002);
        for (int ch = 0; ch < 3; ch++) begin
          col[ch] = a * c[0][ch] + b * c[1][ch] + g * c[2][ch];
          e[ch] = col[ch] > (368.0 / 2048.0);
          if (col[ch] - 368.0 / 2048.0 < 0.003 && col[ch] - 368.0 / 2048.0 > -0.003) near = 1;
        end
        got = drawn.exists(py * SW + px);
        if (in_tri) nexp++;
        if (near) begin boundary++; continue; end
        if (got != in_tri || (in_tri && drawn[py * SW + px] != e)) bad++;
      end
    // drawn pixels outside the box would be errors too
    foreach (drawn[k]) if (k % SW < xmin || k % SW > xmax || k / SW < ymin || k / SW > ymax) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL triangle: %0d wrong pixels (%0d expected, %0d drawn)", bad, nexp, drawn.size());
    end
    area = (xmax - xmin + 1) * (ymax - ymin + 1);
    checks++;
    if (d0 != 0.0 && busy_clocks != 2 + area + 9) begin
      failures++;
      $display("FAIL busy %0d clocks for box area %0d", busy_clocks, area);
    end
    $display("triangle: %0d pixels expected, %0d drawn, %0d near an edge, %0d clocks",
             nexp, drawn.size(), boundary, busy_clocks);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x [3], y [3], c [3][3];
    repeat (2) @(posedge clk);
    rst_n = 1;
    c = '{'{1.0, 0.0, 0.0}, '{0.0, 1.0, 0.0}, '{0.0, 0.0, 1.0}};
    x = '{10.5, 100.0, 50.0};  y = '{20.25, 30.0, 120.7};  run_tri(x, y, c);
    x = '{50.0, 100.0, 10.5};  y = '{120.7, 30.0, 20.25};  run_tri(x, y, c);
    x = '{-20.0, 50.0, 330.0}; y = '{-10.0, 10.0, 260.0};  run_tri(x, y, c);
    c = '{'{1.0, 1.0, 1.0}, '{1.0, 1.0, 1.0}, '{1.0, 1.0, 1.0}};
    x = '{100.0, 140.0, 120.0}; y = '{100.0, 100.0, 140.0}; run_tri(x, y, c);
    // two small triangles, 10 to 14 pixels across, like the simulated
    // example of the original design
    x = '{6.0, 13.0, 13.0};  y = '{10.0, 10.0, 1.0};   run_tri(x, y, c);
    x = '{2.0, 9.0, 15.0};   y = '{1.0, 14.0, 7.0};    run_tri(x, y, c);
    for (int i = 0; i < 6; i++) begin
      for (int v = 0; v < 3; v++) begin
        x[v] = real'($urandom_range(0, 3190)) / 10.0;
        y[v] = real'($urandom_range(0, 2390)) / 10.0;
        for (int ch = 0; ch < 3; ch++) c[v][ch] = real'($urandom_range(0, 100)) / 100.0;
      end
      run_tri(x, y, c);
    end
    // degenerate: collinear vertices draw nothing
    x = '{10.0, 20.0, 30.0}; y = '{10.0, 20.0, 30.0}; run_tri(x, y, c);
    checks++;
    if (drawn.size() != 0) begin failures++; $display("FAIL degenerate drew pixels"); end
    // fb_ready low holds a triangle back
    @(negedge clk);
    fb_ready = 0; tri_valid = 1;
    repeat (20) begin
      @(posedge clk);
      checks++;
      if (tri_ready) begin failures++; $display("FAIL triangle taken while fb_ready low"); end
    end
    @(negedge clk) tri_valid = 0; fb_ready = 1;
    // end of frame
    @(negedge clk) end_valid = 1;
    #1;
    checks++;
    if (!raster_finish || !end_ready) begin failures++; $display("FAIL end handshake"); end
    @(negedge clk) end_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

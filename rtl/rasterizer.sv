// rasterizer: triangle scan conversion with barycentric colour
// interpolation.
//
// For a triangle with window-space vertices (x0,y0), (x1,y1), (x2,y2) the
// three edge functions
//   f12(x,y) = (y1-y2)x + (x2-x1)y + x1*y2 - x2*y1   (and f20, f01 likewise)
// are set up once. The bounding box is floor(min) .. ceil(max) of the vertex
// coordinates, clipped to the screen. Every pixel (x, y) of the box, row by
// row, is then evaluated:
//   alpha = f12(x,y)/f12(x0,y0), beta = f20(x,y)/f20(x1,y1),
//   gamma = f01(x,y)/f01(x2,y2)
// and the pixel is drawn when all three are above zero. Each colour
// channel is interpolated, c = alpha*c0 + beta*c1 + gamma*c2, and its bit is
// set when c exceeds COLOR_THRESHOLD (the frame buffer holds one bit per
// channel).
//
// Timing: two set-up clocks per triangle, then one pixel enters the
// datapath per clock. The three divisions use the 8-stage fixed-point
// dividers, so a pixel's write (px_we/px_x/px_y/px_rgb) appears 9 clocks after
// it was issued; the scan of an N-pixel box takes N clocks plus 9 to drain.
//
// Interface: a triangle is taken (tri_ready) only while fb_ready is high,
// i.e. not while the frame buffer is waiting to swap or is being cleared.
// The end-of-frame marker (end_valid) is answered with end_ready and a
// one-clock raster_finish pulse that asks the frame buffer to swap; the
// rasterizer then waits one clock so that fb_ready has fallen.
// Choices of this design: pixels are sampled at integer coordinates, as the
// algorithm is written; a triangle whose area is zero or whose box lies off
// screen draws nothing.
module rasterizer
  import gpu_pkg::*;
#(
  parameter int SCREEN_W = 320,
  parameter int SCREEN_H = 240,
  localparam int XW = $clog2(SCREEN_W),
  localparam int YW = $clog2(SCREEN_H)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tri_valid,
  output logic           tri_ready,
  input  fx_t [2:0][2:0] tri_pos,
  input  fx_t [2:0][2:0] tri_col,
  input  logic           end_valid,
  output logic           end_ready,
  input  logic           fb_ready,
  output logic           px_we,
  output logic [XW-1:0]  px_x,
  output logic [YW-1:0]  px_y,
  output logic [2:0]     px_rgb,
  output logic           raster_finish,
  output logic           busy
);
  localparam int LAT = 8;   // divider latency

  typedef enum logic [2:0] { R_IDLE, R_SETUP1, R_SETUP2, R_SCAN, R_DRAIN, R_FINISH } rstate_e;
  rstate_e state;

  fx_t [2:0]      vx, vy;
  fx_t [2:0][2:0] col;
  fx_t [2:0]      ea, eb, ec, den;
  int             xmin, xmax, ymin, ymax;
  logic [XW-1:0]  cx;
  logic [YW-1:0]  cy;
  logic [3:0]     drain;

  function automatic int fx_floor(fx_t v);
    return int'(v >>> FX_FRAC);
  endfunction
  function automatic int fx_ceil(fx_t v);
    return int'((v + fx_t'((1 << FX_FRAC) - 1)) >>> FX_FRAC);
  endfunction
  function automatic fx_t min3(fx_t a, fx_t b, fx_t c);
    fx_t m;
    m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction
  function automatic fx_t max3(fx_t a, fx_t b, fx_t c);
    fx_t m;
    m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction
  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  assign tri_ready     = (state == R_IDLE) && fb_ready;
  assign end_ready     = (state == R_IDLE) && fb_ready && !tri_valid;
  assign raster_finish = end_valid && end_ready;
  assign busy          = (state != R_IDLE);

  // ----------------------------------------------------- edge evaluation
  fx_t px_fx, py_fx;
  assign px_fx = fx_t'({{(32-XW-FX_FRAC){1'b0}}, cx, {FX_FRAC{1'b0}}});
  assign py_fx = fx_t'({{(32-YW-FX_FRAC){1'b0}}, cy, {FX_FRAC{1'b0}}});

  fx_t [2:0] fa, fb, fab, fval;
  for (genvar e = 0; e < 3; e++) begin : g_edge
    fxp_mul u_ma (.a(ea[e]), .b(px_fx), .y(fa[e]));
    fxp_mul u_mb (.a(eb[e]), .b(py_fx), .y(fb[e]));
    fxp_add u_a0 (.a(fa[e]), .b(fb[e]), .y(fab[e]));
    fxp_add u_a1 (.a(fab[e]), .b(ec[e]), .y(fval[e]));
  end

  logic      issue;
  logic [2:0] dv;
  fx_t [2:0] bary;
  assign issue = (state == R_SCAN);
  for (genvar e = 0; e < 3; e++) begin : g_div
    fxp_div u_div (.clk(clk), .rst_n(rst_n), .in_valid(issue),
                   .a(fval[e]), .b(den[e]), .out_valid(dv[e]), .q(bary[e]));
  end

  // pixel coordinates travel alongside the dividers
  logic [XW-1:0] tag_x [LAT];
  logic [YW-1:0] tag_y [LAT];
  always_ff @(posedge clk) begin
    tag_x[0] <= cx;
    tag_y[0] <= cy;
    for (int i = 1; i < LAT; i++) begin
      tag_x[i] <= tag_x[i-1];
      tag_y[i] <= tag_y[i-1];
    end
  end

  // ---------------------------------------------- colour interpolation
  fx_t [2:0][2:0] cp;     // [channel][vertex] products
  fx_t [2:0]      cs0, csum;
  logic [2:0]     bits;
  for (genvar ch = 0; ch < 3; ch++) begin : g_col
    for (genvar v = 0; v < 3; v++) begin : g_v
      fxp_mul u_cm (.a(bary[v]), .b(col[v][ch]), .y(cp[ch][v]));
    end
    fxp_add u_c0 (.a(cp[ch][0]), .b(cp[ch][1]), .y(cs0[ch]));
    fxp_add u_c1 (.a(cs0[ch]),   .b(cp[ch][2]), .y(csum[ch]));
    assign bits[ch] = (csum[ch] > COLOR_THRESHOLD);
  end

  wire in_tri = (bary[0] > 0) && (bary[1] > 0) && (bary[2] > 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px_we  <= 1'b0;
      px_x   <= '0;
      px_y   <= '0;
      px_rgb <= '0;
    end else begin
      px_we  <= dv[0] && in_tri;
      px_x   <= tag_x[LAT-1];
      px_y   <= tag_y[LAT-1];
      px_rgb <= bits;
    end
  end

  // ------------------------------------------------------ control / scan
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      vx <= '0; vy <= '0; col <= '0;
      ea <= '0; eb <= '0; ec <= '0; den <= '0;
      xmin <= 0; xmax <= 0; ymin <= 0; ymax <= 0;
      cx <= '0; cy <= '0;
      drain <= '0;
    end else begin
      unique case (state)
        R_IDLE: if (raster_finish) begin
          state <= R_FINISH;
        end else if (tri_valid && tri_ready) begin
          for (int v = 0; v < 3; v++) begin
            vx[v] <= tri_pos[v][0];
            vy[v] <= tri_pos[v][1];
          end
          col   <= tri_col;
          state <= R_SETUP1;
        end

        R_SETUP1: begin
          // edge i is opposite vertex i: f12, f20, f01
          for (int i = 0; i < 3; i++) begin
            int j, k;
            j = (i + 1) % 3;
            k = (i + 2) % 3;
            ea[i] <= vy[j] - vy[k];
            eb[i] <= vx[k] - vx[j];
            ec[i] <= fx_mul(vx[j], vy[k]) - fx_mul(vx[k], vy[j]);
          end
          xmin <= clampi(fx_floor(min3(vx[0], vx[1], vx[2])), 0, SCREEN_W - 1);
          xmax <= clampi(fx_ceil (max3(vx[0], vx[1], vx[2])), 0, SCREEN_W - 1);
          ymin <= clampi(fx_floor(min3(vy[0], vy[1], vy[2])), 0, SCREEN_H - 1);
          ymax <= clampi(fx_ceil (max3(vy[0], vy[1], vy[2])), 0, SCREEN_H - 1);
          state <= R_SETUP2;
        end

        R_SETUP2: begin
          for (int i = 0; i < 3; i++)
            den[i] <= fx_mul(ea[i], vx[i]) + fx_mul(eb[i], vy[i]) + ec[i];
          cx <= XW'(xmin);
          cy <= YW'(ymin);
          if (fx_ceil(max3(vx[0], vx[1], vx[2])) < 0 ||
              fx_floor(min3(vx[0], vx[1], vx[2])) > SCREEN_W - 1 ||
              fx_ceil(max3(vy[0], vy[1], vy[2])) < 0 ||
              fx_floor(min3(vy[0], vy[1], vy[2])) > SCREEN_H - 1 ||
              (fx_mul(ea[0], vx[0]) + fx_mul(eb[0], vy[0]) + ec[0]) == 0)
            state <= R_IDLE;
          else
            state <= R_SCAN;
        end

        R_SCAN: begin
          if (int'(cx) == xmax) begin
            cx <= XW'(xmin);
            if (int'(cy) == ymax) begin
              drain <= '0;
              state <= R_DRAIN;
            end else begin
              cy <= cy + 1'b1;
            end
          end else begin
            cx <= cx + 1'b1;
          end
        end

        R_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 4'(LAT)) state <= R_IDLE;
        end

        // one clock for the frame buffer to register the swap request
        R_FINISH: state <= R_IDLE;

        default: state <= R_IDLE;
      endcase
    end
  end
endmodule

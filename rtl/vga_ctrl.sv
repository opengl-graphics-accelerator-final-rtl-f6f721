// vga_ctrl: 640 x 480 @ 60 Hz VGA timing with each frame-buffer pixel shown
// twice in each direction.
//
// One clock is one pixel (25 MHz). A line is 800 clocks: 640 visible, the
// horizontal sync pulse (active low) from clock 659 to 755 of the line, and
// blanking to 800. A frame is 525 lines: 480 visible, vertical sync (active
// low) from line 489 to 491, blanking to 525. Instead of separate timing
// for the 320 x 240 frame buffer, the controller reads frame-buffer pixel
// (h/2, v/2) for screen pixel (h, v). Frame-buffer row 0 is shown at the
// bottom of the screen, so that window y grows upwards as in OpenGL (this
// orientation is this design's choice).
//
// Timing: fb_x/fb_y are issued in the clock the counters reach the pixel;
// the frame buffer answers one clock later, so hsync, vsync, de and rgb are
// all delayed by one clock to stay aligned. vblank pulses for one clock at
// the start of the first blanking line, the moment the frame buffer may swap.
// The sync pulse edges follow the VGA timing table; whether the end count is
// inclusive is this design's choice.
module vga_ctrl #(
  parameter int H_ACTIVE     = 640,
  parameter int H_SYNC_START = 659,
  parameter int H_SYNC_END   = 755,
  parameter int H_TOTAL      = 800,
  parameter int V_ACTIVE     = 480,
  parameter int V_SYNC_START = 489,
  parameter int V_SYNC_END   = 491,
  parameter int V_TOTAL      = 525,
  parameter int FB_W         = 320,
  parameter int FB_H         = 240,
  localparam int XW = $clog2(FB_W),
  localparam int YW = $clog2(FB_H),
  localparam int HW = $clog2(H_TOTAL),
  localparam int VW = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [XW-1:0] fb_x,
  output logic [YW-1:0] fb_y,
  input  logic [2:0]    fb_rgb,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          de,
  output logic [2:0]    rgb,
  output logic          vblank
);
  logic [HW-1:0] h;
  logic [VW-1:0] v;
  logic          act;

  assign act    = (int'(h) < H_ACTIVE) && (int'(v) < V_ACTIVE);
  assign fb_x   = act ? XW'(h >> 1) : '0;
  assign fb_y   = act ? YW'(FB_H - 1 - (int'(v) >> 1)) : '0;
  assign vblank = (h == '0) && (int'(v) == V_ACTIVE);
  assign rgb    = de ? fb_rgb : 3'b000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h       <= '0;
      v       <= '0;
      hsync_n <= 1'b1;
      vsync_n <= 1'b1;
      de      <= 1'b0;
    end else begin
      if (int'(h) == H_TOTAL - 1) begin
        h <= '0;
        v <= (int'(v) == V_TOTAL - 1) ? '0 : v + 1'b1;
      end else begin
        h <= h + 1'b1;
      end
      hsync_n <= !(int'(h) >= H_SYNC_START && int'(h) < H_SYNC_END);
      vsync_n <= !(int'(v) >= V_SYNC_START && int'(v) < V_SYNC_END);
      de      <= act;
    end
  end
endmodule

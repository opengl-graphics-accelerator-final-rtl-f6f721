// frame_buffer: double-buffered 320 x 240 frame store, 3 bits per pixel
// (one bit each for red, green and blue), held in block RAM.
//
// One buffer is displayed (read by the VGA controller) while the other is
// drawn into by the rasterizer. When the rasterizer reports the end of a
// frame (raster_finish) a swap is requested; it takes place at the next
// start of vertical blanking (vblank), so the displayed picture never
// changes mid-frame. The buffer that has just left the display is then
// cleared, one pixel per clock (W*H clocks), so that the next frame does not
// show trails of the previous one. fb_ready is low from the clock after raster_finish
// until that clear has completed; the rasterizer must not start a triangle while it
// is low. After reset both buffers are cleared.
//
// Ports: write port wr_en/wr_x/wr_y/wr_rgb (drawn buffer, row-major address
// y*W + x); read port rd_x/rd_y with rd_rgb one clock later (displayed
// buffer); front tells which buffer is displayed.
// Swapping at vertical blanking is this design's choice; the clear rate
// follows from the one write port per buffer.
module frame_buffer #(
  parameter int W  = 320,
  parameter int H  = 240,
  localparam int XW = $clog2(W),
  localparam int YW = $clog2(H),
  localparam int AW = $clog2(W * H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [XW-1:0] wr_x,
  input  logic [YW-1:0] wr_y,
  input  logic [2:0]    wr_rgb,
  input  logic          raster_finish,
  input  logic          vblank,
  output logic          fb_ready,
  output logic          front,
  input  logic [XW-1:0] rd_x,
  input  logic [YW-1:0] rd_y,
  output logic [2:0]    rd_rgb
);
  logic [2:0] mem0 [W*H];
  logic [2:0] mem1 [W*H];

  logic          swap_pending;
  logic          clearing;
  logic          clear_both;
  logic [AW-1:0] clr_addr;
  logic [AW-1:0] waddr, raddr;
  logic [2:0]    q0, q1;
  logic          front_q;

  assign waddr    = clearing ? clr_addr : AW'(wr_y) * AW'(W) + AW'(wr_x);
  assign raddr    = AW'(rd_y) * AW'(W) + AW'(rd_x);
  assign fb_ready = !swap_pending && !clearing;

  wire we_draw = wr_en && !clearing;
  wire we0 = clearing ? (clear_both || front)  : (we_draw && front);
  wire we1 = clearing ? (clear_both || !front) : (we_draw && !front);
  wire [2:0] wdata = clearing ? 3'b000 : wr_rgb;

  always_ff @(posedge clk) begin
    if (we0) mem0[waddr] <= wdata;
    if (we1) mem1[waddr] <= wdata;
    q0 <= mem0[raddr];
    q1 <= mem1[raddr];
  end

  assign rd_rgb = front_q ? q1 : q0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      front        <= 1'b0;
      front_q      <= 1'b0;
      swap_pending <= 1'b0;
      clearing     <= 1'b1;
      clear_both   <= 1'b1;
      clr_addr     <= '0;
    end else begin
      front_q <= front;
      if (raster_finish) swap_pending <= 1'b1;
      if (clearing) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == AW'(W * H - 1)) begin
          clearing   <= 1'b0;
          clear_both <= 1'b0;
        end
      end else if (swap_pending && vblank) begin
        front        <= !front;
        swap_pending <= 1'b0;
        clearing     <= 1'b1;
        clr_addr     <= '0;
      end
    end
  end
endmodule

// gpu_top: a small fixed-function OpenGL pipeline, from instruction memory
// to VGA output.
//
//   host server --> fetch_decode --> transform_unit --> vertex_buffer
//        (instruction memory,        (matrix stacks,      (3 vertices)
//         fetch, decode)              transform)               |
//                                                              v
//   VGA <-- vga_ctrl <-- frame_buffer (double) <------------ rasterizer
//
// The host writes 16-bit instructions and their 32-bit fixed-point
// arguments into the instruction memory through srv_wen/srv_waddr/srv_din,
// starting at address 0 and respecting instr_halt. The pipeline transforms
// each glVertex by the model-view and projection matrices, divides by w,
// maps it to the viewport, groups vertices into triangles, rasterizes them
// with barycentric colour interpolation into the hidden half of a
// double-buffered 320x240x3-bit frame buffer, and shows the other half on a
// 640x480 VGA signal with every pixel doubled. glEnd marks the end of a
// frame: the buffers swap at the next vertical blanking and the new drawing
// buffer is cleared before rasterization resumes.
//
// Back-pressure runs all the way up: the frame buffer's clear holds the
// rasterizer, a busy rasterizer holds the vertex buffer, which holds the
// transform unit, whose matrix updates hold fetch and decode.
// Everything runs on one 25 MHz clock (the VGA pixel clock).
// The host may send data words as single-precision floats: with srv_float
// high, the word on srv_din goes through the float-to-fixed converter before
// it is stored (instructions and fixed-point words are sent with srv_float
// low). The original design lists the converter in its fixed-point library;
// placing it on the write path is this design's choice.
// decode_stalled and raster_busy are status outputs for observation.
// Assertions at the end check the valid/ready rules between the stages
// (this design's handshake, which the original does not specify). Lint
// notes rst_n as used both asynchronously and synchronously: the second use
// is only the assertions' disable condition, not logic.
module gpu_top
  import gpu_pkg::*;
#(
  parameter int IMEM_DEPTH = 4096,
  parameter int FB_W       = 320,
  parameter int FB_H       = 240,
  localparam int IAW = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           srv_wen,
  input  logic [IAW-1:0] srv_waddr,
  input  logic [31:0]    srv_din,
  input  logic           srv_float,
  output logic           instr_halt,
  output logic           vga_hsync_n,
  output logic           vga_vsync_n,
  output logic           vga_de,
  output logic [2:0]     vga_rgb,
  output logic           front_buffer,
  output logic           decode_stalled,
  output logic           raster_busy
);
  localparam int XW = $clog2(FB_W);
  localparam int YW = $clog2(FB_H);

  gpu_cmd_t cmd;
  logic     cmd_valid, cmd_ready, tu_idle;
  fx_t      vp_x, vp_y, vp_w, vp_h;

  // Host words marked srv_float are single-precision data values; they are
  // converted to Q20.11 on their way into the instruction memory.
  fx_t         srv_fixed;
  logic [31:0] srv_word;
  fxp_from_float u_cvt (.f(srv_din), .y(srv_fixed));
  assign srv_word = srv_float ? 32'(srv_fixed) : srv_din;

  fetch_decode #(.IMEM_DEPTH(IMEM_DEPTH)) u_fd (
    .clk(clk), .rst_n(rst_n),
    .srv_wen(srv_wen), .srv_waddr(srv_waddr), .srv_din(srv_word),
    .instr_halt(instr_halt),
    .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd(cmd), .tu_idle(tu_idle),
    .vp_x(vp_x), .vp_y(vp_y), .vp_w(vp_w), .vp_h(vp_h),
    .stalled(decode_stalled));

  vtx_t vtx;
  logic vtx_valid, vtx_ready;

  transform_unit u_tu (
    .clk(clk), .rst_n(rst_n),
    .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd(cmd), .idle(tu_idle),
    .vp_x(vp_x), .vp_y(vp_y), .vp_w(vp_w), .vp_h(vp_h),
    .out_valid(vtx_valid), .out_ready(vtx_ready), .out(vtx));

  logic           tri_valid, tri_ready, end_valid, end_ready;
  fx_t [2:0][2:0] tri_pos, tri_col;

  vertex_buffer u_vb (
    .clk(clk), .rst_n(rst_n),
    .in_valid(vtx_valid), .in_ready(vtx_ready), .in(vtx),
    .tri_valid(tri_valid), .tri_ready(tri_ready),
    .tri_pos(tri_pos), .tri_col(tri_col),
    .end_valid(end_valid), .end_ready(end_ready));

  logic          px_we, raster_finish, fb_ready;
  logic [XW-1:0] px_x, rd_x;
  logic [YW-1:0] px_y, rd_y;
  logic [2:0]    px_rgb, rd_rgb;
  logic          vblank;

  rasterizer #(.SCREEN_W(FB_W), .SCREEN_H(FB_H)) u_rast (
    .clk(clk), .rst_n(rst_n),
    .tri_valid(tri_valid), .tri_ready(tri_ready),
    .tri_pos(tri_pos), .tri_col(tri_col),
    .end_valid(end_valid), .end_ready(end_ready),
    .fb_ready(fb_ready),
    .px_we(px_we), .px_x(px_x), .px_y(px_y), .px_rgb(px_rgb),
    .raster_finish(raster_finish), .busy(raster_busy));

  frame_buffer #(.W(FB_W), .H(FB_H)) u_fb (
    .clk(clk), .rst_n(rst_n),
    .wr_en(px_we), .wr_x(px_x), .wr_y(px_y), .wr_rgb(px_rgb),
    .raster_finish(raster_finish), .vblank(vblank),
    .fb_ready(fb_ready), .front(front_buffer),
    .rd_x(rd_x), .rd_y(rd_y), .rd_rgb(rd_rgb));

  vga_ctrl #(.FB_W(FB_W), .FB_H(FB_H)) u_vga (
    .clk(clk), .rst_n(rst_n),
    .fb_x(rd_x), .fb_y(rd_y), .fb_rgb(rd_rgb),
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n), .de(vga_de), .rgb(vga_rgb),
    .vblank(vblank));

  // Handshake rules between the stages: a producer that has raised valid
  // keeps it, and its data, until the consumer has taken them.
  a_cmd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd))
    else $error("command dropped before it was taken");
  a_vtx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    vtx_valid && !vtx_ready |=> vtx_valid && $stable(vtx))
    else $error("vertex dropped before it was taken");
  a_tri_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tri_valid && !tri_ready |=> tri_valid && $stable(tri_pos) && $stable(tri_col))
    else $error("triangle dropped before it was taken");
  // A clear in progress holds the rasterizer's writes back.
  a_no_write_in_clear: assert property (@(posedge clk) disable iff (!rst_n)
    !fb_ready |-> !(tri_valid && tri_ready))
    else $error("triangle taken while the frame buffer is not ready");

endmodule

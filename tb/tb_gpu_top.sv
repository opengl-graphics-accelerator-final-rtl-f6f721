// tb_gpu_top: end-to-end test of the whole pipeline at its full size
// (4096-word instruction memory, 320x240 double-buffered frame, 640x480 VGA).
//
// A host model writes an OpenGL command stream into the instruction memory,
// obeying the halt signal. Frame 1 sets the viewport and both matrices
// (identity, push, translate, rotate, scale, multiply, a projection with a
// z-dependent w so that the perspective division matters), draws two
// coloured triangles and ends with glEnd. Filler words then fill the memory so
// that it halts the host and wraps; frame 2, in the refilled memory, pops the
// matrix and draws one moved triangle whose colour and vertex words are sent
// as single-precision floats and converted to fixed point on the way in.
// After each buffer swap the whole visible VGA frame is captured and compared, pixel by pixel, with a
// floating-point model of the transform and rasterization (pixels within
// rounding distance of an edge or of the colour threshold are not counted);
// every 2x2 block of screen pixels must repeat one frame-buffer pixel, and
// frame 2 must show no trace of frame 1. Each mechanism of the design is
// counted and must have happened at least once.
// Timing: 40 ns clock (25 MHz). The run takes a few simulated frames and
// ends with a watchdog if it stalls. The program uses the original ISA; the
// reference model is written here from the OpenGL definitions. The host
// pauses at random ($urandom) between words, as a network server would.
module tb_gpu_top;
  import gpu_pkg::*;
  localparam int DEPTH = 4096, SW = 320, SH = 240;
  logic clk = 0, rst_n = 0;
  logic srv_wen = 0, srv_float = 0, instr_halt, vga_hsync_n, vga_vsync_n, vga_de, front_buffer;
  logic decode_stalled, raster_busy;
  logic [11:0] srv_waddr = 0;
  logic [31:0] srv_din = 0;
  logic [2:0] vga_rgb;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;   // 25 MHz

  gpu_top dut (.*);

  function automatic fx_t fx(real r);
    return fx_t'($rtoi(r * 2048.0));
  endfunction
  function automatic real rl(fx_t v);
    return real'(v) / 2048.0;
  endfunction
  function automatic logic [15:0] imm(logic [7:0] opc, logic [6:0] f = 0);
    return {1'b0, f, opc};
  endfunction
  function automatic logic [15:0] dat(logic [7:0] opc, int n);
    return {1'b1, 7'(n), opc};
  endfunction

  // ------------------------------------------------------ reference model
  typedef real mat_t [4][4];
  mat_t mv, mv_saved, pj;
  real  col_cur [3];
  logic [2:0] ref_img [2][SH][SW];
  bit         unsure  [2][SH][SW];
  int         frame_no = 0;
  real        tv [3][3];     // window coordinates of the pending triangle
  real        tc [3][3];
  int         nv = 0;

  function automatic mat_t mul(mat_t a, mat_t b);
    mat_t r;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        r[i][j] = 0.0;
        for (int k = 0; k < 4; k++) r[i][j] += a[i][k] * b[k][j];
      end
    return r;
  endfunction
  function automatic mat_t ident();
    mat_t r;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) r[i][j] = (i == j) ? 1.0 : 0.0;
    return r;
  endfunction
  function automatic real ef(real xa, real ya, real xb, real yb, real x, real y);
    return (ya - yb) * x + (xb - xa) * y + xa * yb - xb * ya;
  endfunction
  function automatic real mn3(real a, real b, real c);
    real m;
    m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction
  function automatic real mx3(real a, real b, real c);
    real m;
    m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction

  task automatic ref_raster(int fr);
    real d0, d1, d2;
    int x0, x1, y0, y1;
    d0 = ef(tv[1][0], tv[1][1], tv[2][0], tv[2][1], tv[0][0], tv[0][1]);
    d1 = ef(tv[2][0], tv[2][1], tv[0][0], tv[0][1], tv[1][0], tv[1][1]);
    d2 = ef(tv[0][0], tv[0][1], tv[1][0], tv[1][1], tv[2][0], tv[2][1]);
    x0 = $rtoi($floor(mn3(tv[0][0], tv[1][0], tv[2][0]))) - 1;
    x1 = $rtoi($ceil (mx3(tv[0][0], tv[1][0], tv[2][0]))) + 1;
    y0 = $rtoi($floor(mn3(tv[0][1], tv[1][1], tv[2][1]))) - 1;
    y1 = $rtoi($ceil (mx3(tv[0][1], tv[1][1], tv[2][1]))) + 1;
    for (int y = (y0 < 0 ? 0 : y0); y <= (y1 > SH - 1 ? SH - 1 : y1); y++)
      for (int x = (x0 < 0 ? 0 : x0); x <= (x1 > SW - 1 ? SW - 1 : x1); x++) begin
        real a, b, g, m;
        bit near;
        a = ef(tv[1][0], tv[1][1], tv[2][0], tv[2][1], x, y) / d0;
        b = ef(tv[2][0], tv[2][1], tv[0][0], tv[0][1], x, y) / d1;
        g = ef(tv[0][0], tv[0][1], tv[1][0], tv[1][1], x, y) / d2;
        m = mn3(a, b, g);
        near = (m < 0.01) && (m > -0.01);
        if (m > 0.0) begin
          for (int ch = 0; ch < 3; ch++) begin
            real cv;
            cv = a * tc[0][ch] + b * tc[1][ch] + g * tc[2][ch];
            ref_img[fr][y][x][ch] = cv > (368.0 / 2048.0);
            if (cv - 368.0 / 2048.0 < 0.01 && cv - 368.0 / 2048.0 > -0.01) near = 1;
          end
        end
        if (near) unsure[fr][y][x] = 1;
      end
  endtask

  // ------------------------------------------------------------ program
  // Each entry is {float flag, word}: flagged words are single-precision
  // values that the top converts to fixed point on the way in.
  logic [32:0] prog [$];
  bit          send_float = 0;
  function automatic logic [31:0] to_f32(real r);
    real a;
    int  e;
    longint mant;
    if (r == 0.0) return 32'h0;
    a = (r < 0.0) ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    mant = longint'($floor((a - 1.0) * 8388608.0));
    return {r < 0.0, 8'(e + 127), 23'(mant)};
  endfunction
  function automatic void put(logic [15:0] hi, logic [15:0] lo = INSTR_NOP);
    prog.push_back({1'b0, hi, lo});
  endfunction
  function automatic void put_data(logic [7:0] opc, real d [$]);
    prog.push_back({1'b0, dat(opc, d.size()), INSTR_NOP});
    foreach (d[i]) prog.push_back(send_float ? {1'b1, to_f32(d[i])} : {1'b0, fx(d[i])});
  endfunction

  task automatic gl_vertex(real x, real y, real z);
    real eye [4], clip [4];
    put_data(OPC_VERTEX, '{x, y, z, 1.0});
    for (int i = 0; i < 4; i++) eye[i] = mv[i][0] * x + mv[i][1] * y + mv[i][2] * z + mv[i][3];
    for (int i = 0; i < 4; i++)
      clip[i] = pj[i][0] * eye[0] + pj[i][1] * eye[1] + pj[i][2] * eye[2] + pj[i][3] * eye[3];
    tv[nv][0] = clip[0] / clip[3] * 160.0 + 160.0;
    tv[nv][1] = clip[1] / clip[3] * 120.0 + 120.0;
    tv[nv][2] = clip[2] / clip[3] * 0.5 + 0.5;
    tc[nv] = col_cur;
    nv++;
    if (nv == 3) begin
      ref_raster(frame_no);
      nv = 0;
    end
  endtask

  task automatic gl_color(real r, real g, real b);
    put_data(OPC_COLOR, '{r, g, b, 1.0});
    col_cur = '{r, g, b};
  endtask

  task automatic build_program();
    mat_t t;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < SH; y++)
        for (int x = 0; x < SW; x++) begin ref_img[f][y][x] = 0; unsure[f][y][x] = 0; end
    // ---------------- frame 1
    put_data(OPC_VIEWPORT, '{0.0, 0.0, 320.0, 240.0});
    put(imm(OPC_MATRIXMODE, 7'(MM_PROJECTION)), imm(OPC_LOADIDENT));
    t = '{'{1.0, 0.0, 0.0, 0.0}, '{0.0, 1.0, 0.0, 0.0}, '{0.0, 0.0, 1.0, 0.0}, '{0.0, 0.0, -0.5, 1.0}};
    put_data(OPC_LOADMATRIX, '{1.0, 0.0, 0.0, 0.0, 0.0, 1.0, 0.0, 0.0,
                               0.0, 0.0, 1.0, 0.0, 0.0, 0.0, -0.5, 1.0});
    pj = t;
    put(imm(OPC_MATRIXMODE, 7'(MM_MODELVIEW)), imm(OPC_LOADIDENT));
    mv = ident();
    put(imm(OPC_PUSHMATRIX));
    mv_saved = mv;
    put_data(OPC_TRANSLATE, '{-0.2, 0.1, 0.0});
    t = ident(); t[0][3] = -0.2; t[1][3] = 0.1; mv = mul(mv, t);
    put_data(OPC_ROTATE, '{0.258819, 0.965926});     // 15 degrees about z
    t = ident(); t[0][0] = 0.965926; t[0][1] = -0.258819; t[1][0] = 0.258819; t[1][1] = 0.965926;
    mv = mul(mv, t);
    put_data(OPC_SCALE, '{0.9, 0.8, 1.0});
    t = ident(); t[0][0] = 0.9; t[1][1] = 0.8; mv = mul(mv, t);
    put_data(OPC_MULTMATRIX, '{1.0, 0.1, 0.0, 0.0, 0.0, 1.0, 0.0, 0.05,
                               0.0, 0.0, 1.0, 0.0, 0.0, 0.0, 0.0, 1.0});
    t = '{'{1.0, 0.1, 0.0, 0.0}, '{0.0, 1.0, 0.0, 0.05}, '{0.0, 0.0, 1.0, 0.0}, '{0.0, 0.0, 0.0, 1.0}};
    mv = mul(mv, t);
    put(imm(OPC_BEGIN, IMM_TRIANGLES));
    gl_color(1.0, 0.0, 0.0);  gl_vertex(-0.6, -0.5, 0.4);
    gl_color(0.0, 1.0, 0.0);  gl_vertex(0.5, -0.4, 0.0);
    gl_color(0.0, 0.0, 1.0);  gl_vertex(0.0, 0.6, -0.4);
    gl_color(1.0, 1.0, 0.0);  gl_vertex(0.3, 0.3, 0.2);
    gl_vertex(0.8, 0.4, 0.2);
    gl_color(1.0, 1.0, 1.0);  gl_vertex(0.5, 0.8, 0.2);
    put(imm(OPC_END));
    // ---------------- fill the memory: the host halts, the memory wraps
    while (prog.size() < DEPTH) put(INSTR_NOP, INSTR_NOP);
    // ---------------- frame 2 (refilled memory)
    frame_no = 1;
    put(imm(OPC_POPMATRIX), imm(OPC_PUSHMATRIX));
    mv = mv_saved;
    put_data(OPC_TRANSLATE, '{0.3, -0.2, 0.0});
    t = ident(); t[0][3] = 0.3; t[1][3] = -0.2; mv = mul(mv, t);
    put(imm(OPC_BEGIN, IMM_TRIANGLES));
    send_float = 1;           // this triangle's data is sent as floats
    gl_color(0.0, 1.0, 1.0);  gl_vertex(-0.5, -0.5, 0.0);
    gl_vertex(0.4, -0.3, 0.0);
    gl_color(1.0, 0.0, 1.0);  gl_vertex(-0.1, 0.5, 0.0);
    put(imm(OPC_END));
  endtask

  // --------------------------------------------------------- host model
  int halt_cycles = 0, wraps = 0;
  initial begin
    int i = 0;
    build_program();
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (i < prog.size()) begin
      @(negedge clk);
      if (instr_halt) begin
        srv_wen = 0;
        halt_cycles++;
      end else if ($urandom_range(0, 7) == 0) begin
        srv_wen = 0;                       // the host pauses now and then
      end else begin
        srv_wen = 1; srv_waddr = 12'(i % DEPTH); {srv_float, srv_din} = prog[i];
        if (i > 0 && (i % DEPTH) == 0) wraps++;
        i++;
      end
    end
    @(negedge clk) begin srv_wen = 0; srv_float = 0; end
  end

  // -------------------------------------------------- mechanism counters
  int n_stall = 0, n_pair = 0, n_rowop = 0, n_mult = 0, n_push = 0, n_div = 0;
  int n_float = 0, n_tri = 0, n_vbstall = 0, n_clear = 0, n_swap = 0, n_fbwait = 0, n_px = 0;
  logic front_q = 0, clr_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (decode_stalled) n_stall++;
    if (srv_wen && srv_float) n_float++;
    if (dut.u_fd.state == 1 && dut.u_fd.half) n_pair++;
    if (dut.cmd_valid && dut.cmd_ready) begin
      if (dut.cmd.op inside {CMD_SCALE, CMD_TRANSLATE, CMD_ROTATE}) n_rowop++;
      if (dut.cmd.op == CMD_MULTROW) n_mult++;
      if (dut.cmd.op == CMD_PUSH) n_push++;
    end
    if (dut.u_tu.div_start) n_div++;
    if (dut.tri_valid && dut.tri_ready) n_tri++;
    if (dut.vtx_valid && !dut.vtx_ready) n_vbstall++;
    if (dut.tri_valid && !dut.fb_ready) n_fbwait++;
    if (dut.u_fb.clearing && !clr_q) n_clear++;
    if (front_buffer != front_q) n_swap++;
    if (dut.px_we) n_px++;
    clr_q = dut.u_fb.clearing;
    front_q = front_buffer;
  end

  // ---------------------------------------------------- frame capture
  task automatic capture_and_compare(int fr);
    logic [2:0] fbpix [SH][SW];
    int bad = 0, dbl = 0, cnt = 0, lit = 0;
    for (int v = 0; v < 480; v++)
      for (int h = 0; h < 640; h++) begin
        @(posedge clk);
        while (!vga_de) @(posedge clk);
        if (v % 2 == 0 && h % 2 == 0) fbpix[SH - 1 - v / 2][h / 2] = vga_rgb;
        else if (vga_rgb != fbpix[SH - 1 - v / 2][h / 2] && v % 2 == 1) dbl++;
        else if (h % 2 == 1 && vga_rgb != fbpix[SH - 1 - v / 2][h / 2]) dbl++;
      end
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) begin
        if (fbpix[y][x] != 0) lit++;
        if (unsure[fr][y][x]) continue;
        cnt++;
        if (fbpix[y][x] != ref_img[fr][y][x]) bad++;
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL frame %0d: %0d of %0d pixels differ from the model", fr + 1, bad, cnt);
    end
    checks++;
    if (dbl != 0) begin
      failures++;
      $display("FAIL frame %0d: %0d screen pixels break the 2x2 doubling", fr + 1, dbl);
    end
    checks++;
    if (lit < 1000) begin
      failures++;
      $display("FAIL frame %0d: only %0d lit pixels", fr + 1, lit);
    end
    $display("frame %0d: %0d lit pixels, %0d compared, %0d near edges", fr + 1, lit, cnt, SW * SH - cnt);
  endtask

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_seen(int n, string what);
    checks++;
    $display("  %-32s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    wait (rst_n);
    // frame 1
    @(posedge front_buffer);
    capture_and_compare(0);
    // frame 2
    @(negedge front_buffer);
    capture_and_compare(1);
    $display("mechanisms:");
    expect_seen(n_stall,     "decode stall cycles");
    expect_seen(n_pair,      "packed instruction pairs");
    expect_seen(halt_cycles, "instruction halt cycles");
    expect_seen(wraps,       "instruction memory wraps");
    expect_seen(n_float,     "float words converted on write");
    expect_seen(n_rowop,     "row updates (scale/translate/rotate)");
    expect_seen(n_mult,      "glMultMatrix groups");
    expect_seen(n_push,      "matrix pushes");
    expect_seen(n_div,       "perspective divisions");
    expect_seen(n_tri,       "triangles rasterized");
    expect_seen(n_vbstall,   "vertex buffer back-pressure cycles");
    expect_seen(n_fbwait,    "triangle waits for clear");
    expect_seen(n_clear,     "buffer clears");
    expect_seen(n_swap,      "buffer swaps");
    expect_seen(n_px,        "pixels written");
    checks++;
    if (n_tri != 3 || n_swap != 2) begin
      failures++;
      $display("FAIL %0d triangles, %0d swaps", n_tri, n_swap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

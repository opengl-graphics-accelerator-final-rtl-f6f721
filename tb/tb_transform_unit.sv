// tb_transform_unit: drives matrix-stack commands and vertices into the
// transform unit and compares every transformed vertex with a floating-point
// model of the OpenGL transformation (model-view, projection, division by w,
// viewport) kept here. Covers load identity, load matrix, push (and use of
// the pushed and the bottom matrix), scale, translate, rotate, multiply, both
// stacks, glBegin/glEnd pass-through, the stall length of a row update, and
// a burst of random vertices sent back to back under random output
// back-pressure, which must come out in order and faster than one vertex at a
// time would allow.
// Timing: 10 ns clock; commands go in over the valid/ready handshake, the
// output is taken at once except during the burst. A watchdog ends the run
// after 5 ms. The order of the steps, the 4-clock row update and the stack
// sizes follow the original design; the viewport formula is the standard
// OpenGL one, and the stage split is this design's choice.
module tb_transform_unit;
  import gpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, idle, out_valid, out_ready = 1;
  gpu_cmd_t cmd;
  fx_t vp_x, vp_y, vp_w, vp_h;
  vtx_t out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  transform_unit dut (.*);

  real mv [32][4][4];
  real pj [2][4][4];
  real vpx = 10.0, vpy = 5.0, vpw = 300.0, vph = 200.0;

  function automatic fx_t fx(real r);
    return fx_t'($rtoi(r * 2048.0));
  endfunction
  function automatic real rl(fx_t v);
    return real'(v) / 2048.0;
  endfunction

  // M = M x T on the reference stacks
  task automatic ref_mult(bit ps, int idx, real t [4][4]);
    real r [4][4];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        r[i][j] = 0.0;
        for (int k = 0; k < 4; k++)
          r[i][j] += (ps ? pj[idx][i][k] : mv[idx][i][k]) * rl(fx(t[k][j]));   // argument as sent
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (ps) pj[idx][i][j] = r[i][j]; else mv[idx][i][j] = r[i][j];
  endtask

  function automatic void ident(output real t [4][4]);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) t[i][j] = (i == j) ? 1.0 : 0.0;
  endfunction

  int spmv = 0, sppj = 0;

  task automatic send(cmd_op_e op, bit ssel, cs_e cs, real d0 = 0, real d1 = 0,
                      real d2 = 0, real d3 = 0, int chunk = 0);
    @(negedge clk);
    cmd = '0;
    cmd.op = op; cmd.cs = cs; cmd.stack_sel = ssel;
    cmd.sp_mv = 8'(spmv); cmd.sp_pj = 4'(sppj); cmd.chunk = 2'(chunk);
    cmd.data = {fx(d3), fx(d2), fx(d1), fx(d0)};
    cmd.color = {fx(0.3), fx(0.2), fx(0.1)};
    cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk) cmd_valid = 0;
  endtask

  // update op with the reference applied and the stall measured
  int busy_cycles;
  task automatic rowop(cmd_op_e op, cs_e cs, bit ssel, real t [4][4], real d0, real d1, real d2);
    send(op, ssel, cs, d0, d1, d2);
    ref_mult(ssel, ssel ? sppj / 4 : spmv / 4, t);
    busy_cycles = 0;
    while (!idle) begin busy_cycles++; @(negedge clk); end
    checks++;
    if (busy_cycles != 4) begin   // one row per clock
      failures++;
      $display("FAIL %s busy %0d extra clocks", op.name(), busy_cycles);
    end
  endtask

  task automatic vertex(real x, real y, real z, real w = 1.0);
    real eye [4], clip [4], e [3];
    int t0;
    x = rl(fx(x)); y = rl(fx(y)); z = rl(fx(z)); w = rl(fx(w));   // as sent
    for (int i = 0; i < 4; i++)
      eye[i] = mv[spmv/4][i][0] * x + mv[spmv/4][i][1] * y + mv[spmv/4][i][2] * z + mv[spmv/4][i][3] * w;
    for (int i = 0; i < 4; i++)
      clip[i] = pj[sppj/4][i][0] * eye[0] + pj[sppj/4][i][1] * eye[1] +
                pj[sppj/4][i][2] * eye[2] + pj[sppj/4][i][3] * eye[3];
    e[0] = clip[0] / clip[3] * vpw / 2.0 + vpx + vpw / 2.0;
    e[1] = clip[1] / clip[3] * vph / 2.0 + vpy + vph / 2.0;
    e[2] = clip[2] / clip[3] * 0.5 + 0.5;
    send(CMD_VERTEX, 0, CS_DOT3, x, y, z, w);
    t0 = 0;
    while (!(out_valid && out_ready)) begin t0++; @(posedge clk); end
    for (int i = 0; i < 3; i++) begin
      real got, tol;
      got = rl(out.pos[i]);
      // fixed-point rounding is magnified by the division by a small w
      tol = (0.05 + 0.002 * ((e[i] < 0) ? -e[i] : e[i])) /
            ((clip[3] < 0 ? -clip[3] : clip[3]) < 1.0 ? (clip[3] < 0 ? -clip[3] : clip[3]) : 1.0);
      checks++;
      if (got - e[i] > tol || e[i] - got > tol || out.kind != VK_VERTEX) begin
        failures++;
        $display("FAIL vertex (%f,%f,%f,%f) coord %0d got %f exp %f clip %f %f %f %f", x, y, z, w, i, got, e[i], clip[0], clip[1], clip[2], clip[3]);
      end
    end
    checks++;
    if (out.color[1] != fx(0.2)) begin failures++; $display("FAIL colour"); end
    @(negedge clk);
  endtask

  // expected window position and tolerance of a vertex
  task automatic ref_vtx(real x, real y, real z, real w, output real e [3], output real tol [3]);
    real eye [4], clip [4], aw;
    for (int i = 0; i < 4; i++)
      eye[i] = mv[spmv/4][i][0] * x + mv[spmv/4][i][1] * y + mv[spmv/4][i][2] * z + mv[spmv/4][i][3] * w;
    for (int i = 0; i < 4; i++)
      clip[i] = pj[sppj/4][i][0] * eye[0] + pj[sppj/4][i][1] * eye[1] +
                pj[sppj/4][i][2] * eye[2] + pj[sppj/4][i][3] * eye[3];
    e[0] = clip[0] / clip[3] * vpw / 2.0 + vpx + vpw / 2.0;
    e[1] = clip[1] / clip[3] * vph / 2.0 + vpy + vph / 2.0;
    e[2] = clip[2] / clip[3] * 0.5 + 0.5;
    aw = (clip[3] < 0) ? -clip[3] : clip[3];
    for (int i = 0; i < 3; i++)
      tol[i] = (0.05 + 0.002 * ((e[i] < 0) ? -e[i] : e[i])) / ((aw < 1.0) ? aw : 1.0);
  endtask

  // Vertices sent back to back while the output is randomly held: all must
  // come out in order and correct, followed by the glEnd marker, and the
  // stages must overlap (the burst is faster than one vertex at a time).
  task automatic burst(int n, int single_lat);
    real ex [$][3], tl [$][3], bx [$][3];
    int  got_n, t0, t1;
    for (int k = 0; k < n; k++) begin
      real v [4], e [3], tol [3];
      int  r0, r1, r2;
      r0 = $urandom_range(0, 1600);
      r1 = $urandom_range(0, 1600);
      r2 = $urandom_range(0, 1000);
      v[0] = rl(fx((r0 - 800) / 1000.0));
      v[1] = rl(fx((r1 - 800) / 1000.0));
      v[2] = rl(fx((r2 - 500) / 1000.0));
      v[3] = 1.0;
      ref_vtx(v[0], v[1], v[2], v[3], e, tol);
      ex.push_back(e); tl.push_back(tol); bx.push_back('{v[0], v[1], v[2]});
    end
    got_n = 0;
    t0 = 0;
    fork
      begin
        for (int k = 0; k < n; k++) begin
          send(CMD_VERTEX, 0, CS_DOT3, bx[k][0], bx[k][1], bx[k][2], 1.0);
        end
        send(CMD_END, 0, CS_DOT3);
      end
      begin
        while (got_n <= n) begin
          @(negedge clk);
          t0++;
          out_ready = ($urandom_range(0, 3) != 0);
          if (out_valid && out_ready) begin
            if (got_n < n) begin
              for (int i = 0; i < 3; i++) begin
                real g;
                g = rl(out.pos[i]);
                checks++;
                if (out.kind != VK_VERTEX || g - ex[got_n][i] > tl[got_n][i] ||
                    ex[got_n][i] - g > tl[got_n][i]) begin
                  failures++;
                  $display("FAIL burst vertex %0d coord %0d got %f exp %f", got_n, i, g, ex[got_n][i]);
                end
              end
            end else begin
              checks++;
              if (out.kind != VK_END) begin failures++; $display("FAIL burst end marker"); end
            end
            got_n++;
          end
        end
      end
    join
    @(negedge clk) out_ready = 1;
    // with random hold-off the output alone takes about 4/3 clock per item
    t1 = n * single_lat;
    checks++;
    if (t0 >= t1) begin
      failures++;
      $display("FAIL burst of %0d took %0d clocks, not below %0d", n, t0, t1);
    end else
      $display("burst of %0d vertices: %0d clocks (one at a time: %0d)", n, t0, t1);
  endtask

  task automatic marker(cmd_op_e op, vkind_e k);
    send(op, 0, CS_DOT3);
    while (!out_valid) @(posedge clk);
    checks++;
    if (out.kind != k) begin failures++; $display("FAIL marker %s", op.name()); end
    @(negedge clk);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t [4][4];
    real p [4][4];
    vp_x = fx(vpx); vp_y = fx(vpy); vp_w = fx(vpw); vp_h = fx(vph);
    cmd = '0;
    for (int i = 0; i < 32; i++) ident(mv[i]);
    for (int i = 0; i < 2; i++) ident(pj[i]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!idle) @(posedge clk);
    // identity matrices from reset
    vertex(0.25, -0.5, 0.75);
    marker(CMD_BEGIN, VK_BEGIN);
    // projection matrix with a w that depends on z
    p = '{'{1.0, 0.0, 0.0, 0.0}, '{0.0, 1.0, 0.0, 0.0}, '{0.0, 0.0, 1.0, 0.0}, '{0.0, 0.0, 0.5, 1.0}};
    for (int r = 0; r < 4; r++) send(CMD_LOADROW, 1, CS_DOT3, p[r][0], p[r][1], p[r][2], p[r][3], r);
    pj[0] = p;
    vertex(0.5, 0.5, 0.5);
    // push the model-view matrix, then transform the copy
    send(CMD_PUSH, 0, CS_DOT3);
    mv[1] = mv[0];
    spmv = 4;
    ident(t); t[0][3] = 0.1; t[1][3] = -0.2; t[2][3] = 0.3;
    rowop(CMD_TRANSLATE, CS_TRANSLATE, 0, t, 0.1, -0.2, 0.3);
    vertex(-0.4, 0.2, 0.1);
    ident(t); t[0][0] = 0.8; t[0][1] = -0.6; t[1][0] = 0.6; t[1][1] = 0.8;
    rowop(CMD_ROTATE, CS_ROTATE, 0, t, 0.6, 0.8, 0.0);
    vertex(0.3, 0.3, -0.2);
    ident(t); t[0][0] = 0.5; t[1][1] = 0.25; t[2][2] = 2.0;
    rowop(CMD_SCALE, CS_SCALE, 0, t, 0.5, 0.25, 2.0);
    vertex(0.9, -0.7, 0.2);
    // glMultMatrix with a general matrix
    t = '{'{0.9, 0.1, 0.0, 0.05}, '{-0.1, 0.8, 0.2, 0.0}, '{0.0, 0.3, 0.7, -0.1}, '{0.0, 0.0, 0.0, 1.0}};
    for (int r = 0; r < 4; r++) send(CMD_MULTROW, 0, CS_DOT4, t[r][0], t[r][1], t[r][2], t[r][3], r);
    ref_mult(0, 1, t);
    while (!idle) @(negedge clk);
    vertex(0.2, 0.4, 0.6);
    vertex(-0.6, -0.1, 0.3);
    // scale on the projection stack
    ident(t); t[0][0] = 2.0; t[1][1] = 1.5;
    rowop(CMD_SCALE, CS_SCALE, 1, t, 2.0, 1.5, 1.0);
    vertex(0.1, 0.2, 0.3);
    vertex(0.2, -0.3, 0.1, 2.0);     // w other than 1
    vertex(-0.1, 0.15, 0.05, 0.5);
    // "pop": back to the bottom model-view matrix, still the identity
    spmv = 0;
    vertex(0.4, 0.3, 0.2);
    // load identity on the projection stack
    send(CMD_LOADIDENT, 1, CS_DOT3);
    ident(pj[0]);
    vertex(-0.3, 0.8, 0.0);
    // overlapped vertices, ended by glEnd
    burst(8, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// transform_unit: matrix-stack update pipeline and coordinate transformation.
//
// It owns the model-view stack (32 matrices) and the projection stack
// (2 matrices), both block RAMs of 128-bit rows, and accepts gpu_cmd_t
// commands from the decode stage over a valid/ready handshake (cmd_ready is
// low while a matrix is being updated, which stalls every stage before it).
//
// Matrix updates run one row per clock through the shared row_compute array
// (read row, compute, write back, pipelined):
//   glLoadIdentity  4 clocks, writes the identity into the top matrix
//   glLoadMatrix    1 clock per 4-word group: the group is written as a row
//   glPushMatrix    4 clocks, copies the top matrix one matrix higher
//   glScale / glTranslate / glRotate  4 clocks, top = top x T
//   glMultMatrix    the first three groups are stored; the fourth starts
//                   20 clocks of work, one element of top x T per clock
// (glPopMatrix only moves the stack pointer, which the decode stage keeps.)
//
// A vertex goes through three stages, each with its own state machine and
// separated by registers (eye coordinates, clip coordinates):
//   front       eye[i]  = MV row i . (x, y, z, w)    shared array, 4 clocks
//   projection  clip[i] = P row i . eye              local array, 5 clocks
//   output      ndc     = clip.xyz / clip.w          three 8-stage dividers
//               xw = ndc.x * W/2 + (X + W/2), yw likewise with Y and H,
//               zw = ndc.z * 1/2 + 1/2               viewport, 1 clock
// and is offered on out (valid/ready) with the colour it was issued with,
// about 20 clocks after it was accepted. The stages overlap: the front
// takes a new vertex (or a model-view update) while earlier vertices are
// still being projected and divided, so back-to-back vertices leave about
// every 12 clocks. glBegin and glEnd are taken only when the later stages
// are empty and pass through as markers in order with the vertices.
// Projection-stack commands wait for the projection stage to be idle, and
// the projection stage reads its stack only while it works.
//
// After reset the unit spends 4 clocks writing the identity into the bottom
// matrix of both stacks. While idle the unit already reads row 0 of the
// waiting command's top matrix, so a row update keeps the unit busy for
// exactly four clocks, one per row, as the original design states. The
// vertex uses all four glVertex words (x, y, z, w).
// Choices of this design: matrices are written row by row in the order the
// argument words arrive; glMultMatrix is computed one element per clock;
// each stage holds one vertex (no deeper queues between stages).
module transform_unit
  import gpu_pkg::*;
#(
  parameter int MV_ROWS = 4 * MV_DEPTH_MATS,
  parameter int PJ_ROWS = 4 * PROJ_DEPTH_MATS,
  localparam int MVAW   = $clog2(MV_ROWS),
  localparam int PJAW   = $clog2(PJ_ROWS)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmd_valid,
  output logic     cmd_ready,
  input  gpu_cmd_t cmd,
  output logic     idle,
  input  fx_t      vp_x,
  input  fx_t      vp_y,
  input  fx_t      vp_w,
  input  fx_t      vp_h,
  output logic     out_valid,
  input  logic     out_ready,
  output vtx_t     out
);
  // Front stage (commands, model-view product), projection stage, and
  // division / viewport / output stage, each with its own state.
  typedef enum logic [2:0] {
    T_INIT, T_IDLE, T_ROWOP, T_LOADID, T_LOADROW, T_MULT, T_VMV, T_HAND
  } tstate_e;
  typedef enum logic [1:0] { M_IDLE, M_PJ, M_HAND } mstate_e;
  typedef enum logic [1:0] { D_IDLE, D_DIV, D_VP, D_OUT } dstate_e;

  tstate_e  state;
  gpu_cmd_t c;
  logic [2:0] cnt;
  logic [1:0] col;
  fx_t [3:0][3:0] t_mat;      // glMultMatrix argument, t_mat[k] = row k
  fx_t [3:0] new_row;
  fx_t [3:0] eye, clip;
  fx_t [2:0] ndc;
  // projection stage
  mstate_e   m_state;
  logic [2:0] mcnt;
  fx_t [3:0] m_eye;
  fx_t [2:0] m_color;
  logic [3:0] m_sp;
  // division / viewport / output stage
  dstate_e   d_state;
  fx_t [3:0] d_clip;
  fx_t [2:0] d_color;

  // ---------------------------------------------------------------- stacks
  logic [MVAW-1:0] mv_raddr, mv_waddr;
  logic [PJAW-1:0] pj_raddr, pj_waddr;
  fx_t [3:0]       mv_rdata, pj_rdata, wdata;
  logic            mv_we, pj_we;

  matrix_stack #(.ROWS(MV_ROWS)) u_mv (
    .clk(clk), .raddr(mv_raddr), .rdata(mv_rdata),
    .we(mv_we), .waddr(mv_waddr), .wdata(wdata));
  matrix_stack #(.ROWS(PJ_ROWS)) u_pj (
    .clk(clk), .raddr(pj_raddr), .rdata(pj_rdata),
    .we(pj_we), .waddr(pj_waddr), .wdata(wdata));

  // ---------------------------------------------------------- shared array
  cs_e       rc_sel;
  fx_t [3:0] rc_m, rc_d, rc_row;
  fx_t       rc_dot;
  row_compute u_rc (.sel(rc_sel), .m(rc_m), .d(rc_d), .row_out(rc_row), .dot(rc_dot));

  // ---------------------------------------------------- local (projection)
  fx_t [3:0] pj_p;
  fx_t       pj_s0, pj_s1, pj_dot;
  for (genvar i = 0; i < 4; i++) begin : g_pjmul
    fxp_mul u_m (.a(pj_rdata[i]), .b(m_eye[i]), .y(pj_p[i]));
  end
  fxp_add u_pa0 (.a(pj_p[0]), .b(pj_p[1]), .y(pj_s0));
  fxp_add u_pa1 (.a(pj_p[2]), .b(pj_p[3]), .y(pj_s1));
  fxp_add u_pa2 (.a(pj_s0),   .b(pj_s1),   .y(pj_dot));

  // ------------------------------------------------- perspective division
  logic      div_start;
  logic      div_issued;   // the divisions of this vertex have started
  logic [2:0] div_ov;
  fx_t [2:0] div_q;
  for (genvar i = 0; i < 3; i++) begin : g_div
    fxp_div u_div (.clk(clk), .rst_n(rst_n), .in_valid(div_start),
                   .a(d_clip[i]), .b(d_clip[3]), .out_valid(div_ov[i]), .q(div_q[i]));
  end

  // ------------------------------------------------------------- viewport
  fx_t [2:0] vp_scale, vp_off, vp_prod, vp_win;
  assign vp_scale = {FX_HALF, vp_h >>> 1, vp_w >>> 1};
  assign vp_off   = {FX_HALF, vp_y + (vp_h >>> 1), vp_x + (vp_w >>> 1)};
  for (genvar i = 0; i < 3; i++) begin : g_vp
    fxp_mul u_vm (.a(ndc[i]), .b(vp_scale[i]), .y(vp_prod[i]));
    fxp_add u_va (.a(vp_prod[i]), .b(vp_off[i]), .y(vp_win[i]));
  end

  // ----------------------------------------------------------- addressing
  logic [MVAW-1:0] mv_base;
  logic [PJAW-1:0] pj_base;
  assign mv_base = MVAW'(c.sp_mv);
  assign pj_base = PJAW'(c.sp_pj);

  function automatic fx_t [3:0] ident_row(logic [1:0] r);
    fx_t [3:0] v;
    v = '0;
    v[r] = FX_ONE;
    return v;
  endfunction

  // Column j of the glMultMatrix argument.
  fx_t [3:0] t_col;
  always_comb
    for (int k = 0; k < 4; k++) t_col[k] = t_mat[k][col];

  always_comb begin
    mv_raddr = mv_base + MVAW'(cnt);
    pj_raddr = pj_base + PJAW'(cnt);
    mv_we    = 1'b0;
    pj_we    = 1'b0;
    mv_waddr = mv_base;
    pj_waddr = pj_base;
    wdata    = rc_row;
    unique case (state)
      T_IDLE: begin
        // Read row 0 of the waiting command's top matrix, so that a row
        // update or a vertex can use it in the clock after acceptance.
        mv_raddr = MVAW'(cmd.sp_mv);
        pj_raddr = PJAW'(cmd.sp_pj);
      end
      T_INIT: begin
        mv_we = 1'b1;  mv_waddr = MVAW'(cnt);
        pj_we = 1'b1;  pj_waddr = PJAW'(cnt);
        wdata = ident_row(cnt[1:0]);
      end
      T_LOADID: begin
        mv_we = !c.stack_sel; pj_we = c.stack_sel;
        mv_waddr = mv_base + MVAW'(cnt);
        pj_waddr = pj_base + PJAW'(cnt);
        wdata = ident_row(cnt[1:0]);
      end
      T_LOADROW: begin
        mv_we = !c.stack_sel; pj_we = c.stack_sel;
        mv_waddr = mv_base + MVAW'(c.chunk);
        pj_waddr = pj_base + PJAW'(c.chunk);
        wdata = c.data;
      end
      T_ROWOP: begin
        mv_we = !c.stack_sel && cnt != 0;
        pj_we =  c.stack_sel && cnt != 0;
        mv_waddr = mv_base + MVAW'(cnt) - MVAW'(1) + ((c.op == CMD_PUSH) ? MVAW'(4) : '0);
        pj_waddr = pj_base + PJAW'(cnt) - PJAW'(1) + ((c.op == CMD_PUSH) ? PJAW'(4) : '0);
        wdata = (c.op == CMD_PUSH) ? (c.stack_sel ? pj_rdata : mv_rdata) : rc_row;
      end
      T_MULT: begin
        mv_raddr = mv_base + MVAW'(cnt);
        pj_raddr = pj_base + PJAW'(cnt);
        mv_we = !c.stack_sel && col == 2'd3;
        pj_we =  c.stack_sel && col == 2'd3;
        mv_waddr = mv_base + MVAW'(cnt);
        pj_waddr = pj_base + PJAW'(cnt);
        wdata = {rc_dot, new_row[2], new_row[1], new_row[0]};
      end
      default: ;
    endcase
    // The projection stage owns the projection read port while it works;
    // commands on the projection stack are only taken while it is idle.
    if (m_state == M_PJ) pj_raddr = PJAW'(m_sp) + PJAW'(mcnt);
  end

  // Operand selection for the shared array.
  always_comb begin
    rc_sel = c.cs;
    rc_m   = c.stack_sel ? pj_rdata : mv_rdata;
    rc_d   = c.data;
    if (state == T_MULT) begin
      rc_sel = CS_DOT4;
      rc_d   = t_col;
    end else if (state == T_VMV) begin
      rc_sel = CS_DOT4;                // (x, y, z, w) from the glVertex words
      rc_m   = mv_rdata;
    end
  end

  // A command is taken when the front stage is idle, except that markers
  // wait until the later stages are empty (so that they stay in order with
  // the vertices) and projection-stack commands wait for the projection
  // stage (which reads that stack).
  logic take_ok, take, marker_go, hand_fm, hand_md;
  always_comb begin
    take_ok = 1'b1;
    if (cmd.op == CMD_BEGIN || cmd.op == CMD_END)
      take_ok = (m_state == M_IDLE) && (d_state == D_IDLE);
    else if (cmd.op != CMD_VERTEX && cmd.stack_sel)
      take_ok = (m_state == M_IDLE);
  end
  assign cmd_ready = (state == T_IDLE) && take_ok;
  assign take      = cmd_valid && cmd_ready;
  assign marker_go = take && (cmd.op == CMD_BEGIN || cmd.op == CMD_END);
  assign hand_fm   = (state == T_HAND) && (m_state == M_IDLE);
  assign hand_md   = (m_state == M_HAND) && (d_state == D_IDLE);
  assign idle      = (state == T_IDLE) && (m_state == M_IDLE) && (d_state == D_IDLE);
  assign out_valid = (d_state == D_OUT);
  assign div_start = (d_state == D_DIV) && !div_issued;

  // Row-read latency in T_MULT: 'rd_ok' marks that mv/pj rdata hold row cnt.
  logic rd_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_INIT;
      c       <= '0;
      cnt     <= '0;
      col     <= '0;
      t_mat   <= '0;
      new_row <= '0;
      eye     <= '0;
      rd_ok   <= 1'b0;
    end else begin
      unique case (state)
        T_INIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == 3'd3) begin
            cnt   <= '0;
            state <= T_IDLE;
          end
        end

        T_IDLE: if (take) begin
          c   <= cmd;
          cnt <= '0;
          col <= '0;
          rd_ok <= 1'b0;
          unique case (cmd.op)
            CMD_BEGIN, CMD_END: ;            // passed to the output stage
            CMD_VERTEX: begin
              cnt   <= 3'd1;           // row 0 was read while idle
              state <= T_VMV;
            end
            CMD_LOADIDENT: state <= T_LOADID;
            CMD_LOADROW:   state <= T_LOADROW;
            CMD_MULTROW: begin
              t_mat[cmd.chunk] <= cmd.data;
              if (cmd.chunk == 2'd3) state <= T_MULT;
            end
            default: begin                     // push, scale, translate, rotate
              cnt   <= 3'd1;                   // row 0 was read while idle
              state <= T_ROWOP;
            end
          endcase
        end

        T_LOADID: begin
          cnt <= cnt + 1'b1;
          if (cnt == 3'd3) state <= T_IDLE;
        end

        T_LOADROW: state <= T_IDLE;

        T_ROWOP: begin
          cnt <= cnt + 1'b1;
          if (cnt == 3'd4) state <= T_IDLE;
        end

        T_MULT: begin
          // cycle with rd_ok = 0 issues the read of row cnt; then four
          // cycles produce columns 0..3, the last one writing the row.
          if (!rd_ok) begin
            rd_ok <= 1'b1;
          end else begin
            new_row[col] <= rc_dot;
            col <= col + 1'b1;
            if (col == 2'd3) begin
              rd_ok <= 1'b0;
              cnt   <= cnt + 1'b1;
              if (cnt == 3'd3) state <= T_IDLE;
            end
          end
        end

        T_VMV: begin
          cnt <= cnt + 1'b1;
          if (cnt != 0) eye[cnt-1] <= rc_dot;
          if (cnt == 3'd4) begin
            cnt   <= '0;
            state <= T_HAND;
          end
        end

        // Hand the eye coordinates to the projection stage.
        T_HAND: if (hand_fm) state <= T_IDLE;

        default: state <= T_IDLE;
      endcase
    end
  end

  // ------------------------------------------------- projection stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_state <= M_IDLE;
      mcnt    <= '0;
      m_eye   <= '0;
      m_color <= '0;
      m_sp    <= '0;
      clip    <= '0;
    end else begin
      unique case (m_state)
        M_IDLE: if (hand_fm) begin
          m_eye   <= eye;
          m_color <= c.color;
          m_sp    <= c.sp_pj;
          mcnt    <= '0;
          m_state <= M_PJ;
        end
        M_PJ: begin
          // mcnt = 0 reads row 0; mcnt = 1..4 produce clip[0..3]
          mcnt <= mcnt + 1'b1;
          if (mcnt != 0) clip[mcnt-1] <= pj_dot;
          if (mcnt == 3'd4) m_state <= M_HAND;
        end
        M_HAND: if (hand_md) m_state <= M_IDLE;
        default: m_state <= M_IDLE;
      endcase
    end
  end

  // ------------------------------------ division, viewport, output stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_state    <= D_IDLE;
      d_clip     <= '0;
      d_color    <= '0;
      ndc        <= '0;
      out        <= '0;
      div_issued <= 1'b0;
    end else begin
      unique case (d_state)
        D_IDLE: begin
          if (hand_md) begin
            d_clip  <= clip;
            d_color <= m_color;
            d_state <= D_DIV;
          end else if (marker_go) begin
            out.kind <= (cmd.op == CMD_BEGIN) ? VK_BEGIN : VK_END;
            d_state  <= D_OUT;
          end
        end
        D_DIV: begin
          div_issued <= 1'b1;
          if (div_issued && div_ov[0]) begin
            ndc        <= div_q;
            div_issued <= 1'b0;
            d_state    <= D_VP;
          end
        end
        D_VP: begin
          out.kind  <= VK_VERTEX;
          out.pos   <= vp_win;
          out.color <= d_color;
          d_state   <= D_OUT;
        end
        D_OUT: if (out_ready) d_state <= D_IDLE;
        default: d_state <= D_IDLE;
      endcase
    end
  end

endmodule

// fetch_decode: the front end of the pipeline -- instruction memory, the
// fetch stage (stage 1) and the decode / data-fetch stage (stage 2).
//
// Host side: the server writes 32-bit words into the instruction memory
// (srv_wen/srv_waddr/srv_din), in order from address 0. The memory bound
// register (MBR) keeps the address of the last word written; a word is
// fetched only when its address is at or below MBR. When the word at the
// last address has been written, the instruction halt register (IHR) is set
// and the server must stop writing. Once the fetch stage has consumed the
// last word, PC, MBR and IHR return to their reset state and the memory is
// refilled from address 0.
//
// Stage 1 reads the word at PC. Its upper half is the instruction; its lower
// half is a second instruction unless it is the NOP filler (16'h00FF) or
// the upper instruction carries data. A second instruction is buffered and
// decoded in the next cycle while PC is held.
//
// Stage 2 executes the instruction. Register updates (matrix mode, stack
// pointers, current colour, viewport) happen here; everything that touches
// the matrix stacks or the vertex stream becomes a gpu_cmd_t handed to the
// transform unit over a valid/ready handshake. A data instruction's N words
// follow it in memory: the data address register (DAR) starts at PC+1 and
// reads four words per access through the second read port, the data count
// register (DCR) counts the words left, and PC then advances by 1+N.
// While a command waits for cmd_ready the whole unit stalls; this is how the
// matrix-update stage holds back everything before it.
//
// Timing: the memory is read synchronously, so an immediate instruction
// costs two cycles (fetch, decode), a data instruction two cycles plus two
// per group of four data words, plus any stall.
//
// Choices of this design: the NOP filler code; pushes beyond the top of a
// stack and pops at its bottom are ignored; matrix operations while the
// TEXTURE mode is selected are dropped (no texture stack is built); a
// viewport update waits until the transform unit is idle so that vertices
// already issued keep the old viewport; the colour registers reset to 1.0.
module fetch_decode
  import gpu_pkg::*;
#(
  parameter int IMEM_DEPTH = 4096,
  parameter int MV_ROWS    = 4 * MV_DEPTH_MATS,
  parameter int PJ_ROWS    = 4 * PROJ_DEPTH_MATS,
  localparam int AW        = $clog2(IMEM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // server (host) write port
  input  logic          srv_wen,
  input  logic [AW-1:0] srv_waddr,
  input  logic [31:0]   srv_din,
  output logic          instr_halt,
  // commands to the transform unit
  output logic          cmd_valid,
  input  logic          cmd_ready,
  output gpu_cmd_t      cmd,
  input  logic          tu_idle,
  // viewport registers
  output fx_t           vp_x,
  output fx_t           vp_y,
  output fx_t           vp_w,
  output fx_t           vp_h,
  // status
  output logic          stalled
);
  typedef enum logic [2:0] { S_FETCH, S_DEC, S_DWAIT, S_DATA } state_e;

  state_e        state;
  logic [AW:0]   pc;          // one extra bit to see the end of memory
  logic [AW-1:0] mbr;
  logic          mbr_valid;
  logic          ihr;
  logic [AW:0]   dar;
  logic [6:0]    dcr;
  logic          half;        // decoding the buffered lower half
  logic [15:0]   lo_buf;
  instr_t        dir;         // data instruction being executed
  logic [2:0]    mmr;
  logic [7:0]    sp_mv;
  logic [3:0]    sp_pj;
  fx_t [2:0]     color;
  logic [1:0]    chunk;
  cs_e           csr;

  logic [31:0]   dout, dout1, dout2, dout3, dout4;

  instr_bram #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk  (clk),
    .wen  (srv_wen),
    .waddr(srv_waddr),
    .din  (srv_din),
    .addr (pc[AW-1:0]),
    .dout (dout),
    .addr2(dar[AW-1:0]),
    .dout1(dout1),
    .dout2(dout2),
    .dout3(dout3),
    .dout4(dout4)
  );

  function automatic logic avail(logic [AW:0] a);
    return mbr_valid && (a <= {1'b0, mbr});
  endfunction

  assign instr_halt = ihr;
  assign stalled    = cmd_valid && !cmd_ready;

  wire    freeze = cmd_valid && !cmd_ready;
  instr_t cur;
  assign  cur = half ? instr_t'(lo_buf) : instr_t'(dout[31:16]);
  wire    is_mv = (mmr == MM_MODELVIEW);
  wire    is_pj = (mmr == MM_PROJECTION);

  function automatic gpu_cmd_t mk_cmd(cmd_op_e op, fx_t [3:0] d, logic [1:0] ch = 2'd0);
    gpu_cmd_t c;
    c.op        = op;
    c.stack_sel = is_pj;
    c.sp_mv     = sp_mv;
    c.sp_pj     = sp_pj;
    c.chunk     = ch;
    c.data      = d;
    c.color     = color;
    c.cs        = csr;
    return c;
  endfunction

  logic [AW:0] pc_after;   // PC after the current data instruction
  assign pc_after = pc + (AW+1)'(1) + (AW+1)'(dir.field);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_FETCH;
      pc        <= '0;
      mbr       <= '0;
      mbr_valid <= 1'b0;
      ihr       <= 1'b0;
      dar       <= '0;
      dcr       <= '0;
      half      <= 1'b0;
      lo_buf    <= '0;
      dir       <= '0;
      mmr       <= MM_MODELVIEW;
      sp_mv     <= '0;
      sp_pj     <= '0;
      color     <= {FX_ONE, FX_ONE, FX_ONE};
      chunk     <= '0;
      csr       <= CS_DOT3;
      cmd_valid <= 1'b0;
      cmd       <= '0;
      vp_x      <= '0;
      vp_y      <= '0;
      vp_w      <= fx_from_int(320);
      vp_h      <= fx_from_int(240);
    end else begin
      // Server writes update the memory bound register.
      if (srv_wen) begin
        mbr       <= srv_waddr;
        mbr_valid <= 1'b1;
        ihr       <= (srv_waddr == AW'(IMEM_DEPTH - 1));
      end

      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;

      if (!freeze) begin
        unique case (state)
          S_FETCH: begin
            half <= 1'b0;
            if (pc[AW]) begin
              // whole memory consumed: start over from address 0
              pc        <= '0;
              mbr_valid <= 1'b0;
              ihr       <= 1'b0;
            end else if (avail(pc)) begin
              state <= S_DEC;
            end
          end

          S_DEC: begin
            if (cur.is_data) begin
              dir   <= cur;
              chunk <= '0;
              if (cur.field == 0) begin
                pc    <= pc + 1'b1;
                state <= S_FETCH;
              end else if (avail(pc + (AW+1)'(cur.field))) begin
                dar   <= pc + 1'b1;
                dcr   <= cur.field;
                state <= S_DWAIT;
                unique case (cur.opcode)
                  OPC_ROTATE:    csr <= CS_ROTATE;
                  OPC_SCALE:     csr <= CS_SCALE;
                  OPC_TRANSLATE: csr <= CS_TRANSLATE;
                  OPC_MULTMATRIX:csr <= CS_DOT4;
                  default:       csr <= CS_DOT3;
                endcase
              end
            end else begin
              // immediate instruction
              unique case (cur.opcode)
                OPC_BEGIN: begin
                  cmd_valid <= 1'b1;
                  cmd       <= mk_cmd(CMD_BEGIN, '0);
                end
                OPC_END: begin
                  cmd_valid <= 1'b1;
                  cmd       <= mk_cmd(CMD_END, '0);
                end
                OPC_LOADIDENT: if (is_mv || is_pj) begin
                  cmd_valid <= 1'b1;
                  cmd       <= mk_cmd(CMD_LOADIDENT, '0);
                end
                OPC_MATRIXMODE: mmr <= cur.field[2:0];
                OPC_PUSHMATRIX: begin
                  if (is_mv && int'(sp_mv) + 8 <= MV_ROWS) begin
                    cmd_valid <= 1'b1;
                    cmd       <= mk_cmd(CMD_PUSH, '0);
                    sp_mv     <= sp_mv + 8'd4;
                  end else if (is_pj && int'(sp_pj) + 8 <= PJ_ROWS) begin
                    cmd_valid <= 1'b1;
                    cmd       <= mk_cmd(CMD_PUSH, '0);
                    sp_pj     <= sp_pj + 4'd4;
                  end
                end
                OPC_POPMATRIX: begin
                  if (is_mv && sp_mv >= 8'd4) sp_mv <= sp_mv - 8'd4;
                  if (is_pj && sp_pj >= 4'd4) sp_pj <= sp_pj - 4'd4;
                end
                default: ;
              endcase
              // second instruction in the lower half?
              if (!half && dout[15:0] != INSTR_NOP) begin
                half   <= 1'b1;
                lo_buf <= dout[15:0];
              end else begin
                half  <= 1'b0;
                pc    <= pc + 1'b1;
                state <= S_FETCH;
              end
            end
          end

          S_DWAIT: state <= S_DATA;

          S_DATA: begin
            logic done_chunk;
            done_chunk = 1'b1;
            unique case (dir.opcode)
              OPC_VERTEX: begin
                cmd_valid <= 1'b1;
                cmd       <= mk_cmd(CMD_VERTEX, {dout4, dout3, dout2, dout1}, chunk);
              end
              OPC_COLOR: color <= {dout3, dout2, dout1};
              OPC_LOADMATRIX: if (is_mv || is_pj) begin
                cmd_valid <= 1'b1;
                cmd       <= mk_cmd(CMD_LOADROW, {dout4, dout3, dout2, dout1}, chunk);
              end
              OPC_MULTMATRIX: if (is_mv || is_pj) begin
                cmd_valid <= 1'b1;
                cmd       <= mk_cmd(CMD_MULTROW, {dout4, dout3, dout2, dout1}, chunk);
              end
              OPC_ROTATE: if (is_mv || is_pj) begin
                cmd_valid <= 1'b1;
                cmd       <= mk_cmd(CMD_ROTATE, {dout4, dout3, dout2, dout1}, chunk);
              end
              OPC_SCALE: if (is_mv || is_pj) begin
                cmd_valid <= 1'b1;
                cmd       <= mk_cmd(CMD_SCALE, {dout4, dout3, dout2, dout1}, chunk);
              end
              OPC_TRANSLATE: if (is_mv || is_pj) begin
                cmd_valid <= 1'b1;
                cmd       <= mk_cmd(CMD_TRANSLATE, {dout4, dout3, dout2, dout1}, chunk);
              end
              OPC_VIEWPORT: begin
                if (tu_idle && !cmd_valid) begin
                  vp_x <= dout1;
                  vp_y <= dout2;
                  vp_w <= dout3;
                  vp_h <= dout4;
                end else begin
                  done_chunk = 1'b0;
                end
              end
              default: ;
            endcase
            if (done_chunk) begin
              chunk <= chunk + 1'b1;
              if (dcr > 7'd4) begin
                dcr   <= dcr - 7'd4;
                dar   <= dar + (AW+1)'(4);
                state <= S_DWAIT;
              end else begin
                pc    <= pc_after;
                state <= S_FETCH;
              end
            end
          end

          default: state <= S_FETCH;
        endcase
      end
    end
  end

endmodule

// tb_fetch_decode: a host model writes a program into a 64-word
// instruction memory (so that the memory fills, the halt signal is raised and
// the memory is refilled from address 0), while a consumer takes commands
// with random back-pressure. The commands are compared one by one with the
// list expected from the ISA: opcodes, stack selection, stack pointers after
// pushes and pops (including an ignored overflow and underflow), packed
// instruction pairs, multi-word arguments split into groups of four, the
// current colour attached to a vertex and the viewport registers.
// Timing: 10 ns clock; a watchdog ends the run after 2 ms of simulated time.
// The program, the ISA fields and the memory behaviour (halt at the last
// word, refill from 0) follow the original design; the 64-word memory, the
// filler code and the ignored stack overflow are this design's choices.
module tb_fetch_decode;
  import gpu_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic srv_wen = 0, instr_halt, cmd_valid, cmd_ready = 0, tu_idle = 1, stalled;
  logic [5:0] srv_waddr = 0;
  logic [31:0] srv_din = 0;
  gpu_cmd_t cmd;
  fx_t vp_x, vp_y, vp_w, vp_h;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fetch_decode #(.IMEM_DEPTH(DEPTH), .MV_ROWS(128), .PJ_ROWS(8)) dut (.*);

  // ------------------------------------------------------------ program
  logic [31:0] prog [$];
  function automatic logic [15:0] imm(logic [7:0] opc, logic [6:0] f = 0);
    return {1'b0, f, opc};
  endfunction
  function automatic logic [15:0] dat(logic [7:0] opc, int n);
    return {1'b1, 7'(n), opc};
  endfunction
  function automatic fx_t fx(real r);
    return fx_t'($rtoi(r * 2048.0));
  endfunction

  typedef struct {
    cmd_op_e op; logic ssel; int spmv; int sppj; int chunk; int nd;
    fx_t d [4]; cs_e cs; fx_t col0;
  } exp_t;
  exp_t expq [$];

  function automatic void ex(cmd_op_e op, logic ssel, int spmv, int sppj,
                             int chunk = 0, int nd = 0, fx_t d0 = 0, fx_t d1 = 0,
                             fx_t d2 = 0, fx_t d3 = 0, cs_e cs = CS_DOT3, fx_t col0 = 0);
    exp_t e;
    e.op = op; e.ssel = ssel; e.spmv = spmv; e.sppj = sppj; e.chunk = chunk; e.nd = nd;
    e.d[0] = d0; e.d[1] = d1; e.d[2] = d2; e.d[3] = d3; e.cs = cs; e.col0 = col0;
    expq.push_back(e);
  endfunction

  localparam logic [31:0] FILL = {INSTR_NOP, INSTR_NOP};

  initial begin
    // ---- first memory load
    prog.push_back({imm(OPC_MATRIXMODE, 7'(MM_PROJECTION)), imm(OPC_LOADIDENT)});
    ex(CMD_LOADIDENT, 1, 0, 0);
    prog.push_back({imm(OPC_PUSHMATRIX), INSTR_NOP});
    ex(CMD_PUSH, 1, 0, 0);
    prog.push_back({dat(OPC_SCALE, 3), INSTR_NOP});
    prog.push_back(fx(1.0)); prog.push_back(fx(2.0)); prog.push_back(fx(3.0));
    ex(CMD_SCALE, 1, 0, 4, 0, 3, fx(1.0), fx(2.0), fx(3.0), 0, CS_SCALE);
    prog.push_back({imm(OPC_MATRIXMODE, 7'(MM_MODELVIEW)), imm(OPC_POPMATRIX)});
    prog.push_back({imm(OPC_PUSHMATRIX), imm(OPC_PUSHMATRIX)});
    ex(CMD_PUSH, 0, 0, 4);
    ex(CMD_PUSH, 0, 4, 4);
    prog.push_back({imm(OPC_POPMATRIX), INSTR_NOP});
    prog.push_back({dat(OPC_COLOR, 4), INSTR_NOP});
    prog.push_back(fx(0.25)); prog.push_back(fx(0.5)); prog.push_back(fx(0.75)); prog.push_back(fx(1.0));
    prog.push_back({imm(OPC_BEGIN, IMM_TRIANGLES), INSTR_NOP});
    ex(CMD_BEGIN, 0, 4, 4);
    prog.push_back({dat(OPC_VERTEX, 4), INSTR_NOP});
    prog.push_back(fx(10.0)); prog.push_back(fx(-20.0)); prog.push_back(fx(0.5)); prog.push_back(fx(1.0));
    ex(CMD_VERTEX, 0, 4, 4, 0, 4, fx(10.0), fx(-20.0), fx(0.5), fx(1.0), CS_DOT3, fx(0.25));
    prog.push_back({dat(OPC_VIEWPORT, 4), INSTR_NOP});
    prog.push_back(fx(8.0)); prog.push_back(fx(16.0)); prog.push_back(fx(300.0)); prog.push_back(fx(200.0));
    prog.push_back({dat(OPC_LOADMATRIX, 16), INSTR_NOP});
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 4; k++) prog.push_back(fx(real'(r * 4 + k)));
      ex(CMD_LOADROW, 0, 4, 4, r, 4, fx(r * 4 + 0), fx(r * 4 + 1), fx(r * 4 + 2), fx(r * 4 + 3));
    end
    prog.push_back({dat(OPC_ROTATE, 2), INSTR_NOP});
    prog.push_back(fx(0.5)); prog.push_back(fx(0.866));
    ex(CMD_ROTATE, 0, 4, 4, 0, 2, fx(0.5), fx(0.866), 0, 0, CS_ROTATE);
    prog.push_back({imm(OPC_END), INSTR_NOP});
    ex(CMD_END, 0, 4, 4);
    while (prog.size() < DEPTH) prog.push_back(FILL);
    // ---- second memory load, after the wrap
    prog.push_back({imm(OPC_MATRIXMODE, 7'(MM_PROJECTION)), imm(OPC_PUSHMATRIX)}); // full: ignored
    prog.push_back({dat(OPC_TRANSLATE, 3), INSTR_NOP});
    prog.push_back(fx(-1.0)); prog.push_back(fx(2.5)); prog.push_back(fx(4.0));
    ex(CMD_TRANSLATE, 1, 4, 4, 0, 3, fx(-1.0), fx(2.5), fx(4.0), 0, CS_TRANSLATE);
    prog.push_back({dat(OPC_MULTMATRIX, 16), INSTR_NOP});
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 4; k++) prog.push_back(fx(real'(-r - k)));
      ex(CMD_MULTROW, 1, 4, 4, r, 4, fx(-r), fx(-r - 1), fx(-r - 2), fx(-r - 3), CS_DOT4);
    end
    prog.push_back({imm(OPC_END), imm(OPC_BEGIN)});
    ex(CMD_END, 1, 4, 4);
    ex(CMD_BEGIN, 1, 4, 4);
  end

  // --------------------------------------------------------- host model
  int halts_seen = 0, wraps = 0;
  initial begin
    int i = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (i < prog.size()) begin
      @(negedge clk);
      if (!instr_halt) begin
        srv_wen = 1; srv_waddr = 6'(i % DEPTH); srv_din = prog[i];
        if (i > 0 && (i % DEPTH) == 0) wraps++;
        i++;
      end else begin
        srv_wen = 0;
        halts_seen++;
      end
    end
    @(negedge clk) srv_wen = 0;
  end

  // ----------------------------------------------------------- consumer
  int ncmd = 0, stall_cycles = 0;
  always @(posedge clk) begin
    if (stalled) stall_cycles++;
    if (cmd_valid && cmd_ready) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected command %s", cmd.op.name());
      end else begin
        bit bad;
        e = expq.pop_front();
        bad = (cmd.op != e.op) || (cmd.stack_sel != e.ssel) || (int'(cmd.sp_mv) != e.spmv) ||
              (int'(cmd.sp_pj) != e.sppj) || (int'(cmd.chunk) != e.chunk);
        for (int k = 0; k < e.nd; k++) if (cmd.data[k] != e.d[k]) bad = 1;
        if (e.op inside {CMD_SCALE, CMD_TRANSLATE, CMD_ROTATE, CMD_MULTROW} && cmd.cs != e.cs) bad = 1;
        if (e.op == CMD_VERTEX && cmd.color[0] != e.col0) bad = 1;
        if (bad) begin
          failures++;
          $display("FAIL cmd %0d: got %s ssel=%0d mv=%0d pj=%0d chunk=%0d d0=%0d, exp %s",
                   ncmd, cmd.op.name(), cmd.stack_sel, cmd.sp_mv, cmd.sp_pj, cmd.chunk,
                   cmd.data[0], e.op.name());
        end
      end
      ncmd++;
    end
    cmd_ready <= ($urandom_range(0, 3) == 0);
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (rst_n);
    while (expq.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (vp_x != fx(8.0) || vp_y != fx(16.0) || vp_w != fx(300.0) || vp_h != fx(200.0)) begin
      failures++;
      $display("FAIL viewport registers");
    end
    checks++;
    if (halts_seen == 0 || wraps == 0) begin
      failures++;
      $display("FAIL halt never seen (%0d) or no wrap (%0d)", halts_seen, wraps);
    end
    checks++;
    if (stall_cycles == 0) begin
      failures++;
      $display("FAIL decode never stalled");
    end
    $display("halt cycles %0d, stall cycles %0d", halts_seen, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

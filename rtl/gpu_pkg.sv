// gpu_pkg: types and constants shared by the whole graphics pipeline.
//
// Number format: every datapath value is a 32-bit fixed-point number with a
// sign bit (31), 20 integer bits (30..11) and 11 fraction bits (10..0), so the
// largest integer is 2^20-1 and the smallest step 2^-11. The format is held
// in two's complement here; that encoding is this design's choice.
//
// Instruction format (16 bits): bit 15 is the type (0 = immediate, 1 = data),
// bits 14..8 carry the immediate value or the number of 32-bit data words
// that follow the instruction, bits 7..0 are the opcode. Two instructions may
// share one 32-bit instruction memory word; the upper half is executed first.
// A lower half equal to INSTR_NOP (an immediate with the unused opcode 0xFF)
// is filler and is skipped; in the upper half it does nothing (this filler code
// is this design's choice).
//
// The command and vertex structs below are the hand-off formats between the
// decode stage, the transform unit, the vertex buffer and the rasterizer.
package gpu_pkg;

  typedef logic signed [31:0] fx_t;

  localparam int FX_FRAC = 11;
  localparam fx_t FX_ONE  = 32'sh0000_0800;   // 1.0
  localparam fx_t FX_HALF = 32'sh0000_0400;   // 0.5
  localparam fx_t FX_ZERO = 32'sh0000_0000;
  localparam fx_t FX_MAX  = 32'sh7FFF_FFFF;
  localparam fx_t FX_MIN  = -32'sh7FFF_FFFF;

  // Colour threshold: an interpolated channel above this value lights its bit.
  localparam fx_t COLOR_THRESHOLD = 32'sh0000_0170;

  // Opcodes (bits 7..0 of an instruction).
  localparam logic [7:0] OPC_BEGIN      = 8'b0000_0000;
  localparam logic [7:0] OPC_END        = 8'b0000_0001;
  localparam logic [7:0] OPC_VERTEX     = 8'b1000_0000;
  localparam logic [7:0] OPC_COLOR      = 8'b0100_0000;
  localparam logic [7:0] OPC_LOADIDENT  = 8'b0001_0000;
  localparam logic [7:0] OPC_LOADMATRIX = 8'b0001_0001;
  localparam logic [7:0] OPC_MATRIXMODE = 8'b0001_0010;
  localparam logic [7:0] OPC_MULTMATRIX = 8'b0001_0011;
  localparam logic [7:0] OPC_POPMATRIX  = 8'b0001_0100;
  localparam logic [7:0] OPC_PUSHMATRIX = 8'b0001_0101;
  localparam logic [7:0] OPC_ROTATE     = 8'b0001_1000;
  localparam logic [7:0] OPC_SCALE      = 8'b0001_1001;
  localparam logic [7:0] OPC_TRANSLATE  = 8'b0001_1010;
  localparam logic [7:0] OPC_VIEWPORT   = 8'b0001_1011;

  localparam logic [15:0] INSTR_NOP = 16'h00FF;   // immediate, unused opcode

  // glBegin / glMatrixMode immediate values.
  localparam logic [6:0] IMM_TRIANGLES  = 7'b000_0000;
  localparam logic [2:0] MM_MODELVIEW   = 3'b001;
  localparam logic [2:0] MM_PROJECTION  = 3'b010;
  localparam logic [2:0] MM_TEXTURE     = 3'b100;

  // Matrix stack geometry: one row = four fx_t values.
  localparam int MV_DEPTH_MATS   = 32;
  localparam int PROJ_DEPTH_MATS = 2;

  typedef struct packed {
    logic       is_data;   // bit 15
    logic [6:0] field;     // bits 14..8
    logic [7:0] opcode;    // bits 7..0
  } instr_t;

  // Operation selected for the shared row-compute array (the value held in
  // the compute select register).
  typedef enum logic [3:0] {
    CS_DOT3      = 4'd0,   // m . (d0,d1,d2,1): vertex model-view transform
    CS_SCALE     = 4'd1,
    CS_TRANSLATE = 4'd2,
    CS_ROTATE    = 4'd3,
    CS_DOT4      = 4'd4    // m . (d0,d1,d2,d3): one element of glMultMatrix
  } cs_e;

  // Commands from decode to the transform unit.
  typedef enum logic [3:0] {
    CMD_BEGIN, CMD_END, CMD_VERTEX, CMD_LOADIDENT, CMD_LOADROW,
    CMD_MULTROW, CMD_PUSH, CMD_ROTATE, CMD_SCALE, CMD_TRANSLATE
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e    op;
    cs_e        cs;          // compute select code for the shared array
    logic       stack_sel;   // 0 = model-view, 1 = projection
    logic [7:0] sp_mv;       // row address of the top model-view matrix
    logic [3:0] sp_pj;       // row address of the top projection matrix
    logic [1:0] chunk;       // which 4-word group of a 16-word argument
    fx_t [3:0]  data;        // data words, data[0] first in memory
    fx_t [2:0]  color;       // current colour (r,g,b) for a vertex
  } gpu_cmd_t;

  // Items from the transform unit to the vertex buffer.
  typedef enum logic [1:0] { VK_VERTEX, VK_BEGIN, VK_END } vkind_e;

  typedef struct packed {
    vkind_e    kind;
    fx_t [2:0] pos;      // window x, y, z
    fx_t [2:0] color;    // r, g, b
  } vtx_t;

  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return fx_t'(p >>> FX_FRAC);
  endfunction

  function automatic fx_t fx_add(fx_t a, fx_t b);
    return a + b;
  endfunction

  function automatic fx_t fx_from_int(int i);
    return fx_t'(i <<< FX_FRAC);
  endfunction

endpackage

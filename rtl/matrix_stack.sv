// matrix_stack: block-RAM storage for one OpenGL matrix stack.
//
// Each entry is one matrix row of four Q20.11 values (16 bytes); a 4x4
// matrix occupies four consecutive rows, and the stack pointer held by the
// decode stage is the row address of the top matrix. The model-view stack is
// 32 matrices (128 rows, 2 KB) and the projection stack 2 matrices (8 rows).
// One synchronous read port (data one clock after raddr) and one write
// port, so a row can be copied to another address every cycle (push).
// Contents are not reset; the transform unit writes the identity into the
// bottom matrix after reset.
module matrix_stack
  import gpu_pkg::*;
#(
  parameter int ROWS = 128,
  parameter int AW   = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output fx_t [3:0]     rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  fx_t [3:0]     wdata
);
  fx_t [3:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

// instr_bram: the instruction memory, 32 bits wide and 4096 words deep
// (16 KB), with one write port and five read ports.
//
// The write port (waddr/din/wen) is driven by the host-side server, which
// stores one 32-bit word per cycle. Read port addr/dout serves the fetch
// stage. Read port addr2 serves the decode stage and returns four
// consecutive words, dout1..dout4 = mem[addr2 .. addr2+3], so that four
// fixed-point arguments arrive together (addresses wrap at the end of the
// memory). All reads are synchronous: data appears one clock after the
// address, as in an FPGA block RAM; a read of the word written in the same
// cycle returns the old contents. On an FPGA the five read ports would be
// built from replicated block RAMs; here the memory is one array.
module instr_bram #(
  parameter int DEPTH = 4096,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wen,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   din,
  input  logic [AW-1:0] addr,
  output logic [31:0]   dout,
  input  logic [AW-1:0] addr2,
  output logic [31:0]   dout1,
  output logic [31:0]   dout2,
  output logic [31:0]   dout3,
  output logic [31:0]   dout4
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wen) mem[waddr] <= din;
    dout  <= mem[addr];
    dout1 <= mem[addr2];
    dout2 <= mem[AW'(addr2 + AW'(1))];
    dout3 <= mem[AW'(addr2 + AW'(2))];
    dout4 <= mem[AW'(addr2 + AW'(3))];
  end
endmodule

// fxp_div: fully pipelined divider for the 32-bit Q20.11 fixed-point format.
//
// q = (a * 2^11) / b, signed, with a throughput of one division per clock
// and a latency of eight clocks (the divider is eight stages deep, as the
// fixed-point library of the pipeline specifies). Stage 1 registers the
// signs and magnitudes; stages 2..8 each retire six quotient bits of a
// restoring division of the 42-bit scaled dividend (7 x 6 = 42 bits); the
// sign is applied to the stage-8 register at the output. A quotient that
// does not fit, and any division by zero, saturates to +/- FX_MAX (this
// design's choice). The result is truncated toward zero.
//
// Interface: in_valid qualifies a/b, out_valid qualifies q eight clocks
// later. There is no stall input; the pipeline always advances.
module fxp_div
  import gpu_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  a,
  input  fx_t  b,
  output logic out_valid,
  output fx_t  q
);
  localparam int NSTEP  = 7;        // iterative stages
  localparam int BPS    = 6;        // quotient bits per stage
  localparam int DW     = NSTEP * BPS;   // 42-bit dividend / quotient

  typedef struct packed {
    logic          valid;
    logic          neg;
    logic          dz;
    logic [DW-1:0] rem_num;   // dividend bits not yet consumed (MSB first)
    logic [31:0]   den;       // divisor magnitude
    logic [32:0]   rem;       // partial remainder
    logic [DW-1:0] quo;       // quotient bits so far
  } stage_t;

  stage_t st [NSTEP+1];

  // Stage 1: magnitudes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
    end else begin
      st[0].valid   <= in_valid;
      st[0].neg     <= a[31] ^ b[31];
      st[0].dz      <= (b == 0);
      st[0].rem_num <= DW'({a[31] ? 32'(-a) : 32'(a)}) << FX_FRAC;
      st[0].den     <= b[31] ? 32'(-b) : 32'(b);
      st[0].rem     <= '0;
      st[0].quo     <= '0;
    end
  end

  // Stages 2..8: six restoring-division steps each.
  for (genvar s = 0; s < NSTEP; s++) begin : g_step
    stage_t nxt;
    always_comb begin
      nxt = st[s];
      for (int i = 0; i < BPS; i++) begin
        nxt.rem     = {nxt.rem[31:0], nxt.rem_num[DW-1]};
        nxt.rem_num = nxt.rem_num << 1;
        if (nxt.rem >= {1'b0, nxt.den}) begin
          nxt.rem = nxt.rem - {1'b0, nxt.den};
          nxt.quo = {nxt.quo[DW-2:0], 1'b1};
        end else begin
          nxt.quo = {nxt.quo[DW-2:0], 1'b0};
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st[s+1] <= '0;
      else        st[s+1] <= nxt;
    end
  end

  logic [DW-1:0] qmag;
  always_comb begin
    qmag      = st[NSTEP].quo;
    out_valid = st[NSTEP].valid;
    if (st[NSTEP].dz || qmag > DW'(FX_MAX))
      q = st[NSTEP].neg ? FX_MIN : FX_MAX;
    else
      q = st[NSTEP].neg ? -fx_t'(qmag[30:0]) : fx_t'(qmag[30:0]);
  end
endmodule

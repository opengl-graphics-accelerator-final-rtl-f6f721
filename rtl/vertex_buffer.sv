// vertex_buffer: the bridge between the transform unit and the rasterizer.
//
// A pixel buffer (window x, y, z of three vertices) and a colour buffer
// (r, g, b of the same three vertices) are filled through the address
// registers PBAR and CBAR, which advance together with every vertex. When
// the third vertex is in, the triangle is offered to the rasterizer
// (tri_valid) and both address registers return to 0 once it is taken; until
// then no further vertex is accepted, so a slow rasterizer stalls the
// transform unit and everything before it.
//
// Markers: glBegin resets PBAR/CBAR. glEnd is passed to the rasterizer
// (end_valid/end_ready) once no triangle is waiting; a triangle left
// incomplete by glEnd is dropped (this design's choice).
//
// Timing: a vertex is accepted in the cycle in_valid and in_ready are both
// high; tri_valid rises the cycle after the third vertex is accepted.
module vertex_buffer
  import gpu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  vtx_t            in,
  output logic            tri_valid,
  input  logic            tri_ready,
  output fx_t [2:0][2:0]  tri_pos,   // [vertex][x, y, z]
  output fx_t [2:0][2:0]  tri_col,   // [vertex][r, g, b]
  output logic            end_valid,
  input  logic            end_ready
);
  logic [1:0] pbar, cbar;
  logic       end_pending;

  assign tri_valid = (pbar == 2'd3);
  assign end_valid = end_pending && !tri_valid;
  assign in_ready  = !tri_valid && !end_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pbar        <= '0;
      cbar        <= '0;
      end_pending <= 1'b0;
      tri_pos     <= '0;
      tri_col     <= '0;
    end else begin
      if (tri_valid && tri_ready) begin
        pbar <= '0;
        cbar <= '0;
      end
      if (end_valid && end_ready) end_pending <= 1'b0;
      if (in_valid && in_ready) begin
        unique case (in.kind)
          VK_VERTEX: begin
            tri_pos[pbar] <= in.pos;
            tri_col[cbar] <= in.color;
            pbar <= pbar + 1'b1;
            cbar <= cbar + 1'b1;
          end
          VK_BEGIN: begin
            pbar <= '0;
            cbar <= '0;
          end
          VK_END: begin
            pbar        <= '0;
            cbar        <= '0;
            end_pending <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end
endmodule

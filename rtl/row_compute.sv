// row_compute: the shared fixed-point array that updates one matrix row per
// clock and also performs the model-view part of the vertex transform.
//
// Four multipliers feed a two-level adder tree (two adders, then one). Input
// multiplexers pick each multiplier's operands from the current matrix row
// M[0..3] and the instruction data D[0..3]; output multiplexers choose, per
// column, between the old value M[i] and a computed value, giving the row
// that is written back to the stack. The operation (the compute select code):
//
//   CS_DOT3      dot = M0*D0 + M1*D1 + M2*D2 + M3*1   (point with w = 1)
//   CS_TRANSLATE row = {M0, M1, M2, M0*tx + M1*ty + M2*tz + M3}
//   CS_SCALE     row = {M0*sx, M1*sy, M2*sz, M3}
//   CS_ROTATE    row = {M0*c + M1*s, M1*c - M0*s, M2, M3}, D0 = sin, D1 = cos
//                (rotation about the z axis; the first adder subtracts)
//   CS_DOT4      dot = M0*D0 + M1*D1 + M2*D2 + M3*D3  (vertex with its w,
//                                                       one element of M x T)
//
// The operand choices of the first four modes are those of the array's
// multiplexers; CS_DOT4 adds D3 as a third choice for the fourth multiplier
// so that glMultMatrix can reuse the array. Rows hold a matrix's rows, so
// applying T means new_row = row x T. Purely combinational.
module row_compute
  import gpu_pkg::*;
(
  input  cs_e       sel,
  input  fx_t [3:0] m,
  input  fx_t [3:0] d,
  output fx_t [3:0] row_out,
  output fx_t       dot
);
  fx_t [3:0] ma, mb, p;
  fx_t       s0a, s0b, s0, s1, s2;

  always_comb begin
    ma = m;
    mb = {FX_ONE, d[2], d[1], d[0]};
    case (sel)
      CS_ROTATE: begin
        ma = {m[1], m[0], m[1], m[0]};
        mb = {d[0], d[1], d[1], d[0]};
      end
      CS_DOT4: mb = d;
      default: ;
    endcase
  end

  for (genvar i = 0; i < 4; i++) begin : g_mul
    fxp_mul u_mul (.a(ma[i]), .b(mb[i]), .y(p[i]));
  end

  // The first adder subtracts p0 for the rotation.
  assign s0a = p[1];
  assign s0b = (sel == CS_ROTATE) ? -p[0] : p[0];
  fxp_add u_add0 (.a(s0a), .b(s0b), .y(s0));
  fxp_add u_add1 (.a(p[2]), .b(p[3]), .y(s1));
  fxp_add u_add2 (.a(s0),   .b(s1),   .y(s2));

  assign dot = s2;

  always_comb begin
    row_out = m;
    case (sel)
      CS_SCALE:     row_out = {m[3], p[2], p[1], p[0]};
      CS_TRANSLATE: row_out = {s2, m[2], m[1], m[0]};
      CS_ROTATE:    row_out = {m[3], m[2], s0, s1};
      default:      row_out = m;
    endcase
  end
endmodule

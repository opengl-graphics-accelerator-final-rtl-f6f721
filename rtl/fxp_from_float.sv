// fxp_from_float: combinational conversion of an IEEE-754 single-precision
// number to the 32-bit Q20.11 fixed-point format.
//
// The 24-bit significand (hidden one restored) is shifted by (exponent - 139),
// which places its binary point at bit 11. Fraction bits below 2^-11 are
// truncated toward zero; magnitudes of 2^20 and above, infinities and NaNs
// saturate to the largest representable value of the right sign; zeros and
// denormals give 0. The rounding and saturation rules are this design's
// choice.
module fxp_from_float
  import gpu_pkg::*;
(
  input  logic [31:0] f,
  output fx_t         y
);
  logic        sgn;
  logic [7:0]  expo;
  logic [23:0] mant;
  logic [31:0] mag;
  int          sh;

  always_comb begin
    sgn  = f[31];
    expo = f[30:23];
    mant = {1'b1, f[22:0]};
    sh   = int'(expo) - 139;
    mag  = '0;
    if (expo == 8'd0) begin
      mag = '0;
    end else if (expo == 8'hFF || sh >= 8) begin
      mag = 32'h7FFF_FFFF;
    end else if (sh >= 0) begin
      mag = {8'b0, mant} << sh;
    end else if (sh > -24) begin
      mag = {8'b0, mant} >> (-sh);
    end else begin
      mag = '0;
    end
    y = sgn ? -fx_t'(mag) : fx_t'(mag);
  end
endmodule

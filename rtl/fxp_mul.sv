// fxp_mul: combinational multiplier for the 32-bit Q20.11 fixed-point format.
//
// The full 64-bit signed product is formed and shifted right by the 11
// fraction bits (an arithmetic shift, so the result is rounded toward minus
// infinity); the low 32 bits are returned, i.e. the product wraps when its
// magnitude exceeds the format. Purely combinational.
// An asynchronous multiplier is what the original design specifies; the
// rounding and overflow behaviour are this design's choices.
module fxp_mul
  import gpu_pkg::*;
(
  input  fx_t a,
  input  fx_t b,
  output fx_t y
);
  assign y = fx_mul(a, b);
endmodule

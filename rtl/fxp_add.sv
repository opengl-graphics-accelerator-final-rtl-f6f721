// fxp_add: combinational adder for the 32-bit Q20.11 fixed-point format.
//
// y = a + b in two's complement. The sum wraps on overflow; the pipeline's
// coordinates and colours stay far inside the 2^20 integer range, so no
// saturation logic is spent here (this design's choice). Purely
// combinational: the result is valid in the same cycle as the operands.
// The format (sign, 20 integer bits, 11 fraction bits) and the
// asynchronous adder follow the original design; wrapping is this design's.
module fxp_add
  import gpu_pkg::*;
(
  input  fx_t a,
  input  fx_t b,
  output fx_t y
);
  assign y = fx_add(a, b);
endmodule

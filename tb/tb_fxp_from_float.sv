// tb_fxp_from_float: converts single-precision values and compares with the
// real value times 2^11 truncated toward zero (saturated when too large).
// The converter is combinational. Inputs are fixed corner cases (zero,
// signs, tiny, huge) and random values across 22 binary orders of magnitude;
// a watchdog ends the run after 100 us. The converter is named in the
// original library; truncation and saturation are this design's choices.
module tb_fxp_from_float;
  import gpu_pkg::*;
  logic [31:0] f;
  fx_t y;
  int checks = 0, failures = 0;
  fxp_from_float dut (.f(f), .y(y));

  // Encodes r as an IEEE-754 single (significand truncated) and returns
  // the exact value of that single in sr.
  function automatic logic [31:0] to_f32(real r, output real sr);
    real a;
    int  e;
    longint mant;
    if (r == 0.0) begin sr = 0.0; return 32'h0; end
    a = (r < 0.0) ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    mant = longint'($floor((a - 1.0) * 8388608.0));
    sr = (1.0 + real'(mant) / 8388608.0) * (2.0 ** e);
    if (r < 0.0) sr = -sr;
    return {r < 0.0, 8'(e + 127), 23'(mant)};
  endfunction

  task automatic check(real r);
    real sr, scaled;
    fx_t e;
    f = to_f32(r, sr);
    #1;
    scaled = sr * 2048.0;
    if (scaled >= 2147483647.0) e = FX_MAX;
    else if (scaled <= -2147483647.0) e = FX_MIN;
    else e = fx_t'($rtoi(scaled));
    checks++;
    if (y != e) begin
      failures++;
      $display("FAIL cvt %f -> %0d exp %0d", sr, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0.0); check(1.0); check(-1.0); check(0.5); check(3.14159);
    check(-1234.5678); check(1.0e-5); check(2.0e6); check(-5.0e7); check(1048575.0);
    for (int i = 0; i < 300; i++)
      check((real'($urandom) / 4294967296.0 - 0.5) * (2.0 ** $urandom_range(0, 22)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

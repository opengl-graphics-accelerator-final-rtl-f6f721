// tb_row_compute: drives every operation of the shared array with random
// matrix rows and data and compares with the row update (or dot product)
// computed here from the matrix algebra, each product rounded down to the
// 2^-11 grid as the multipliers do.
// The array is combinational; each case applies random rows and data from
// $urandom and reads the result after a short delay. A watchdog ends the
// run after 100 us. Four multipliers and three adders per row follow the
// original design; the operand routing of each mode (and rotation about z)
// is worked out here from the matrix algebra.
module tb_row_compute;
  import gpu_pkg::*;
  cs_e sel;
  fx_t [3:0] m, d, row_out;
  fx_t dot;
  int checks = 0, failures = 0;
  row_compute dut (.*);

  function automatic fx_t pm(fx_t a, fx_t b);
    return fx_t'($rtoi($floor(real'(a) * real'(b) / 2048.0)));
  endfunction

  task automatic expect_row(fx_t [3:0] e, string what);
    checks++;
    if (row_out !== e) begin
      failures++;
      $display("FAIL %s row %p exp %p", what, row_out, e);
    end
  endtask
  task automatic expect_dot(fx_t e, string what);
    checks++;
    if (dot !== e) begin
      failures++;
      $display("FAIL %s dot %0d exp %0d", what, dot, e);
    end
  endtask

  function automatic fx_t rnd();
    return fx_t'(int'($urandom_range(0, 400000)) - 200000);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      for (int k = 0; k < 4; k++) begin m[k] = rnd(); d[k] = rnd(); end
      sel = CS_DOT3; #1;
      expect_dot(pm(m[0], d[0]) + pm(m[1], d[1]) + pm(m[2], d[2]) + m[3], "dot3");
      sel = CS_DOT4; #1;
      expect_dot(pm(m[0], d[0]) + pm(m[1], d[1]) + pm(m[2], d[2]) + pm(m[3], d[3]), "dot4");
      sel = CS_SCALE; #1;
      expect_row({m[3], pm(m[2], d[2]), pm(m[1], d[1]), pm(m[0], d[0])}, "scale");
      sel = CS_TRANSLATE; #1;
      expect_row({pm(m[0], d[0]) + pm(m[1], d[1]) + pm(m[2], d[2]) + m[3], m[2], m[1], m[0]},
                 "translate");
      sel = CS_ROTATE; #1;   // d0 = sin, d1 = cos
      expect_row({m[3], m[2], pm(m[1], d[1]) - pm(m[0], d[0]),
                  pm(m[0], d[1]) + pm(m[1], d[0])}, "rotate");
    end
    // identity row rotated by 90 degrees: (1,0,0,0) -> (0,-1,0,0)
    m = {FX_ZERO, FX_ZERO, FX_ZERO, FX_ONE};
    d = {FX_ZERO, FX_ZERO, FX_ZERO, FX_ONE};
    sel = CS_ROTATE; #1;
    expect_row({FX_ZERO, FX_ZERO, -FX_ONE, FX_ZERO}, "rotate90");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fxp_mul: checks the fixed-point multiplier against the real product of
// the operands rounded down to the 2^-11 grid.
// The multiplier is combinational. Corner cases and random operands from
// $urandom are applied; a watchdog ends the run after 100 us. The Q20.11
// format follows the original design; keeping the product bits shifted
// right by 11 (rounding down) is this design's choice.
module tb_fxp_mul;
  import gpu_pkg::*;
  fx_t a, b, y;
  int checks = 0, failures = 0;
  fxp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(int ia, int ib);
    real p;
    longint e;
    a = fx_t'(ia);
    b = fx_t'(ib);
    #1;
    p = (real'(ia) / 2048.0) * (real'(ib) / 2048.0);
    e = longint'($floor(p * 2048.0));
    checks++;
    if (longint'(y) != e) begin
      failures++;
      $display("FAIL mul %0d * %0d -> %0d exp %0d", ia, ib, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(3072, 4096);        // 1.5 * 2.0
    check(-2048, 2048);       // -1 * 1
    check(1024, 1024);        // 0.5 * 0.5
    check(-3, 2048 * 100);
    check(1, 1);
    for (int i = 0; i < 300; i++)
      check(int'($urandom_range(0, 2000000)) - 1000000,
            int'($urandom_range(0, 2000000)) - 1000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

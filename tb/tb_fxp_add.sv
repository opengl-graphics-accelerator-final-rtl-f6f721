// tb_fxp_add: checks the fixed-point adder against sums of the operands'
// real values, for fixed corner cases and random operands.
// The adder is combinational: operands are applied, the sum is read after
// a short delay. Random operands come from $urandom; a watchdog ends the run
// after 100 us. The Q20.11 format follows the original design; wrap-around
// on overflow is this design's choice.
module tb_fxp_add;
  import gpu_pkg::*;
  fx_t a, b, y;
  int checks = 0, failures = 0;
  fxp_add dut (.a(a), .b(b), .y(y));

  task automatic check(real ra, real rb);
    real exp_r;
    a = fx_t'($rtoi(ra * 2048.0));
    b = fx_t'($rtoi(rb * 2048.0));
    #1;
    exp_r = (real'(a) + real'(b)) / 2048.0;
    checks++;
    if (real'(y) / 2048.0 != exp_r) begin
      failures++;
      $display("FAIL add %f + %f = %f", ra, rb, real'(y) / 2048.0);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1.5, 2.25);
    check(-3.0, 1.0);
    check(0.0, -0.00048828125);
    check(1000.5, -2000.25);
    for (int i = 0; i < 200; i++)
      check(real'($signed($urandom_range(0, 2000000)) - 1000000) / 64.0,
            real'($signed($urandom_range(0, 2000000)) - 1000000) / 64.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fxp_div: streams one division per clock into the pipelined divider and
// checks every quotient (the real quotient truncated toward zero, saturated
// at the format's limits) and that each result arrives exactly 8 clocks
// after its operands.
// Timing: 10 ns clock, one pair of operands per clock with random
// magnitudes from $urandom; a watchdog ends the run after 200 us. The 8-stage
// pipeline follows the original design; full precision and saturation are
// this design's choices.
module tb_fxp_div;
  import gpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  fx_t  a = 0, b = 0, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fxp_div dut (.*);

  localparam int N = 400;
  fx_t  va [N], vb [N];
  int   issue_cyc [N];
  int   cyc = 0, nout = 0;
  always @(posedge clk) cyc++;

  function automatic fx_t expect_q(fx_t x, fx_t y);
    real r;
    if (y == 0) return (x[31] ^ y[31]) ? FX_MIN : FX_MAX;
    r = real'(x) * 2048.0 / real'(y);
    if (r >= 2147483647.0) return FX_MAX;
    if (r <= -2147483647.0) return FX_MIN;
    return fx_t'($rtoi(r));
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    va[0] = 32'sd6144;  vb[0] = 32'sd2048;    // 3 / 1
    va[1] = -32'sd2048; vb[1] = 32'sd6144;    // -1 / 3
    va[2] = 32'sd1000;  vb[2] = 32'sd0;       // divide by zero
    va[3] = 32'sh4000_0000; vb[3] = 32'sd1;   // overflow
    va[4] = 32'sd7;     vb[4] = -32'sd4096;
    for (int i = 5; i < N; i++) begin
      va[i] = fx_t'($urandom) >>> ($urandom_range(0, 20));
      vb[i] = fx_t'($urandom) >>> ($urandom_range(4, 28));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1; a = va[i]; b = vb[i];
      issue_cyc[i] = cyc;
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != N) begin
      failures++;
      $display("FAIL got %0d results, expected %0d", nout, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    fx_t e;
    e = expect_q(va[nout], vb[nout]);
    checks++;
    if (q != e) begin
      failures++;
      $display("FAIL div %0d / %0d -> %0d exp %0d", va[nout], vb[nout], q, e);
    end
    checks++;
    if (cyc - issue_cyc[nout] != 8) begin
      failures++;
      $display("FAIL latency %0d", cyc - issue_cyc[nout]);
    end
    nout++;
  end
endmodule

// tb_matrix_stack: writes random rows and reads them back one clock after
// the address, including a read and a write in the same clock (row copy).
// Timing: 10 ns clock, one access per clock, random rows and addresses
// from $urandom; a watchdog ends the run after 200 us. One 128-bit row per
// entry and the 128-row depth follow the original design's stack sizes; the
// one-clock read latency is this design's choice.
module tb_matrix_stack;
  import gpu_pkg::*;
  logic clk = 0;
  logic [6:0] raddr = 0, waddr = 0;
  logic we = 0;
  fx_t [3:0] rdata, wdata = '0;
  fx_t [3:0] model [128];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  matrix_stack dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      we = 1; waddr = 7'(i);
      for (int k = 0; k < 4; k++) wdata[k] = fx_t'($urandom);
      model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 200; i++) begin
      logic [6:0] r;
      r = 7'($urandom);
      @(negedge clk);
      raddr = r;
      // copy row r to row r^64 while reading
      if (i > 0 && (i % 5) == 0) begin
        we = 1; waddr = r ^ 7'd64; wdata = model[r];
        model[r ^ 7'd64] = model[r];
      end else we = 0;
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[r]) begin
        failures++;
        $display("FAIL row %0d", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

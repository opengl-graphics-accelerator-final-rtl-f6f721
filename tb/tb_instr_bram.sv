// tb_instr_bram: fills the instruction memory through the write port and
// checks the fetch port and the four-word decode port, including the one
// clock read latency, against a copy kept by the testbench.
// Timing: 10 ns clock; the whole 4096-word memory is written with random
// words, then random addresses are read on both ports; a watchdog ends the
// run after 500 us. The size and the five read ports follow the original
// design; the synchronous read is this design's choice.
module tb_instr_bram;
  logic clk = 0;
  logic wen = 0;
  logic [11:0] waddr = 0, addr = 0, addr2 = 0;
  logic [31:0] din = 0, dout, dout1, dout2, dout3, dout4;
  int checks = 0, failures = 0;
  logic [31:0] model [4096];
  always #5 clk = ~clk;

  instr_bram dut (.*);

  task automatic expect_eq(logic [31:0] got, logic [31:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, e);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      wen = 1; waddr = 12'(i); din = $urandom; model[i] = din;
    end
    @(negedge clk) wen = 0;
    for (int i = 0; i < 300; i++) begin
      logic [11:0] a1, a2;
      a1 = 12'($urandom); a2 = 12'($urandom);
      @(negedge clk);
      addr = a1; addr2 = a2;
      @(posedge clk); #1;
      expect_eq(dout,  model[a1], "dout");
      expect_eq(dout1, model[a2], "dout1");
      expect_eq(dout2, model[12'(a2 + 1)], "dout2");
      expect_eq(dout3, model[12'(a2 + 2)], "dout3");
      expect_eq(dout4, model[12'(a2 + 3)], "dout4");
    end
    // simultaneous write and fetch of another word
    @(negedge clk);
    wen = 1; waddr = 12'd5; din = 32'hCAFE_F00D; addr = 12'd6; addr2 = 12'd4;
    @(posedge clk); #1;
    expect_eq(dout, model[6], "dout during write");
    wen = 0;
    @(negedge clk); addr = 12'd5;
    @(posedge clk); #1;
    expect_eq(dout, 32'hCAFE_F00D, "written word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vertex_buffer: sends vertices and glBegin/glEnd markers, and checks
// that triangles of three vertices come out in order with their colours,
// that input stalls while a triangle waits, that glBegin/glEnd discard a
// partial triangle and that glEnd is passed on after the last triangle.
// Timing: 10 ns clock; the triangle consumer is held at random with
// $urandom; a watchdog ends the run after 200 us. Grouping by three with
// the pointer registers follows the original design; dropping a partial
// triangle is this design's choice.
module tb_vertex_buffer;
  import gpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, tri_valid, tri_ready = 0, end_valid, end_ready = 0;
  vtx_t in;
  fx_t [2:0][2:0] tri_pos, tri_col;
  int checks = 0, failures = 0, stalls = 0, ntri = 0, nend = 0;
  always #5 clk = ~clk;
  vertex_buffer dut (.*);

  fx_t exp_q [$];

  task automatic send(vkind_e k, int tag);
    @(negedge clk);
    in_valid = 1;
    in.kind  = k;
    in.pos   = {fx_t'(tag * 3 + 2), fx_t'(tag * 3 + 1), fx_t'(tag * 3)};
    in.color = {fx_t'(tag + 300), fx_t'(tag + 200), fx_t'(tag + 100)};
    @(posedge clk);
    while (!in_ready) begin stalls++; @(posedge clk); end
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: takes a triangle every 7 clocks
  always @(posedge clk) begin
    tri_ready <= ($urandom_range(0, 6) == 0);
    end_ready <= 1'b1;
    if (tri_valid && tri_ready) begin
      for (int v = 0; v < 3; v++) begin
        fx_t e;
        e = exp_q.pop_front();
        checks++;
        if (tri_pos[v][0] != fx_t'(e * 3) || tri_pos[v][2] != fx_t'(e * 3 + 2) ||
            tri_col[v][1] != fx_t'(e + 200)) begin
          failures++;
          $display("FAIL triangle vertex %0d tag %0d", v, e);
        end
      end
      ntri++;
    end
    if (end_valid && end_ready) nend++;
  end

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(VK_BEGIN, 0);
    for (int t = 1; t <= 12; t++) begin
      exp_q.push_back(fx_t'(t));
      send(VK_VERTEX, t);
    end
    send(VK_VERTEX, 50);      // partial triangle, dropped by glBegin
    send(VK_BEGIN, 0);
    for (int t = 13; t <= 15; t++) begin
      exp_q.push_back(fx_t'(t));
      send(VK_VERTEX, t);
    end
    send(VK_VERTEX, 60);      // partial triangle, dropped by glEnd
    send(VK_END, 0);
    repeat (50) @(posedge clk);
    checks++;
    if (ntri != 5 || nend != 1 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL ntri=%0d nend=%0d left=%0d", ntri, nend, exp_q.size());
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL input never stalled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

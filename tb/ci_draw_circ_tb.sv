// ci_draw_circ_tb: draws circle outlines (small, large, radius 0 and 1, partly
// and wholly off-screen) into a 64 x 48 framebuffer in an SDRAM model and
// compares every byte of memory with a reference image from a midpoint-circle
// walk written in the testbench. With a never-stalling memory the run must
// take eight clocks per octant step plus one setup clock.
module ci_draw_circ_tb;
  import gfx_pkg::*;

  localparam int W = 64, H = 48;
  localparam int BASE = 256;
  localparam int MEMB = 4096;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  ci_req_t ci;
  logic ci_done, running;
  logic [31:0] ci_result;
  mm_req_t m_req;
  mm_rsp_t m_rsp;

  ci_draw_circ #(.W(W), .H(H)) dut (.clk, .rst, .ci, .ci_done, .ci_result, .running, .m_req, .m_rsp);
  sdram_model #(.WORDS(MEMB/2), .LATENCY(2)) mem (.clk, .rst, .req(m_req), .rsp(m_rsp));

  int checks = 0, failures = 0;
  logic [7:0] ref_img [MEMB];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic ci_op(input logic [1:0] n, input logic [31:0] a, input logic [31:0] b,
                       output int cycles);
    @(negedge clk);
    ci = '{start: 1'b1, n: n, dataa: a, datab: b};
    @(negedge clk);
    ci.start = 1'b0;
    cycles = 1;
    while (!ci_done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  function automatic void plot(int x, int y, logic [7:0] col);
    if (x >= 0 && x < W && y >= 0 && y < H) ref_img[BASE + y*W + x] = col;
  endfunction

  // Reference midpoint circle; returns the number of octant steps
  function automatic int ref_circle(int cx, int cy, int r, logic [7:0] col);
    int x, y, d, steps;
    x = r; y = 0; d = 1 - r; steps = 0;
    while (y <= x) begin
      plot(cx + x, cy + y, col); plot(cx - x, cy + y, col);
      plot(cx + x, cy - y, col); plot(cx - x, cy - y, col);
      plot(cx + y, cy + x, col); plot(cx - y, cy + x, col);
      plot(cx + y, cy - x, col); plot(cx - y, cy - x, col);
      steps++;
      y++;
      if (d < 0) d += 2*y + 1;
      else begin
        x--;
        d += 2*(y - x) + 1;
      end
    end
    return steps;
  endfunction

  task automatic draw(int cx, int cy, int r, logic [7:0] col, bit timed);
    int cyc, steps;
    ci_op(2'd0, 32'(BASE), {24'd0, col}, cyc);
    ci_op(2'd1, {16'(cy), 16'(cx)}, 32'(r), cyc);
    check(cyc == 1, "register write takes one cycle");
    ci_op(2'd2, 0, 0, cyc);
    steps = ref_circle(cx, cy, r, col);
    if (timed) check(cyc == 8*steps + 1, $sformatf("circle (%0d,%0d) r=%0d took %0d cycles, expected %0d",
                                                   cx, cy, r, cyc, 8*steps + 1));
    repeat (3) @(negedge clk);
    for (int i = 0; i < MEMB; i++)
      check(mem.peek(i) == ref_img[i], $sformatf("circle (%0d,%0d) r=%0d: byte %0d = %02x, expected %02x",
                                                 cx, cy, r, i, mem.peek(i), ref_img[i]));
  endtask

  initial begin
    ci = '0;
    repeat (3) @(negedge clk);   // memory is loaded once reset holds every engine idle
    for (int i = 0; i < MEMB; i++) begin
      ref_img[i] = 8'($urandom);
      mem.poke(i, ref_img[i]);
    end
    rst = 0;
    draw(32, 24, 10, 8'h01, 1);
    draw(32, 24, 23, 8'h02, 1);     // touches top and bottom edges
    draw(20, 20, 0, 8'h03, 1);
    draw(5, 5, 1, 8'h04, 1);
    draw(0, 0, 15, 8'h05, 1);       // three quarters off-screen
    draw(63, 40, 30, 8'h06, 1);     // mostly off-screen
    draw(-100, 10, 20, 8'h07, 1);   // wholly off-screen
    mem.wait_pct = 30;
    for (int k = 0; k < 8; k++)
      draw(int'($urandom % 80) - 8, int'($urandom % 60) - 6, int'($urandom % 40), 8'($urandom), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

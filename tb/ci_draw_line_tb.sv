// ci_draw_line_tb: draws lines in all octants, horizontal, vertical, 45-degree,
// single-point and partly or wholly off-screen lines into a 64 x 48
// framebuffer in an SDRAM model. The expected image comes from a reference
// Bresenham walk in the testbench, which plots only on-screen points. Every
// byte of memory is compared after each line, and with a never-stalling memory
// the run must take one clock per point of the line plus one setup clock.
module ci_draw_line_tb;
  import gfx_pkg::*;

  localparam int W = 64, H = 48;
  localparam int BASE = 256;
  localparam int MEMB = 4096;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  ci_req_t ci;
  logic ci_done, running, clipped;
  logic [31:0] ci_result;
  mm_req_t m_req;
  mm_rsp_t m_rsp;

  ci_draw_line #(.W(W), .H(H)) dut (.clk, .rst, .ci, .ci_done, .ci_result, .running, .clipped, .m_req, .m_rsp);
  sdram_model #(.WORDS(MEMB/2), .LATENCY(2)) mem (.clk, .rst, .req(m_req), .rsp(m_rsp));

  int checks = 0, failures = 0, clip_events = 0;
  logic [7:0] ref_img [MEMB];

  always @(posedge clk) if (clipped) clip_events++;

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

  // Reference: classic integer Bresenham over all octants; returns point count
  function automatic int ref_line(int x0, int y0, int x1, int y1, logic [7:0] col);
    int ddx, ddy, stx, sty, e, e2, n;
    ddx = (x1 > x0) ? x1 - x0 : x0 - x1;
    ddy = (y1 > y0) ? y0 - y1 : y1 - y0;   // minus the vertical distance
    stx = (x0 < x1) ? 1 : -1;
    sty = (y0 < y1) ? 1 : -1;
    e = ddx + ddy;
    n = 0;
    forever begin
      n++;
      if (x0 >= 0 && x0 < W && y0 >= 0 && y0 < H) ref_img[BASE + y0*W + x0] = col;
      if (x0 == x1 && y0 == y1) break;
      e2 = 2 * e;
      if (e2 >= ddy) begin e += ddy; x0 += stx; end
      if (e2 <= ddx) begin e += ddx; y0 += sty; end
    end
    return n;
  endfunction

  task automatic draw(int x1, int y1, int x2, int y2, logic [7:0] col, bit timed);
    int cyc, npts;
    ci_op(2'd0, 32'(BASE), {24'd0, col}, cyc);
    ci_op(2'd1, {16'(y1), 16'(x1)}, {16'(y2), 16'(x2)}, cyc);
    check(cyc == 1, "register write takes one cycle");
    ci_op(2'd2, 0, 0, cyc);
    npts = ref_line(x1, y1, x2, y2, col);
    if (timed) check(cyc == npts + 1, $sformatf("line (%0d,%0d)-(%0d,%0d) took %0d cycles, expected %0d",
                                                x1, y1, x2, y2, cyc, npts + 1));
    repeat (3) @(negedge clk);
    for (int i = 0; i < MEMB; i++)
      check(mem.peek(i) == ref_img[i], $sformatf("line (%0d,%0d)-(%0d,%0d): byte %0d = %02x, expected %02x",
                                                 x1, y1, x2, y2, i, mem.peek(i), ref_img[i]));
  endtask

  initial begin
    ci = '0;
    repeat (3) @(negedge clk);   // memory is loaded once reset holds every engine idle
    for (int i = 0; i < MEMB; i++) begin
      ref_img[i] = 8'($urandom);
      mem.poke(i, ref_img[i]);
    end
    rst = 0;
    draw(0, 0, 20, 20, 8'h01, 1);     // 45 degrees
    draw(3, 5, 40, 5, 8'h02, 1);      // horizontal
    draw(7, 40, 7, 2, 8'h03, 1);      // vertical, upwards
    draw(10, 10, 10, 10, 8'h04, 1);   // single point
    draw(1, 2, 50, 17, 8'h05, 1);     // shallow
    draw(50, 3, 44, 40, 8'h06, 1);    // steep, leftwards
    draw(60, 45, 2, 30, 8'h07, 1);    // shallow, up-left
    draw(-10, -5, 70, 50, 8'h08, 1);  // crosses the screen, both ends off
    draw(-20, 5, -2, 30, 8'h09, 1);   // wholly off-screen
    draw(0, 0, W, H, 8'h0A, 1);       // end one past the corner, as the API example does
    mem.wait_pct = 30;
    for (int k = 0; k < 16; k++)
      draw(int'($urandom % 90) - 13, int'($urandom % 70) - 11, int'($urandom % 90) - 13,
           int'($urandom % 70) - 11, 8'($urandom), 0);
    check(clip_events > 0, "off-screen points were skipped");
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

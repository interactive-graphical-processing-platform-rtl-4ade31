// ci_draw_rect_tb: draws rectangles (ordinary, reversed corners, partly and
// wholly off-screen, single pixel, odd and even edges) into a 64 x 48
// framebuffer held in an SDRAM model, compares every byte of memory with a
// reference image painted by the testbench, and checks the run time against
// one clock per 16-bit write plus one per row and one for setup when the
// memory never stalls. A second pass repeats random rectangles with random
// wait states.
module ci_draw_rect_tb;
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

  ci_draw_rect #(.W(W), .H(H)) dut (.clk, .rst, .ci, .ci_done, .ci_result, .running, .m_req, .m_rsp);
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

  function automatic int words_for(int a, int c);
    if (c <= 0) return 0;
    if (a % 2 == 1) return 1 + (c - 1 + 1) / 2;
    return (c + 1) / 2;
  endfunction

  task automatic draw(int x1, int y1, int x2, int y2, logic [7:0] col, bit timed);
    int cyc, exp_cyc, xl, xr, yt, yb;
    ci_op(2'd0, 32'(BASE), {24'd0, col}, cyc);
    check(cyc == 1, "register write takes one cycle");
    ci_op(2'd1, {16'(y1), 16'(x1)}, {16'(y2), 16'(x2)}, cyc);
    ci_op(2'd2, 0, 0, cyc);
    xl = (x1 < x2 ? x1 : x2); if (xl < 0) xl = 0;
    xr = (x1 > x2 ? x1 : x2); if (xr > W-1) xr = W-1;
    yt = (y1 < y2 ? y1 : y2); if (yt < 0) yt = 0;
    yb = (y1 > y2 ? y1 : y2); if (yb > H-1) yb = H-1;
    exp_cyc = 1;
    if (xl <= xr && yt <= yb) begin
      for (int y = yt; y <= yb; y++) begin
        for (int x = xl; x <= xr; x++) ref_img[BASE + y*W + x] = col;
        exp_cyc += 1 + words_for(BASE + y*W + xl, xr - xl + 1);
      end
    end
    if (timed) check(cyc == exp_cyc, $sformatf("rect (%0d,%0d)-(%0d,%0d) took %0d cycles, expected %0d",
                                               x1, y1, x2, y2, cyc, exp_cyc));
    repeat (3) @(negedge clk);
    for (int i = 0; i < MEMB; i++)
      check(mem.peek(i) == ref_img[i], $sformatf("byte %0d = %02x, expected %02x", i, mem.peek(i), ref_img[i]));
  endtask

  initial begin
    ci = '0;
    repeat (3) @(negedge clk);   // memory is loaded once reset holds every engine idle
    for (int i = 0; i < MEMB; i++) begin
      ref_img[i] = 8'($urandom);
      mem.poke(i, ref_img[i]);
    end
    rst = 0;
    draw(2, 3, 9, 7, 8'h11, 1);        // even start
    draw(5, 10, 5, 10, 8'h22, 1);      // single pixel, odd
    draw(20, 30, 11, 20, 8'h33, 1);    // reversed corners
    draw(-5, -3, 4, 2, 8'h44, 1);      // clipped top-left
    draw(60, 40, 80, 60, 8'h55, 1);    // clipped bottom-right
    draw(70, 0, 90, 10, 8'h66, 1);     // wholly off-screen
    draw(0, 0, W, H, 8'h0F, 1);        // full screen, as the API's clear does
    mem.wait_pct = 30;
    for (int k = 0; k < 12; k++)
      draw(int'($urandom % 80) - 8, int'($urandom % 60) - 6, int'($urandom % 80) - 8,
           int'($urandom % 60) - 6, 8'($urandom), 0);
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

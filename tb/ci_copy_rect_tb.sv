// ci_copy_rect_tb: copies random windows between two 32-pixel-wide buffers in
// an SDRAM model, with and without a transparent colour, and compares every
// byte of memory with a reference copy made by the testbench. The source is
// filled from a small colour set so that transparent pixels are common; the
// instruction's result (pixels left out) is checked against the reference
// count. Random wait states are on for the second half.
module ci_copy_rect_tb;
  import gfx_pkg::*;

  localparam int W = 32;
  localparam int SRC = 0, DST = 2048;
  localparam int MEMB = 4096;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  ci_req_t ci;
  logic ci_done, running;
  logic [31:0] ci_result;
  mm_req_t m_req;
  mm_rsp_t m_rsp;

  ci_copy_rect #(.W(W)) dut (.clk, .rst, .ci, .ci_done, .ci_result, .running, .m_req, .m_rsp);
  sdram_model #(.WORDS(MEMB/2), .LATENCY(3)) mem (.clk, .rst, .req(m_req), .rsp(m_rsp));

  int checks = 0, failures = 0;
  logic [7:0] ref_img [MEMB];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic ci_op(input logic [1:0] n, input logic [31:0] a, input logic [31:0] b);
    @(negedge clk);
    ci = '{start: 1'b1, n: n, dataa: a, datab: b};
    @(negedge clk);
    ci.start = 1'b0;
    while (!ci_done) @(negedge clk);
  endtask

  task automatic copy(int sx, int sy, int w, int h, int dx, int dy, bit ten, logic [7:0] tcol);
    int skipped;
    logic [7:0] v;
    ci_op(2'd0, 32'(SRC), 32'(DST));
    ci_op(2'd1, {16'(sy), 16'(sx)}, {16'(h), 16'(w)});
    ci_op(2'd2, {16'(dy), 16'(dx)}, {23'd0, ten, tcol});
    ci_op(2'd3, 0, 0);
    skipped = 0;
    for (int j = 0; j < h; j++)
      for (int i = 0; i < w; i++) begin
        v = ref_img[SRC + (sy + j) * W + sx + i];
        if (ten && v == tcol) skipped++;
        else ref_img[DST + (dy + j) * W + dx + i] = v;
      end
    check(ci_result == 32'(skipped), $sformatf("skip count %0d, expected %0d", ci_result, skipped));
    repeat (3) @(negedge clk);
    for (int i = 0; i < MEMB; i++)
      check(mem.peek(i) == ref_img[i], $sformatf("byte %0d = %02x, expected %02x", i, mem.peek(i), ref_img[i]));
  endtask

  initial begin
    ci = '0;
    repeat (3) @(negedge clk);   // memory is loaded once reset holds every engine idle
    for (int i = 0; i < MEMB; i++) begin
      ref_img[i] = (i < DST) ? 8'($urandom % 4) : 8'hC0 + 8'($urandom % 8);
      mem.poke(i, ref_img[i]);
    end
    rst = 0;
    copy(0, 0, 8, 4, 0, 0, 0, 0);        // aligned
    copy(3, 5, 7, 6, 10, 2, 0, 0);       // odd source and destination
    copy(1, 1, 12, 5, 4, 20, 1, 8'h02);  // with transparency
    copy(0, 0, 32, 3, 0, 40, 1, 8'h00);  // full rows, transparent 0
    copy(5, 5, 0, 4, 0, 0, 1, 8'h00);    // empty window
    mem.wait_pct = 30;
    for (int k = 0; k < 10; k++) begin
      int w, h;
      w = 1 + int'($urandom % 20);
      h = 1 + int'($urandom % 10);
      copy(int'($urandom % (W - w + 1)), int'($urandom % 20), w, h,
           int'($urandom % (W - w + 1)), int'($urandom % 40), $urandom % 2, 8'($urandom % 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

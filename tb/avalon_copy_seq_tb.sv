// avalon_copy_seq_tb: copies runs of bytes between all combinations of source
// and destination alignment, with and without a transparent colour, and checks
// memory byte by byte against a reference copy, plus the number of skipped
// pixels. Memory read latency is 3 clocks, with random wait states in the
// second half. Runs span several 64-byte chunks; with no wait states an
// even-aligned 400-byte copy must take at most 1.125 clocks per byte, a
// misaligned one at most 1.625.
module avalon_copy_seq_tb;
  import gfx_pkg::*;

  localparam int MEMB = 1024;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, busy, done, t_en;
  logic [1:0] skipped;
  logic [ADDR_W-1:0] src, dst;
  logic [15:0] count;
  colour_t t_colour;
  mm_req_t m_req;
  mm_rsp_t m_rsp;

  avalon_copy_seq dut (.clk, .rst, .start, .src, .dst, .count, .t_en, .t_colour,
                       .busy, .done, .skipped, .m_req, .m_rsp);
  sdram_model #(.WORDS(MEMB/2), .LATENCY(3)) mem (.clk, .rst, .req(m_req), .rsp(m_rsp));

  int checks = 0, failures = 0, skips = 0;
  logic [7:0] ref_img [MEMB];

  always @(posedge clk) skips += int'(skipped);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int cycles;
  task automatic run(int s, int d, int c, bit te, logic [7:0] tc);
    int exp_skips;
    skips = 0;
    @(negedge clk);
    start = 1; src = 32'(s); dst = 32'(d); count = 16'(c); t_en = te; t_colour = tc;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    exp_skips = 0;
    for (int i = 0; i < c; i++) begin
      if (te && ref_img[s + i] == tc) exp_skips++;
      else ref_img[d + i] = ref_img[s + i];
    end
    @(negedge clk);
    check(skips == exp_skips, $sformatf("skipped %0d, expected %0d", skips, exp_skips));
    for (int i = 0; i < MEMB; i++)
      check(mem.peek(i) == ref_img[i], $sformatf("byte %0d = %02x, expected %02x", i, mem.peek(i), ref_img[i]));
  endtask

  initial begin
    start = 0; src = '0; dst = '0; count = '0; t_en = 0; t_colour = '0;
    repeat (3) @(negedge clk);   // memory is loaded once reset holds every engine idle
    for (int i = 0; i < MEMB; i++) begin
      ref_img[i] = (i < 512) ? 8'($urandom % 3) : 8'hF0;
      mem.poke(i, ref_img[i]);
    end
    rst = 0;
    run(0, 600, 10, 0, 0);
    run(1, 620, 9, 0, 0);
    run(2, 641, 9, 0, 0);
    run(5, 663, 17, 0, 0);
    run(100, 700, 40, 1, 8'h01);
    run(200, 800, 1, 1, 8'h02);
    run(300, 900, 0, 1, 8'h02);
    // rate: even-aligned runs move two bytes per read and per write
    run(0, 560, 400, 0, 0);
    check(cycles <= 400 + 400 / 8, $sformatf("aligned 400-byte copy took %0d clocks", cycles));
    $display("aligned 400-byte copy: %0d clocks", cycles);
    run(1, 560, 400, 0, 0);
    check(cycles <= 400 * 3 / 2 + 400 / 8, $sformatf("misaligned 400-byte copy took %0d clocks", cycles));
    $display("misaligned 400-byte copy: %0d clocks", cycles);
    run(64, 640, 200, 1, 8'h00);
    run(3, 903, 121, 1, 8'h01);
    mem.wait_pct = 30;
    for (int k = 0; k < 10; k++)
      run(int'($urandom % 400), 512 + int'($urandom % 400), int'($urandom % 100), $urandom % 2, 8'($urandom % 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

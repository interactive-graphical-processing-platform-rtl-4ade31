// avalon_write_seq_tb: fills runs of bytes at every start alignment and many
// lengths (including zero and one) and checks the memory byte by byte against
// a reference, that bytes outside the run are untouched, and that with a
// never-stalling memory the run takes exactly one clock per 16-bit write.
module avalon_write_seq_tb;
  import gfx_pkg::*;

  localparam int MEMB = 512;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [ADDR_W-1:0] addr;
  logic [15:0] count;
  colour_t colour;
  mm_req_t m_req;
  mm_rsp_t m_rsp;

  avalon_write_seq dut (.clk, .rst, .start, .addr, .count, .colour, .busy, .done, .m_req, .m_rsp);
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

  task automatic run(int a, int c, logic [7:0] col, bit timed);
    int cyc, exp_words;
    @(negedge clk);
    start = 1; addr = 32'(a); count = 16'(c); colour = col;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    for (int i = a; i < a + c; i++) ref_img[i] = col;
    exp_words = (c == 0) ? 1 : ((a % 2) ? 1 + c / 2 : (c + 1) / 2);
    if (timed) check(cyc == exp_words, $sformatf("addr %0d count %0d: %0d cycles, expected %0d",
                                                 a, c, cyc, exp_words));
    @(negedge clk);
    check(!busy, "idle after done");
    for (int i = 0; i < MEMB; i++)
      check(mem.peek(i) == ref_img[i], $sformatf("addr %0d count %0d: byte %0d = %02x, expected %02x",
                                                 a, c, i, mem.peek(i), ref_img[i]));
  endtask

  initial begin
    start = 0; addr = '0; count = '0; colour = '0;
    repeat (3) @(negedge clk);   // memory is loaded once reset holds every engine idle
    for (int i = 0; i < MEMB; i++) begin
      ref_img[i] = 8'($urandom);
      mem.poke(i, ref_img[i]);
    end
    rst = 0;
    for (int a = 10; a < 12; a++)
      for (int c = 0; c < 8; c++) run(a + 20 * c, c, 8'(16 * a + c), 1);
    run(1, 300, 8'hA5, 1);
    mem.wait_pct = 40;
    for (int k = 0; k < 20; k++) run(int'($urandom % 400), int'($urandom % 100), 8'($urandom), 0);
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

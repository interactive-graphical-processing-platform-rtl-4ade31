// fb_sdram_reader_tb: reads 500 words from an SDRAM model with 4-clock read
// latency and random wait states, with a randomly stalling consumer, and
// checks that every word arrives in order with the memory's contents, that
// exactly 500 reads reach the memory, and that the local buffer never
// overflows (checked by the block's own assertion). A second transfer is
// restarted in mid-flight; the data after the restart must be the new
// transfer's. Reads must come in bursts: the longest run of back-to-back
// read requests must reach the burst length.
module fb_sdram_reader_tb;
  import gfx_pkg::*;

  localparam int BURST = 8, DEPTH = 16;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, busy, out_valid, out_ready;
  logic [ADDR_W-1:0] base;
  logic [23:0] nwords;
  logic [15:0] out_data;
  mm_req_t m_req;
  mm_rsp_t m_rsp;

  fb_sdram_reader #(.BURST(BURST), .DEPTH(DEPTH)) dut (.*);
  sdram_model #(.WORDS(4096), .LATENCY(4), .WAIT_PCT(15)) mem (.clk, .rst, .req(m_req), .rsp(m_rsp));

  int checks = 0, failures = 0, got = 0, exp_word = 0, run = 0, max_run = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (out_valid && out_ready) begin
      check(out_data == mem.mem[exp_word], $sformatf("word %0d = %04x expected %04x",
                                                     exp_word, out_data, mem.mem[exp_word]));
      exp_word++;
      got++;
    end
    out_ready <= ($urandom % 3 != 0);
    if (m_req.read) begin
      run++;
      if (run > max_run) max_run = run;
    end else run = 0;
  end

  initial begin
    start = 0; base = 0; nwords = 0; out_ready = 0;
    for (int i = 0; i < 4096; i++) mem.mem[i] = 16'($urandom);
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    start = 1; base = 32'(2 * 100); nwords = 500; exp_word = 100;
    @(negedge clk);
    start = 0;
    wait (got == 500);
    repeat (20) @(negedge clk);
    check(!out_valid, "no extra words");
    check(mem.reads == 500, $sformatf("%0d reads issued", mem.reads));
    check(max_run >= BURST, $sformatf("longest burst %0d", max_run));
    // restart in mid-flight
    @(negedge clk);
    start = 1; base = 32'(2 * 1000); nwords = 300; got = 0; exp_word = 1000;
    @(negedge clk);
    start = 0;
    repeat (40) @(negedge clk);
    start = 1; base = 32'(2 * 2000); nwords = 200;
    @(negedge clk);
    start = 0; got = 0; exp_word = 2000;
    wait (got == 200);
    repeat (20) @(negedge clk);
    check(!out_valid && !busy, "restarted transfer complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

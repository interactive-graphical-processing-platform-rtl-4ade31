// pixel_fifo_tb: writes random two-pixel words with random frame-start flags
// on a 50 MHz write clock and reads pixels on an unrelated ~25 MHz read clock
// with random back-pressure. Every pixel must come out in order, low byte
// first, with the flag on the first pixel of a flagged word only. The fill
// level must never exceed the depth, the writer never writes when full, and
// the level must reach the full depth once during a stretch with the reader
// stopped.
module pixel_fifo_tb;
  import gfx_pkg::*;

  localparam int DEPTH = 16;

  logic clk_wr = 0, clk_rd = 0, rst_wr = 1, rst_rd = 1;
  always #10 clk_wr = ~clk_wr;
  always #19.8 clk_rd = ~clk_rd;

  logic wr, wr_sop, full, out_valid, out_sop, out_ready;
  logic [15:0] wr_data;
  logic [$clog2(DEPTH):0] wr_level;
  colour_t out_data;

  pixel_fifo #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, sent = 0, got = 0, max_level = 0;
  logic [8:0] expq [$];
  bit reader_stopped = 0;
  localparam int WORDS = 3000;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk_wr) begin
    if (!rst_wr) begin
      if (int'(wr_level) > max_level) max_level = int'(wr_level);
      check(int'(wr_level) <= DEPTH, "level within depth");
      if (wr) begin
        expq.push_back({wr_sop, wr_data[7:0]});
        expq.push_back({1'b0, wr_data[15:8]});
        sent++;
      end
      if (sent + (wr ? 0 : 0) < WORDS && !full && !(wr && wr_level == (DEPTH - 1)) && $urandom % 3 != 0) begin
        wr      <= 1'b1;
        wr_data <= 16'($urandom);
        wr_sop  <= ($urandom % 5 == 0);
      end else wr <= 1'b0;
    end
  end

  always @(posedge clk_rd) begin
    if (!rst_rd) begin
      if (out_valid && out_ready) begin
        check(expq.size() > 0, "pixel without a write");
        if (expq.size() > 0) begin
          check({out_sop, out_data} == expq[0], $sformatf("pixel %0d: %0d/%02x expected %0d/%02x",
                got, out_sop, out_data, expq[0][8], expq[0][7:0]));
          void'(expq.pop_front());
        end
        got++;
      end
      out_ready <= !reader_stopped && ($urandom % 4 != 0);
    end
  end

  initial begin
    wr = 0; wr_data = 0; wr_sop = 0; out_ready = 0;
    repeat (3) @(negedge clk_rd);
    rst_wr = 0; rst_rd = 0;
    reader_stopped = 1;
    repeat (200) @(posedge clk_wr);
    check(max_level == DEPTH, $sformatf("filled to %0d", max_level));
    check(full, "full flag while the reader is stopped");
    reader_stopped = 0;
    wait (got == 2 * WORDS);
    repeat (10) @(posedge clk_rd);
    check(!out_valid, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assert property (@(posedge clk_wr) disable iff (rst_wr) wr |-> !full);

  initial begin
    repeat (100000) @(posedge clk_wr);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

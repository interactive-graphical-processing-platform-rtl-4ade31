// ci_frame_done_tb: issues the frame-done instruction repeatedly against a
// responder that answers each copy request with copy_done after a random
// delay. Each issue must produce exactly one copy request, one clock after
// start; the instruction must stay running (stalling the processor) until
// copy_done and finish in that same clock; and the result must count the
// frames handed over.
module ci_frame_done_tb;
  import gfx_pkg::*;

  logic clk = 0, rst = 1;
  always #10 clk = ~clk;

  ci_req_t ci;
  logic ci_done, running, copy_req, copy_done;
  logic [31:0] ci_result;

  ci_frame_done dut (.*);

  int checks = 0, failures = 0, reqs = 0, delay = 0, done_cycle = -1, cyc = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // responder: copy_done `delay` clocks after each request
  int countdown = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (copy_req) begin
      reqs <= reqs + 1;
      countdown <= delay;
    end else if (countdown > 0) countdown <= countdown - 1;
    else if (countdown == 0) countdown <= -1;
  end
  assign copy_done = (countdown == 0);

  initial begin
    ci = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 1; k <= 20; k++) begin
      int cycles;
      delay = int'($urandom % 50);
      @(negedge clk);
      ci.start = 1; ci.n = 2'($urandom);
      @(negedge clk);
      ci.start = 0;
      check(copy_req && reqs == k - 1, "copy requested one clock after start");
      cycles = 1;
      while (!ci_done) begin
        check(running, "running until the copy is done");
        @(negedge clk);
        cycles++;
      end
      check(copy_done, "done in the clock copy_done is seen");
      check(cycles == delay + 2, $sformatf("took %0d clocks, expected %0d", cycles, delay + 2));
      check(ci_result == 32'(k), $sformatf("frame count %0d, expected %0d", ci_result, k));
      @(negedge clk);
      check(!running && reqs == k, "idle again, one request per issue");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

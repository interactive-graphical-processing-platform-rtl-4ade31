// genesis_if_tb: two behavioural Genesis pads (a select-driven multiplexer with
// active-low buttons, as in the pad's pinout) are attached to the interface.
// Button states change at random between polls; after each poll the register
// must show exactly the pressed buttons in the documented bit order. The time
// between polls must equal the configured poll period (60 ms, scaled here to a
// 1 kHz clock, so 60 clocks).
module genesis_if_tb;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [1:0] pad_up, pad_down, pad_left, pad_right, pad_ab, pad_startc, pad_sel;
  logic read, poll_done;
  logic [31:0] readdata;

  genesis_if #(.CLK_HZ(1000), .POLL_MS(60), .SETTLE(4)) dut (
    .clk, .rst, .pad_up, .pad_down, .pad_left, .pad_right, .pad_ab, .pad_startc,
    .pad_sel, .read, .readdata, .poll_done);

  // pressed buttons per pad: {start, c, b, a, right, left, down, up}
  logic [7:0] btn [2];

  always_comb
    for (int p = 0; p < 2; p++) begin
      pad_up[p]   = !btn[p][0];
      pad_down[p] = !btn[p][1];
      if (pad_sel[p]) begin
        pad_left[p]   = !btn[p][2];
        pad_right[p]  = !btn[p][3];
        pad_ab[p]     = !btn[p][5];   // B
        pad_startc[p] = !btn[p][6];   // C
      end else begin
        pad_left[p]   = 1'b0;         // reads low while select is low
        pad_right[p]  = 1'b0;
        pad_ab[p]     = !btn[p][4];   // A
        pad_startc[p] = !btn[p][7];   // Start
      end
    end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int last_poll = -1, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    read = 0;
    btn[0] = 8'h00; btn[1] = 8'h00;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 25; k++) begin
      logic [7:0] b0, b1;
      b0 = (k < 8) ? 8'(1 << k) : 8'($urandom);
      b1 = (k < 8) ? 8'(8'h80 >> k) : 8'($urandom);
      btn[0] = b0; btn[1] = b1;
      @(posedge clk iff poll_done);
      if (last_poll >= 0) check(cyc - last_poll == 60, $sformatf("poll period %0d clocks", cyc - last_poll));
      last_poll = cyc;
      @(negedge clk);
      read = 1;
      @(negedge clk);
      read = 0;
      check(readdata == {16'h0, b1, b0}, $sformatf("register %08x, expected %08x", readdata, {16'h0, b1, b0}));
    end
    check(pad_sel == 2'b11, "select idles high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

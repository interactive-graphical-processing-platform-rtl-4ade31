// fb_dma_manager_tb: the SRAM manager with a 64-word (128-pixel) frame, a
// 16-word pixel FIFO, an SRAM model and a display-like consumer on a pixel
// clock about half the system clock (it takes 16 pixels per line, then idles
// for a blanking interval, and 8 lines per frame, then idles for vertical
// blanking). Checks:
//  * every frame the consumer receives starts with the frame-start flag and is
//    wholly the old or wholly a new picture (no tearing);
//  * after a copy the SRAM holds the new picture, and every frame that starts
//    after the copy completes shows it;
//  * the copy does not begin writing before a frame end;
//  * with a fast copy source the display never waits for data once running,
//    and copy writes are paused for refills at least once;
//  * with a copy source slower than the display, refill reads are held behind
//    the write address at least once, and still no frame is torn.
module fb_dma_manager_tb;
  import gfx_pkg::*;

  localparam int FW = 64, FD = 16, NPIX = 2 * FW;
  localparam int LINE = 16, LINES = NPIX / LINE, HBL = 12, VBL = 40;

  logic clk = 0, clk_pix = 0, rst = 1, rst_pix = 1;
  always #10 clk = ~clk;
  always #19.8 clk_pix = ~clk_pix;

  logic [$clog2(FD):0] fifo_level;
  logic fifo_wr, fifo_sop, copy_start, copy_busy, copy_done, cp_valid, cp_ready;
  logic [15:0] fifo_wdata, cp_data;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_we_n, sram_oe_n, sram_ub_n, sram_lb_n, sram_ce_n;
  logic frame_end, write_paused, read_held;

  fb_dma_manager #(.FRAME_WORDS(FW), .FIFO_DEPTH(FD), .LOW_WM(4), .HIGH_WM(12)) dut (.*);

  logic px_valid, px_sop, px_ready;
  colour_t px_data;
  pixel_fifo #(.DEPTH(FD)) fifo (
    .clk_wr(clk), .rst_wr(rst), .wr(fifo_wr), .wr_data(fifo_wdata), .wr_sop(fifo_sop), .full(),
    .wr_level(fifo_level), .clk_rd(clk_pix), .rst_rd(rst_pix), .out_valid(px_valid),
    .out_data(px_data), .out_sop(px_sop), .out_ready(px_ready));

  sram_model #(.WORDS(1024)) sram (.clk, .addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe),
    .dq_i(sram_dq_i), .we_n(sram_we_n), .oe_n(sram_oe_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n), .ce_n(sram_ce_n));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] picture(int p, int i);
    return 8'((p * 67 + i * 13 + 1) & 8'hFF);
  endfunction

  // ---------------- display-like consumer ----------------
  int hpos = 0, line = 0, idle = 0, late = 0, frames_seen = 0, pix_in_frame = 0;
  bit running = 0;
  logic [7:0] fbuf [NPIX];
  int frame_kind [64];        // picture number shown by each received frame, -1 torn
  assign px_ready = (idle == 0);
  always @(posedge clk_pix) if (!rst_pix) begin
    if (idle > 0) idle--;
    else if (px_valid) begin
      if (pix_in_frame == 0) check(px_sop, "frame starts with the flag");
      else check(!px_sop, "flag only on the first pixel");
      fbuf[pix_in_frame] = px_data;
      pix_in_frame++;
      hpos++;
      if (hpos == LINE) begin
        hpos = 0; line++; idle = HBL;
        if (line == LINES) begin
          int kind;
          line = 0; idle = VBL; pix_in_frame = 0; running = 1;
          kind = -1;
          for (int p = 0; p < 3; p++) begin
            bit same;
            same = 1;
            for (int i = 0; i < NPIX; i++) if (fbuf[i] != picture(p, i)) same = 0;
            if (same) kind = p;
          end
          frame_kind[frames_seen] = kind;
          check(kind >= 0, $sformatf("frame %0d is one whole picture", frames_seen));
          if (frames_seen < 63) frames_seen++;
        end
      end
    end else if (running) late++;
  end

  // ---------------- copy source ----------------
  int src_word = 0, src_pic = 1, src_rate = 1, pauses = 0, holds = 0, ends = 0;
  int end_at_start = -1, first_write_end = -1;
  logic gate = 1'b0;
  always @(posedge clk) gate <= ($urandom % src_rate == 0);
  assign cp_valid = copy_busy && src_word < FW && gate;
  assign cp_data  = {picture(src_pic, 2 * src_word + 1), picture(src_pic, 2 * src_word)};
  always @(posedge clk) if (!rst) begin
    if (cp_valid && cp_ready) begin
      if (src_word == 0) first_write_end = ends;
      src_word <= src_word + 1;
    end
    if (write_paused) pauses++;
    if (read_held) holds++;
    if (frame_end) ends++;
  end

  task automatic do_copy(int pic, int rate);
    int f0;
    src_word = 0; src_pic = pic; src_rate = rate;
    @(negedge clk);
    copy_start = 1;
    end_at_start = ends;
    @(negedge clk);
    copy_start = 0;
    wait (copy_done);
    repeat (3) @(negedge clk);   // the last word reaches the SRAM pins a clock after copy_done
    check(first_write_end > end_at_start, "copy writes start after a frame end");
    for (int i = 0; i < FW; i++)
      check(sram.mem[i] == {picture(pic, 2*i+1), picture(pic, 2*i)}, $sformatf("SRAM word %0d = %04x expected %04x", i, sram.mem[i], {picture(pic, 2*i+1), picture(pic, 2*i)}));
    f0 = frames_seen;
    wait (frames_seen >= f0 + 3);
    check(frame_kind[frames_seen - 1] == pic && frame_kind[frames_seen - 2] == pic,
          $sformatf("new picture %0d shown after the copy", pic));
  endtask

  initial begin
    copy_start = 0;
    repeat (3) @(negedge clk_pix);
    for (int i = 0; i < FW; i++) sram.mem[i] = {picture(0, 2*i+1), picture(0, 2*i)};
    rst = 0; rst_pix = 0;
    wait (frames_seen == 2);
    check(frame_kind[0] == 0 && frame_kind[1] == 0, "old picture shown first");
    late = 0;
    do_copy(1, 1);
    check(late == 0, $sformatf("display waited %0d pixel clocks with a fast copy source", late));
    check(pauses > 0, $sformatf("copy writes paused for refills %0d times", pauses));
    do_copy(2, 24);
    check(holds > 0, $sformatf("refill reads held behind the copy %0d times", holds));
    check(ends >= frames_seen, "one frame end per frame");
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

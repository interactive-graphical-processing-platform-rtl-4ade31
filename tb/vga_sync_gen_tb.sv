// vga_sync_gen_tb: two generators.
//  * A full-size one (640x480, 800 x 525 raster) fed a constant stream: the
//    frame period must be 420000 pixel clocks (60.0 Hz at 25.2 MHz), each line
//    800 clocks with a 96-clock HSYNC pulse, VSYNC low for 2 lines, and 307200
//    visible pixels per frame.
//  * A reduced one (16 x 6 visible) fed numbered frames after some stray pixels.
//    The stray pixels must be dropped, every visible pixel of a synchronised
//    frame must show the expected pixel expanded to 10 bits per channel, and a
//    source stall inside a frame must raise `underflow`, drop the rest of that
//    frame and resynchronise on the next frame start.
module vga_sync_gen_tb;
  import gfx_pkg::*;

  logic clk = 0, rst = 1;
  always #20 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- full-size timing ----------------
  logic f_ready, f_hs, f_vs, f_bn, f_sn, f_fs, f_uf, f_sync;
  logic [9:0] f_r, f_g, f_b;
  vga_sync_gen full (.clk, .rst, .in_valid(1'b1), .in_data(16'hFFFF), .in_sop(1'b1), .in_ready(f_ready),
                     .vga_r(f_r), .vga_g(f_g), .vga_b(f_b), .vga_hs(f_hs), .vga_vs(f_vs),
                     .vga_blank_n(f_bn), .vga_sync_n(f_sn), .frame_start(f_fs), .underflow(f_uf),
                     .in_sync(f_sync));

  int cyc = 0, last_fs = -1, frames_timed = 0, vis = 0, hs_low = 0, hs_fall = -1, vs_low = 0;
  logic hs_q = 1, vs_q = 1;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (f_bn) begin
      vis++;
      check(f_r == 10'h3FF && f_g == 10'h3FF && f_b == 10'h3FF, "white pixel expanded to full scale");
    end
    if (!f_hs) hs_low++;
    if (hs_q && !f_hs) begin
      if (hs_fall >= 0) check(cyc - hs_fall == 800, $sformatf("line period %0d", cyc - hs_fall));
      hs_fall = cyc;
    end
    if (!hs_q && f_hs) begin
      check(hs_low == 96, $sformatf("hsync width %0d", hs_low));
      hs_low = 0;
    end
    if (!f_vs) vs_low++;
    if (!vs_q && f_vs) begin
      check(vs_low == 2 * 800, $sformatf("vsync width %0d clocks", vs_low));
      vs_low = 0;
    end
    hs_q <= f_hs;
    vs_q <= f_vs;
    if (f_fs) begin
      if (last_fs >= 0) begin
        check(cyc - last_fs == 420000, $sformatf("frame period %0d", cyc - last_fs));
        check(vis == 307200, $sformatf("visible pixels per frame %0d", vis));
        frames_timed++;
      end
      last_fs = cyc;
      vis = 0;
    end
    check(!f_uf, "no underflow with a constant source");
  end

  // ---------------- reduced-size stream behaviour ----------------
  localparam int HA = 16, VA = 6, NPIX = HA * VA;
  logic s_valid, s_sop, s_ready, s_hs, s_vs, s_bn, s_sn, s_fs, s_uf, s_sync;
  rgb565_t s_data;
  logic [9:0] s_r, s_g, s_b;
  vga_sync_gen #(.HA(HA), .HFP(2), .HS(3), .HBP(2), .VA(VA), .VFP(1), .VS(2), .VBP(2)) u_small (
    .clk, .rst, .in_valid(s_valid), .in_data(s_data), .in_sop(s_sop), .in_ready(s_ready),
    .vga_r(s_r), .vga_g(s_g), .vga_b(s_b), .vga_hs(s_hs), .vga_vs(s_vs), .vga_blank_n(s_bn),
    .vga_sync_n(s_sn), .frame_start(s_fs), .underflow(s_uf), .in_sync(s_sync));

  logic [16:0] srcq [$];
  int stall = 0, underflows = 0, sent_in_frame2 = 0;
  assign s_valid = srcq.size() > 0 && stall == 0;
  assign s_data  = srcq.size() > 0 ? srcq[0][15:0] : '0;
  assign s_sop   = srcq.size() > 0 ? srcq[0][16] : 1'b0;

  function automatic rgb565_t pix(int f, int i);
    return rgb565_t'((f * 4099 + i * 37) & 16'hFFFF);
  endfunction

  always @(posedge clk) if (!rst) begin
    if (s_valid && s_ready) begin
      if (srcq[0][15:0] == pix(2, 40) && !srcq[0][16]) stall = 6;   // stall inside frame 2
      void'(srcq.pop_front());
    end else if (stall > 0) stall--;
    if (s_uf) underflows++;
  end

  // displayed frames, grouped by visible-pixel count
  int dframe = 0, dpix = 0;
  rgb565_t shown [8][NPIX];
  always @(posedge clk) if (!rst && s_bn) begin
    shown[dframe][dpix] = {s_r[9:5], s_g[9:4], s_b[9:5]};
    check(s_r[4:0] == s_r[9:5] && s_g[3:0] == s_g[9:6] && s_b[4:0] == s_b[9:5], "high bits repeated");
    dpix++;
    if (dpix == NPIX) begin
      dpix = 0;
      if (dframe < 7) dframe++;
    end
  end

  initial begin
    for (int i = 0; i < 5; i++) srcq.push_back({1'b0, 16'hBAD0 + 16'(i)});   // stray pixels
    for (int f = 0; f < 6; f++)
      for (int i = 0; i < NPIX; i++) srcq.push_back({i == 0, pix(f, i)});
    repeat (3) @(negedge clk);
    rst = 0;
    wait (dframe == 6);
    // displayed frame 0: black while syncing; 1, 2: source frames 0, 1;
    // 3: frame 2 cut by the stall; 4, 5: frames 3, 4
    for (int i = 0; i < NPIX; i++) begin
      check(shown[0][i] == 16'h0000, "black before the first frame start");
      check(shown[1][i] == pix(0, i), $sformatf("frame 0 pixel %0d", i));
      check(shown[2][i] == pix(1, i), $sformatf("frame 1 pixel %0d", i));
      check(shown[4][i] == pix(3, i), $sformatf("frame 3 pixel %0d", i));
      check(shown[5][i] == pix(4, i), $sformatf("frame 4 pixel %0d", i));
    end
    for (int i = 0; i < 40; i++) check(shown[3][i] == pix(2, i), "frame 2 before the stall");
    check(shown[3][NPIX-1] == 16'h0000, "frame 2 after the stall is black");
    check(underflows == 1, $sformatf("underflow events %0d", underflows));
    wait (frames_timed == 2);
    check(f_sn == 1'b0, "sync-on-green off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

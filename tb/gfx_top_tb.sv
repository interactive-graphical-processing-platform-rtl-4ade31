// gfx_top_tb: end-to-end test of the graphics platform at a reduced 64 x 16
// screen (short blanking, 64-entry pixel FIFO, 8-word bursts, fast controller
// polling) with an SDRAM model (3-clock reads, random wait states), an SRAM
// model, two modelled game pads and a capture of the VGA pins.
//
// The testbench plays the processor. It draws into layer A with the rectangle,
// line and circle instructions (including shapes that run off the screen),
// writes pixels of layer B over its own data path while the drawing engines
// use the bus, composites A onto B with the rectangle copy using colour 0 as
// transparent, then hands B and later A to the display with the frame-done
// instruction, and rewrites palette entries. A reference model of every
// operation is kept in testbench arrays.
//
// Checked: SDRAM contents after the drawing against the reference; the
// copy's skip count; every captured VGA frame is exactly either the picture
// shown before the last hand-over or the one after it, decoded through the
// current palette (no torn or corrupt frame); after each hand-over the new
// picture is shown; palette read-back; the controller register for two button
// patterns on both pads; sync pulse counts per frame; no underflow once the
// display is running. Each mechanism below is counted and the test fails if
// one of them never happened: clipped line point, clipped rectangle, circle,
// transparent-pixel skip, bus contention between the processor and an
// engine, frame hand-over, copy waiting for the frame end, copy write paused
// for display reads, palette change seen on screen, controller poll, frame
// checked against the picture. A display read held behind a slow copy is
// reported but not required: at this size the copy always finishes inside
// the vertical blanking.
module gfx_top_tb;
  import gfx_pkg::*;

  localparam int W = 64, H = 16, NPIX = W * H;
  localparam int BUF_A = 0, BUF_B = 32'h8000;
  localparam int CLK_HZ = 20000;

  logic clk_sys = 0, clk_pix = 0, rst_sys = 1, rst_pix = 1;
  always #10 clk_sys = ~clk_sys;     // 50 MHz
  always #19.84 clk_pix = ~clk_pix;  // 25.2 MHz

  logic        ci_start;
  logic [2:0]  ci_sel;
  logic [1:0]  ci_n;
  logic [31:0] ci_dataa, ci_datab, ci_result;
  logic        ci_done;
  mm_req_t     host_req, sdram_req;
  mm_rsp_t     host_rsp, sdram_rsp;
  logic [7:0]  pal_address;
  logic        pal_write, pal_read;
  logic [15:0] pal_writedata, pal_readdata;
  logic        fbs_address, fbs_write, fbs_read;
  logic [31:0] fbs_writedata, fbs_readdata;
  logic        gen_read;
  logic [31:0] gen_readdata;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic        sram_dq_oe, sram_we_n, sram_oe_n, sram_ub_n, sram_lb_n, sram_ce_n;
  logic [9:0]  vga_r, vga_g, vga_b;
  logic        vga_hs, vga_vs, vga_blank_n, vga_sync_n, vga_underflow;
  logic [35:0] gpio_i, gpio_o, gpio_oe;

  gfx_top #(.W(W), .H(H), .FIFO_DEPTH(64), .BURST(8), .HBLANK(16), .VBLANK(45),
            .CLK_HZ(CLK_HZ), .POLL_MS(60)) dut (.*);

  sdram_model #(.WORDS(32768), .LATENCY(3), .WAIT_PCT(10)) sdram (
    .clk(clk_sys), .rst(rst_sys), .req(sdram_req), .rsp(sdram_rsp));
  sram_model #(.WORDS(1024)) sram (.clk(clk_sys), .addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe),
    .dq_i(sram_dq_i), .we_n(sram_we_n), .oe_n(sram_oe_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n), .ce_n(sram_ce_n));

  int checks = 0, failures = 0;
  longint sys_cyc = 0;
  always @(posedge clk_sys) sys_cyc <= sys_cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference state ----------------
  logic [7:0]  ref_mem [65536];      // SDRAM bytes
  logic [15:0] ref_pal [256];
  logic [7:0]  shown_cur [NPIX], shown_prev [NPIX];
  int pal_epoch = 0;

  function automatic logic [15:0] default_pal(int i);
    logic [2:0] r, g;
    logic [1:0] b;
    {r, g, b} = 8'(i);
    return {r, r[2:1], g, g, b, b, b[1]};
  endfunction

  function automatic void plot(int base, int x, int y, logic [7:0] c);
    if (x >= 0 && x < W && y >= 0 && y < H) ref_mem[base + y*W + x] = c;
  endfunction

  // ---------------- counters ----------------
  int n_line_clipped = 0, n_rect_clipped = 0, n_circles = 0, n_skips = 0, n_contention = 0;
  int n_handover = 0, n_wait_end = 0, n_paused = 0, n_held = 0, n_pal_seen = 0, n_polls = 0;
  int n_frames_ok = 0, n_underflow_late = 0;

  always @(posedge clk_sys) if (!rst_sys) begin
    if (dut.u_line.clipped) n_line_clipped++;
    if (dut.u_fbs.write_paused) n_paused++;
    if (dut.u_fbs.read_held) n_held++;
    if (dut.u_gen.poll_done) n_polls++;
    if ((host_req.read || host_req.write) &&
        (dut.m_req[2].write || dut.m_req[3].write || dut.m_req[4].write || dut.m_req[5].write ||
         dut.m_req[5].read))
      n_contention++;
  end

  // ---------------- game pads ----------------
  // pressed buttons per pad: {start, c, b, a, right, left, down, up}
  logic [7:0] pad [2];
  function automatic logic [5:0] pad_pins(logic [7:0] p, logic sel);
    // {startc, ab, right, left, down, up}, active low
    if (sel) return ~{p[6], p[5], p[3], p[2], p[1], p[0]};
    else     return ~{p[7], p[4], 1'b1, 1'b1, p[1], p[0]};
  endfunction
  always_comb begin
    logic [5:0] p1, p2;
    p1 = pad_pins(pad[0], gpio_o[29]);
    p2 = pad_pins(pad[1], gpio_o[7]);
    gpio_i = '1;
    {gpio_i[23], gpio_i[33], gpio_i[25], gpio_i[27], gpio_i[31], gpio_i[35]} = p1;
    {gpio_i[1],  gpio_i[11], gpio_i[3],  gpio_i[5],  gpio_i[9],  gpio_i[13]} = p2;
  end

  // ---------------- VGA capture ----------------
  logic [29:0] cap [NPIX];
  int pcount = 0, frame_epoch = 0, frames_done = 0, hs_pulses = 0, hs_in_frame = 0;
  int frame_kind = -1;               // 1 current picture, 0 previous, -1 neither
  logic hs_q = 1, vs_q = 1;

  function automatic logic [29:0] expand(logic [15:0] c);
    return {c[15:11], c[15:11], c[10:5], c[10:7], c[4:0], c[4:0]};
  endfunction

  always @(posedge clk_pix) if (!rst_pix) begin
    hs_q <= vga_hs;
    vs_q <= vga_vs;
    if (hs_q && !vga_hs) hs_in_frame++;
    if (vs_q && !vga_vs) begin
      if (frames_done > 1) check(hs_in_frame == 16 + 45, $sformatf("%0d line syncs per frame", hs_in_frame));
      hs_in_frame = 0;
    end
    if (!vga_vs) pcount = 0;
    else if (vga_blank_n) begin
      if (pcount == 0) frame_epoch = pal_epoch;
      if (pcount < NPIX) cap[pcount] = {vga_r, vga_g, vga_b};
      pcount++;
      if (pcount == NPIX) begin
        bit is_cur, is_prev;
        is_cur = 1; is_prev = 1;
        for (int i = 0; i < NPIX; i++) begin
          if (cap[i] != expand(ref_pal[shown_cur[i]])) is_cur = 0;
          if (cap[i] != expand(ref_pal[shown_prev[i]])) is_prev = 0;
        end
        frame_kind = is_cur ? 1 : is_prev ? 0 : -1;
        if (frame_epoch == pal_epoch) begin
          // the first frame after reset may start before the stream is in step
          if (frames_done > 0) check(frame_kind >= 0, $sformatf("frame %0d is a whole picture", frames_done));
          if (frame_kind >= 0) n_frames_ok++;
        end
        frames_done++;
      end
    end
    if (vga_underflow && frames_done > 1) n_underflow_late++;
  end

  task automatic wait_frames(int n);
    int f0;
    f0 = frames_done;
    wait (frames_done >= f0 + n);
  endtask

  // ---------------- processor side ----------------
  task automatic ci_op(input logic [2:0] sel, input logic [1:0] n, input logic [31:0] a,
                       input logic [31:0] b);
    @(negedge clk_sys);
    ci_sel = sel; ci_n = n; ci_dataa = a; ci_datab = b; ci_start = 1;
    @(negedge clk_sys);
    ci_start = 0;
    while (!ci_done) @(negedge clk_sys);
  endtask

  task automatic host_write_byte(int addr, logic [7:0] v);
    @(negedge clk_sys);
    host_req = '{read: 1'b0, write: 1'b1, address: 32'(addr & ~1),
                 writedata: {v, v}, byteenable: (addr & 1) ? 2'b10 : 2'b01};
    @(posedge clk_sys);
    while (host_rsp.waitrequest) @(posedge clk_sys);
    @(negedge clk_sys);
    host_req = MM_REQ_IDLE;
    ref_mem[addr] = v;
  endtask

  task automatic draw_rect(int base, int x1, int y1, int x2, int y2, logic [7:0] c);
    ci_op(0, 0, 32'(base), 32'(c));
    ci_op(0, 1, {16'(y1), 16'(x1)}, {16'(y2), 16'(x2)});
    ci_op(0, 2, 0, 0);
    for (int y = y1; y <= y2; y++) for (int x = x1; x <= x2; x++) plot(base, x, y, c);
    if (x1 < 0 || y1 < 0 || x2 >= W || y2 >= H) n_rect_clipped++;
  endtask

  task automatic draw_line(int base, int x0, int y0, int x1, int y1, logic [7:0] c);
    int ddx, ddy, stx, sty, e, e2;
    ci_op(1, 0, 32'(base), 32'(c));
    ci_op(1, 1, {16'(y0), 16'(x0)}, {16'(y1), 16'(x1)});
    ci_op(1, 2, 0, 0);
    ddx = (x1 > x0) ? x1 - x0 : x0 - x1;
    ddy = (y1 > y0) ? y0 - y1 : y1 - y0;
    stx = (x0 < x1) ? 1 : -1;
    sty = (y0 < y1) ? 1 : -1;
    e = ddx + ddy;
    forever begin
      plot(base, x0, y0, c);
      if (x0 == x1 && y0 == y1) break;
      e2 = 2 * e;
      if (e2 >= ddy) begin e += ddy; x0 += stx; end
      if (e2 <= ddx) begin e += ddx; y0 += sty; end
    end
  endtask

  task automatic draw_circle(int base, int cx, int cy, int r, logic [7:0] c);
    int x, y, d;
    ci_op(2, 0, 32'(base), 32'(c));
    ci_op(2, 1, {16'(cy), 16'(cx)}, 32'(r));
    ci_op(2, 2, 0, 0);
    x = r; y = 0; d = 1 - r;
    while (y <= x) begin
      plot(base, cx + x, cy + y, c); plot(base, cx - x, cy + y, c);
      plot(base, cx + x, cy - y, c); plot(base, cx - x, cy - y, c);
      plot(base, cx + y, cy + x, c); plot(base, cx - y, cy + x, c);
      plot(base, cx + y, cy - x, c); plot(base, cx - y, cy - x, c);
      y++;
      if (d < 0) d += 2*y + 1;
      else begin x--; d += 2*(y - x) + 1; end
    end
    n_circles++;
  endtask

  task automatic copy_rect(int src, int dst, int sx, int sy, int w, int h, int dx, int dy,
                           bit ten, logic [7:0] tcol);
    int skipped;
    logic [7:0] v;
    ci_op(3, 0, 32'(src), 32'(dst));
    ci_op(3, 1, {16'(sy), 16'(sx)}, {16'(h), 16'(w)});
    ci_op(3, 2, {16'(dy), 16'(dx)}, {23'd0, ten, tcol});
    ci_op(3, 3, 0, 0);
    skipped = 0;
    for (int j = 0; j < h; j++)
      for (int i = 0; i < w; i++) begin
        v = ref_mem[src + (sy + j) * W + sx + i];
        if (ten && v == tcol) skipped++;
        else ref_mem[dst + (dy + j) * W + dx + i] = v;
      end
    check(ci_result == 32'(skipped), $sformatf("copy skipped %0d, expected %0d", ci_result, skipped));
    n_skips += skipped;
  endtask

  task automatic check_sdram(int base, string what);
    repeat (4) @(negedge clk_sys);
    for (int i = 0; i < NPIX; i++)
      check(sdram.peek(base + i) == ref_mem[base + i],
            $sformatf("%s byte %0d = %02x, expected %02x", what, i, sdram.peek(base + i), ref_mem[base + i]));
  endtask

  task automatic reg_fbs(logic a, logic wr, logic [31:0] d, output logic [31:0] q);
    @(negedge clk_sys);
    fbs_address = a; fbs_write = wr; fbs_read = !wr; fbs_writedata = d;
    @(negedge clk_sys);
    fbs_write = 0; fbs_read = 0;
    q = fbs_readdata;
  endtask

  task automatic hand_over(int base);
    logic [31:0] q;
    int f0, fe0;
    reg_fbs(0, 1, 32'(base), q);
    reg_fbs(0, 0, 0, q);
    check(q == 32'(base), "streamer base reads back");
    fe0 = pcount;
    ci_op(4, 0, 0, 0);
    n_handover++;
    check(ci_result == 32'(n_handover), $sformatf("frame count %0d", ci_result));
    // what the display should show from now on
    for (int i = 0; i < NPIX; i++) begin
      shown_prev[i] = shown_cur[i];
      shown_cur[i]  = ref_mem[base + i];
    end
    repeat (4) @(negedge clk_sys);
    for (int i = 0; i < NPIX / 2; i++)
      check(sram.mem[i] == {ref_mem[base + 2*i + 1], ref_mem[base + 2*i]}, $sformatf("SRAM word %0d", i));
    wait_frames(2);
    check(frame_kind == 1, "new picture displayed after the hand-over");
  endtask

  task automatic pal_set(int idx, logic [15:0] v);
    @(negedge clk_sys);
    pal_address = 8'(idx); pal_write = 1; pal_writedata = v;
    @(negedge clk_sys);
    pal_write = 0;
    ref_pal[idx] = v;
  endtask

  task automatic pal_get(int idx, output logic [15:0] v);
    @(negedge clk_sys);
    pal_address = 8'(idx); pal_read = 1;
    @(negedge clk_sys);
    pal_read = 0;
    v = pal_readdata;
  endtask

  task automatic check_pads(logic [7:0] p1, logic [7:0] p2);
    int n0;
    pad[0] = p1; pad[1] = p2;
    n0 = n_polls;
    wait (n_polls >= n0 + 2);
    @(negedge clk_sys);
    gen_read = 1;
    @(negedge clk_sys);
    gen_read = 0;
    check(gen_readdata == {16'h0, p2, p1}, $sformatf("pads read %04x, expected %04x", gen_readdata[15:0], {p2, p1}));
  endtask

  // clocks the frame copy spends waiting for the end of the displayed frame
  always @(posedge clk_sys) if (!rst_sys && 2'(dut.u_fbs.u_mgr.cstate) == 2'd1) n_wait_end++;

  initial begin
    logic [15:0] pv;
    longint t0;
    ci_start = 0; ci_sel = 0; ci_n = 0; ci_dataa = 0; ci_datab = 0;
    host_req = MM_REQ_IDLE;
    pal_address = 0; pal_write = 0; pal_read = 0; pal_writedata = 0;
    fbs_address = 0; fbs_write = 0; fbs_read = 0; fbs_writedata = 0; gen_read = 0;
    pad[0] = 0; pad[1] = 0;
    repeat (3) @(negedge clk_pix);
    for (int i = 0; i < 256; i++) ref_pal[i] = default_pal(i);
    for (int i = 0; i < 65536; i++) ref_mem[i] = 8'(i * 37 + (i >> 6));
    for (int i = 0; i < 32768; i++) sdram.mem[i] = {ref_mem[2*i+1], ref_mem[2*i]};
    for (int i = 0; i < NPIX; i++) begin
      shown_cur[i]  = 8'(i ^ (i >> 6));
      shown_prev[i] = shown_cur[i];
    end
    for (int i = 0; i < NPIX / 2; i++) sram.mem[i] = {shown_cur[2*i+1], shown_cur[2*i]};
    rst_sys = 0; rst_pix = 0;

    // the power-on SRAM picture is displayed
    wait_frames(2);
    check(frame_kind == 1, "initial picture displayed");

    // palette read-back
    for (int i = 0; i < 256; i += 17) begin
      pal_get(i, pv);
      check(pv == ref_pal[i], $sformatf("palette %0d reads %04x", i, pv));
    end

    // controllers
    check_pads(8'b0000_0000, 8'b0000_0000);
    check_pads(8'b1010_0101, 8'b0101_1010);
    check_pads(8'b1111_1111, 8'b1001_0011);
    @(posedge dut.u_gen.poll_done);
    t0 = sys_cyc;
    @(posedge dut.u_gen.poll_done);
    check(sys_cyc - t0 == 64'(CLK_HZ / 1000 * 60), $sformatf("poll period %0d clocks", sys_cyc - t0));

    // layer A: background 0 (transparent), shapes, some off the screen
    draw_rect(BUF_A, 0, 0, W - 1, H - 1, 8'h00);
    draw_rect(BUF_A, -5, 2, 10, 20, 8'hE0);
    fork
      begin
        draw_line(BUF_A, -10, -3, 70, 14, 8'h1C);
        draw_line(BUF_A, 60, 0, 20, 15, 8'h03);
        draw_circle(BUF_A, 40, 8, 9, 8'hFF);
        draw_circle(BUF_A, 5, 5, 3, 8'h92);
      end
      begin
        // processor pixel writes into layer B while the engines run
        for (int i = 0; i < 40; i++) host_write_byte(BUF_B + i * 3, 8'(i + 100));
      end
    join
    draw_rect(BUF_B, 0, 10, 63, 15, 8'h49);
    check_sdram(BUF_A, "layer A");
    check_sdram(BUF_B, "layer B");

    // composite A over B, colour 0 transparent
    copy_rect(BUF_A, BUF_B, 0, 0, 48, 12, 8, 3, 1'b1, 8'h00);
    copy_rect(BUF_A, BUF_B, 30, 0, 20, 4, 0, 0, 1'b0, 8'h00);
    check_sdram(BUF_B, "composited B");

    // hand B to the display, with the SDRAM slowed down by wait states
    sdram.wait_pct = 40;
    hand_over(BUF_B);
    sdram.wait_pct = 10;

    // palette change shows on screen
    pal_set(8'h49, 16'hF800);
    pal_set(8'hE0, 16'h001F);
    pal_epoch++;
    pal_get(8'h49, pv);
    check(pv == 16'hF800, "palette write reads back");
    wait_frames(2);
    check(frame_kind == 1, "palette change displayed");
    if (frame_kind == 1) n_pal_seen++;

    // draw more into A and hand it over as the next frame
    draw_rect(BUF_A, 20, 4, 30, 9, 8'h49);
    hand_over(BUF_A);
    hand_over(BUF_B);
    wait_frames(1);

    check(n_underflow_late == 0, "no display underflow once running");
    check(n_line_clipped > 0,   "mechanism: line points outside the screen skipped");
    check(n_rect_clipped > 0,   "mechanism: rectangle clipped");
    check(n_circles > 0,        "mechanism: circle drawn");
    check(n_skips > 0,          "mechanism: transparent pixels left out");
    check(n_contention > 0,     "mechanism: processor and engine contend for SDRAM");
    check(n_handover == 3,      "mechanism: frame hand-over");
    check(n_wait_end > 0,       "mechanism: copy waits for the frame end");
    check(n_paused > 0,         "mechanism: copy writes paused for display reads");
    check(n_pal_seen > 0,       "mechanism: palette change on screen");
    check(n_polls > 0,          "mechanism: controller poll");
    check(n_frames_ok > 5,      "mechanism: frames matched the picture");
    $display("mechanisms: line_clip=%0d rect_clip=%0d circles=%0d skips=%0d contention=%0d handover=%0d wait_end=%0d paused=%0d held=%0d pal=%0d polls=%0d frames=%0d",
             n_line_clipped, n_rect_clipped, n_circles, n_skips, n_contention, n_handover, n_wait_end,
             n_paused, n_held, n_pal_seen, n_polls, n_frames_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk_sys);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// gfx_top_full_tb: one complete frame operation on the platform at its full
// default size (640 x 480, 800 x 525 VGA timing, 512-entry pixel FIFO,
// 32-word bursts, 50 MHz system clock, 60 ms controller poll).
//
// The testbench plays the processor: it clears layer A to the transparent
// colour and draws two diagonals and a radius-239 circle into it, fills layer B with a
// full-screen rectangle, composites the whole of A onto B with the rectangle
// copy, and hands B to the display with the frame-done instruction. The SDRAM
// model has no wait states so the drawing times are the engines' own.
//
// Checked: the full-screen fill takes one clock per two pixels plus one per
// row (the documented worst case for this operation is a whole-frame redraw);
// SDRAM contents of both layers against a reference; the copy's skip count;
// the SRAM image after hand-over; every captured frame is a whole picture
// (the old one or the new one, never a mix), and the new one is shown after
// the hand-over; 800 pixel clocks per line and 420,000 per frame; a
// controller poll every 60 ms with the pressed buttons in the register. The
// measured times of the full-screen operations are printed.
module gfx_top_full_tb;
  import gfx_pkg::*;

  localparam int W = 640, H = 480, NPIX = W * H;
  localparam int BUF_A = 0, BUF_B = 32'h80000;

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

  gfx_top dut (.*);

  sdram_model #(.WORDS(1 << 20), .LATENCY(3), .WAIT_PCT(0)) sdram (
    .clk(clk_sys), .rst(rst_sys), .req(sdram_req), .rsp(sdram_rsp));
  sram_model sram (.clk(clk_sys), .addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe),
    .dq_i(sram_dq_i), .we_n(sram_we_n), .oe_n(sram_oe_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n), .ce_n(sram_ce_n));

  int checks = 0, failures = 0;
  longint sys_cyc = 0;
  always @(posedge clk_sys) sys_cyc <= sys_cyc + 1;
  // start of the SRAM writes (the copy leaves its wait at the frame end) and their end
  longint wr_start = 0, wr_end = 0;
  always @(posedge clk_sys) begin
    if (2'(dut.u_fbs.u_mgr.cstate) == 2'd1 && dut.u_fbs.u_mgr.frame_end) wr_start = sys_cyc;
    if (dut.u_fbs.copy_done) wr_end = sys_cyc;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic [7:0]  ref_mem [1 << 21];
  logic [15:0] ref_pal [256];
  logic [7:0]  shown_cur [NPIX], shown_prev [NPIX];

  function automatic void plot(int base, int x, int y, logic [7:0] c);
    if (x >= 0 && x < W && y >= 0 && y < H) ref_mem[base + y*W + x] = c;
  endfunction

  // ---------------- pads: player 1 holds A and LEFT, player 2 holds START ----------------
  assign gpio_i = ~((36'd1 << 27) | (gpio_o[29] ? 36'd0 : (36'd1 << 33)) |
                    (gpio_o[7] ? 36'd0 : (36'd1 << 1)));

  // ---------------- VGA capture ----------------
  int pcount = 0, frames_done = 0, frame_kind = -1, n_frames_ok = 0;
  int pix_clk = 0, last_vs = -1, last_hs = -1, vs_periods = 0, hs_bad = 0, hs_seen = 0;
  logic hs_q = 1, vs_q = 1;

  function automatic logic [29:0] expand(logic [15:0] c);
    return {c[15:11], c[15:11], c[10:5], c[10:7], c[4:0], c[4:0]};
  endfunction

  logic [29:0] cap [NPIX];
  always @(posedge clk_pix) if (!rst_pix) begin
    pix_clk++;
    hs_q <= vga_hs;
    vs_q <= vga_vs;
    if (hs_q && !vga_hs) begin
      if (last_hs >= 0 && pix_clk - last_hs != 800) hs_bad++;
      last_hs = pix_clk;
      hs_seen++;
    end
    if (vs_q && !vga_vs) begin
      if (last_vs >= 0) begin
        check(pix_clk - last_vs == 420000, $sformatf("frame period %0d pixel clocks", pix_clk - last_vs));
        vs_periods++;
      end
      last_vs = pix_clk;
    end
    if (!vga_vs) pcount = 0;
    else if (vga_blank_n) begin
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
        if (frames_done > 0) check(frame_kind >= 0, $sformatf("frame %0d is a whole picture", frames_done));
        if (frame_kind >= 0) n_frames_ok++;
        frames_done++;
      end
    end
  end

  task automatic wait_frames(int n);
    int f0;
    f0 = frames_done;
    wait (frames_done >= f0 + n);
  endtask

  // ---------------- processor side ----------------
  task automatic ci_op(input logic [2:0] sel, input logic [1:0] n, input logic [31:0] a,
                       input logic [31:0] b, output int cycles);
    @(negedge clk_sys);
    ci_sel = sel; ci_n = n; ci_dataa = a; ci_datab = b; ci_start = 1;
    @(negedge clk_sys);
    ci_start = 0;
    cycles = 1;
    while (!ci_done) begin
      @(negedge clk_sys);
      cycles++;
    end
  endtask

  task automatic draw_rect(int base, int x1, int y1, int x2, int y2, logic [7:0] c, output int cyc);
    ci_op(0, 0, 32'(base), 32'(c), cyc);
    ci_op(0, 1, {16'(y1), 16'(x1)}, {16'(y2), 16'(x2)}, cyc);
    ci_op(0, 2, 0, 0, cyc);
    for (int y = y1; y <= y2; y++) for (int x = x1; x <= x2; x++) plot(base, x, y, c);
  endtask

  task automatic draw_line(int base, int x0, int y0, int x1, int y1, logic [7:0] c);
    int ddx, ddy, stx, sty, e, e2, cyc, npts;
    ci_op(1, 0, 32'(base), 32'(c), cyc);
    ci_op(1, 1, {16'(y0), 16'(x0)}, {16'(y1), 16'(x1)}, cyc);
    ci_op(1, 2, 0, 0, cyc);
    ddx = (x1 > x0) ? x1 - x0 : x0 - x1;
    ddy = (y1 > y0) ? y0 - y1 : y1 - y0;
    stx = (x0 < x1) ? 1 : -1;
    sty = (y0 < y1) ? 1 : -1;
    e = ddx + ddy;
    npts = 0;
    forever begin
      plot(base, x0, y0, c);
      npts++;
      if (x0 == x1 && y0 == y1) break;
      e2 = 2 * e;
      if (e2 >= ddy) begin e += ddy; x0 += stx; end
      if (e2 <= ddx) begin e += ddx; y0 += sty; end
    end
    check(cyc == npts + 1, $sformatf("line of %0d points took %0d clocks", npts, cyc));
  endtask

  int circ_cycles;
  task automatic draw_circle(int base, int cx, int cy, int r, logic [7:0] c);
    int x, y, d, cyc, steps;
    ci_op(2, 0, 32'(base), 32'(c), cyc);
    ci_op(2, 1, {16'(cy), 16'(cx)}, 32'(r), cyc);
    ci_op(2, 2, 0, 0, cyc);
    x = r; y = 0; d = 1 - r; steps = 0;
    while (y <= x) begin
      plot(base, cx + x, cy + y, c); plot(base, cx - x, cy + y, c);
      plot(base, cx + x, cy - y, c); plot(base, cx - x, cy - y, c);
      plot(base, cx + y, cy + x, c); plot(base, cx - y, cy + x, c);
      plot(base, cx + y, cy - x, c); plot(base, cx - y, cy - x, c);
      steps++;
      y++;
      if (d < 0) d += 2*y + 1;
      else begin x--; d += 2*(y - x) + 1; end
    end
    check(cyc == 8 * steps + 1, $sformatf("circle of %0d steps took %0d clocks", steps, cyc));
    circ_cycles = cyc;
  endtask

  task automatic check_sdram(int base, string what);
    repeat (4) @(negedge clk_sys);
    for (int i = 0; i < NPIX; i++)
      check(sdram.peek(base + i) == ref_mem[base + i],
            $sformatf("%s byte %0d = %02x, expected %02x", what, i, sdram.peek(base + i), ref_mem[base + i]));
  endtask

  initial begin
    int cyc, skipped;
    longint t0;
    logic [7:0] v;
    ci_start = 0; ci_sel = 0; ci_n = 0; ci_dataa = 0; ci_datab = 0;
    host_req = MM_REQ_IDLE;
    pal_address = 0; pal_write = 0; pal_read = 0; pal_writedata = 0;
    fbs_address = 0; fbs_write = 0; fbs_read = 0; fbs_writedata = 0; gen_read = 0;
    repeat (3) @(negedge clk_pix);
    for (int i = 0; i < 256; i++) begin
      logic [2:0] r, g;
      logic [1:0] b;
      {r, g, b} = 8'(i);
      ref_pal[i] = {r, r[2:1], g, g, b, b, b[1]};
    end
    for (int i = 0; i < NPIX; i++) begin
      shown_cur[i]  = 8'((i % W) ^ (i / W));
      shown_prev[i] = shown_cur[i];
    end
    for (int i = 0; i < NPIX / 2; i++) sram.mem[i] = {shown_cur[2*i+1], shown_cur[2*i]};
    rst_sys = 0; rst_pix = 0;

    // the controller is polled right after reset
    @(posedge dut.u_gen.poll_done);
    t0 = sys_cyc;
    @(negedge clk_sys);
    gen_read = 1;
    @(negedge clk_sys);
    gen_read = 0;
    check(gen_readdata == 32'h0000_8014, $sformatf("controller register %08x", gen_readdata));

    // layer A: transparent background, two diagonals and a circle
    draw_rect(BUF_A, 0, 0, W - 1, H - 1, 8'h00, cyc);
    draw_line(BUF_A, 0, 0, W - 1, H - 1, 8'hE0);
    draw_line(BUF_A, W - 1, 0, 0, H - 1, 8'h1C);
    draw_circle(BUF_A, 320, 240, 239, 8'hFF);
    $display("circle of radius 239: %0d clocks", circ_cycles);
    check_sdram(BUF_A, "layer A");

    // layer B: full-screen fill, the worst case for the rectangle
    draw_rect(BUF_B, 0, 0, W - 1, H - 1, 8'h25, cyc);
    check(cyc == 1 + H * (W / 2 + 1), $sformatf("full-screen fill took %0d clocks", cyc));
    $display("full-screen rectangle: %0d clocks = %0.2f ms at 50 MHz", cyc, cyc * 20.0e-6);

    // full-screen layer copy of A onto B, colour 0 transparent
    ci_op(3, 0, 32'(BUF_A), 32'(BUF_B), cyc);
    ci_op(3, 1, 0, {16'(H), 16'(W)}, cyc);
    ci_op(3, 2, 0, {23'd0, 1'b1, 8'h00}, cyc);
    ci_op(3, 3, 0, 0, cyc);
    $display("full-screen layer copy: %0d clocks = %0.2f ms at 50 MHz", cyc, cyc * 20.0e-6);
    skipped = 0;
    for (int i = 0; i < NPIX; i++) begin
      v = ref_mem[BUF_A + i];
      if (v == 8'h00) skipped++;
      else ref_mem[BUF_B + i] = v;
    end
    check(ci_result == 32'(skipped), $sformatf("copy skipped %0d, expected %0d", ci_result, skipped));
    check_sdram(BUF_B, "layer B");

    // hand B to the display
    @(negedge clk_sys);
    fbs_address = 0; fbs_write = 1; fbs_writedata = BUF_B;
    @(negedge clk_sys);
    fbs_write = 0;
    ci_op(4, 0, 0, 0, cyc);
    $display("frame done: %0d clocks = %0.2f ms from request to copy complete", cyc, cyc * 20.0e-6);
    check(ci_result == 1, "one frame handed over");
    for (int i = 0; i < NPIX; i++) begin
      shown_prev[i] = shown_cur[i];
      shown_cur[i]  = ref_mem[BUF_B + i];
    end
    repeat (4) @(negedge clk_sys);
    $display("SRAM writes: %0d clocks = %0.2f ms from the frame end to the last word", wr_end - wr_start,
             (wr_end - wr_start) * 20.0e-6);
    check(wr_end - wr_start < 64'd420000, "copy into SRAM done within one display frame");
    for (int i = 0; i < NPIX / 2; i++)
      check(sram.mem[i] == {ref_mem[BUF_B + 2*i + 1], ref_mem[BUF_B + 2*i]}, $sformatf("SRAM word %0d", i));
    wait_frames(1);
    check(frame_kind == 1, "new picture displayed after the hand-over");

    // next poll 60 ms after the first
    @(posedge dut.u_gen.poll_done);
    check(sys_cyc - t0 == 64'd3_000_000, $sformatf("poll period %0d clocks", sys_cyc - t0));

    check(vs_periods >= 2, "frame periods measured");
    check(hs_bad == 0 && hs_seen > 1000, "800 pixel clocks per line");
    check(n_frames_ok >= frames_done - 1, "every frame after the first was a whole picture");
    $display("frames=%0d whole=%0d", frames_done, n_frames_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk_sys);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// gfx_top: 2D graphics platform for a 640x480, 256-colour VGA display.
//
// A processor draws into 640x480 byte-per-pixel framebuffers in SDRAM through
// hardware drawing instructions (filled rectangle, Bresenham line, circle
// outline, rectangle copy with optional transparent colour for layer
// compositing). When a frame is finished, the frame-done instruction copies the
// final SDRAM framebuffer into the SRAM display buffer, starting at the end of
// the frame being shown and yielding to display reads, so the picture never
// tears. The display path reads SRAM into a two-clock pixel FIFO, decodes each
// palette index to RGB565 through a 256-entry palette RAM and drives a 640x480
// @ 60 Hz VGA timing generator. A Genesis controller interface polls two game
// pads into a register.
//
// Interfaces (all on clk_sys unless noted):
//  * Custom-instruction port: ci_sel picks the instruction (0 rectangle, 1 line,
//    2 circle, 3 rectangle copy, 4 frame done) and must be held, with n and the
//    operands, from `ci_start` to `ci_done`; see each instruction for its n codes.
//  * host_req/host_rsp: the processor's own data path to SDRAM (pixel writes,
//    loading bitmaps), one master of the SDRAM arbiter.
//  * sdram_req/sdram_rsp: Avalon-MM master towards the SDRAM controller, byte
//    addresses, 16-bit data, pipelined reads.
//  * pal_*: palette RAM slave; fbs_*: streamer registers; gen_*: controller
//    register.
//  * SRAM pins with the data bus split into dq_o/dq_oe/dq_i (the bidirectional
//    buffer is at the pad).
//  * VGA DAC pins on clk_pix (25.2 MHz).
//  * GPIO header: the controller adapter board's pins, split into in/out/enable.
// The block structure and data flow follow the described design; bus widths,
// register layouts and the instruction selector are this design's own.
module gfx_top
  import gfx_pkg::*;
#(
  parameter int unsigned W          = SCREEN_W,
  parameter int unsigned H          = SCREEN_H,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned BURST      = 32,
  parameter int unsigned HBLANK     = H_FRONT_PORCH + H_SYNC + H_BACK_PORCH,
  parameter int unsigned VBLANK     = V_FRONT_PORCH + V_SYNC + V_BACK_PORCH,
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned POLL_MS    = 60
) (
  input  logic        clk_sys,
  input  logic        rst_sys,
  input  logic        clk_pix,
  input  logic        rst_pix,
  // custom instructions
  input  logic        ci_start,
  input  logic [2:0]  ci_sel,
  input  logic [1:0]  ci_n,
  input  logic [31:0] ci_dataa,
  input  logic [31:0] ci_datab,
  output logic        ci_done,
  output logic [31:0] ci_result,
  // processor data path to SDRAM
  input  mm_req_t     host_req,
  output mm_rsp_t     host_rsp,
  // SDRAM controller
  output mm_req_t     sdram_req,
  input  mm_rsp_t     sdram_rsp,
  // palette slave
  input  logic [7:0]  pal_address,
  input  logic        pal_write,
  input  logic [15:0] pal_writedata,
  input  logic        pal_read,
  output logic [15:0] pal_readdata,
  // streamer slave
  input  logic        fbs_address,
  input  logic        fbs_write,
  input  logic [31:0] fbs_writedata,
  input  logic        fbs_read,
  output logic [31:0] fbs_readdata,
  // controller slave
  input  logic        gen_read,
  output logic [31:0] gen_readdata,
  // SRAM
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_we_n,
  output logic        sram_oe_n,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  output logic        sram_ce_n,
  // VGA DAC (clk_pix)
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic        vga_underflow,
  // GPIO header (controller adapter)
  input  logic [35:0] gpio_i,
  output logic [35:0] gpio_o,
  output logic [35:0] gpio_oe
);

  localparam int unsigned NM = 6;
  localparam int unsigned M_HOST = 0, M_FBS = 1, M_RECT = 2, M_LINE = 3, M_CIRC = 4, M_COPY = 5;

  mm_req_t m_req [NM];
  mm_rsp_t m_rsp [NM];

  assign m_req[M_HOST] = host_req;
  assign host_rsp      = m_rsp[M_HOST];

  avalon_arbiter #(.N(NM)) u_bus (
    .clk  (clk_sys),
    .rst  (rst_sys),
    .m_req(m_req),
    .m_rsp(m_rsp),
    .s_req(sdram_req),
    .s_rsp(sdram_rsp),
    .owner()
  );

  // ---------------- custom instructions ----------------
  ci_req_t ci_rect, ci_line, ci_circ, ci_copy, ci_fd;
  always_comb begin
    ci_rect = '{start: ci_start && ci_sel == 3'd0, n: ci_n, dataa: ci_dataa, datab: ci_datab};
    ci_line = '{start: ci_start && ci_sel == 3'd1, n: ci_n, dataa: ci_dataa, datab: ci_datab};
    ci_circ = '{start: ci_start && ci_sel == 3'd2, n: ci_n, dataa: ci_dataa, datab: ci_datab};
    ci_copy = '{start: ci_start && ci_sel == 3'd3, n: ci_n, dataa: ci_dataa, datab: ci_datab};
    ci_fd   = '{start: ci_start && ci_sel == 3'd4, n: ci_n, dataa: ci_dataa, datab: ci_datab};
  end

  logic [4:0]  done_v;
  logic [31:0] res_v [5];

  ci_draw_rect #(.W(W), .H(H)) u_rect (
    .clk(clk_sys), .rst(rst_sys), .ci(ci_rect),
    .ci_done(done_v[0]), .ci_result(res_v[0]), .running(),
    .m_req(m_req[M_RECT]), .m_rsp(m_rsp[M_RECT])
  );

  ci_draw_line #(.W(W), .H(H)) u_line (
    .clk(clk_sys), .rst(rst_sys), .ci(ci_line),
    .ci_done(done_v[1]), .ci_result(res_v[1]), .running(), .clipped(),
    .m_req(m_req[M_LINE]), .m_rsp(m_rsp[M_LINE])
  );

  ci_draw_circ #(.W(W), .H(H)) u_circ (
    .clk(clk_sys), .rst(rst_sys), .ci(ci_circ),
    .ci_done(done_v[2]), .ci_result(res_v[2]), .running(),
    .m_req(m_req[M_CIRC]), .m_rsp(m_rsp[M_CIRC])
  );

  ci_copy_rect #(.W(W)) u_copy (
    .clk(clk_sys), .rst(rst_sys), .ci(ci_copy),
    .ci_done(done_v[3]), .ci_result(res_v[3]), .running(),
    .m_req(m_req[M_COPY]), .m_rsp(m_rsp[M_COPY])
  );

  logic copy_req, copy_done;
  ci_frame_done u_fd (
    .clk(clk_sys), .rst(rst_sys), .ci(ci_fd),
    .ci_done(done_v[4]), .ci_result(res_v[4]), .running(),
    .copy_req, .copy_done
  );

  always_comb begin
    ci_done   = 1'b0;
    ci_result = '0;
    for (int i = 0; i < 5; i++) begin
      if (ci_sel == 3'(i)) begin
        ci_done   = done_v[i];
        ci_result = res_v[i];
      end
    end
  end

  // ---------------- display path ----------------
  logic    px_valid, px_sop, px_ready;
  colour_t px_data;

  fb_streamer #(.W(W), .H(H), .FIFO_DEPTH(FIFO_DEPTH), .BURST(BURST)) u_fbs (
    .clk_sys, .rst_sys, .clk_pix, .rst_pix,
    .mm_address  (fbs_address),
    .mm_write    (fbs_write),
    .mm_writedata(fbs_writedata),
    .mm_read     (fbs_read),
    .mm_readdata (fbs_readdata),
    .copy_req,
    .copy_done,
    .copy_busy   (),
    .m_req       (m_req[M_FBS]),
    .m_rsp       (m_rsp[M_FBS]),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_we_n, .sram_oe_n, .sram_ub_n, .sram_lb_n, .sram_ce_n,
    .px_valid, .px_data, .px_sop, .px_ready,
    .frame_end   (),
    .write_paused(),
    .read_held   ()
  );

  logic    rgb_valid, rgb_sop, rgb_ready;
  rgb565_t rgb_data;

  palette_decoder u_pal (
    .clk_sys, .rst_sys,
    .mm_address  (pal_address),
    .mm_write    (pal_write),
    .mm_writedata(pal_writedata),
    .mm_read     (pal_read),
    .mm_readdata (pal_readdata),
    .clk_pix, .rst_pix,
    .in_valid (px_valid),
    .in_data  (px_data),
    .in_sop   (px_sop),
    .in_ready (px_ready),
    .out_valid(rgb_valid),
    .out_data (rgb_data),
    .out_sop  (rgb_sop),
    .out_ready(rgb_ready)
  );

  vga_sync_gen #(
    .HA(W), .HFP(H_FRONT_PORCH * HBLANK / (H_FRONT_PORCH + H_SYNC + H_BACK_PORCH)),
    .HS(H_SYNC * HBLANK / (H_FRONT_PORCH + H_SYNC + H_BACK_PORCH)),
    .HBP(HBLANK - (H_FRONT_PORCH * HBLANK / (H_FRONT_PORCH + H_SYNC + H_BACK_PORCH))
               - (H_SYNC * HBLANK / (H_FRONT_PORCH + H_SYNC + H_BACK_PORCH))),
    .VA(H), .VFP(V_FRONT_PORCH * VBLANK / (V_FRONT_PORCH + V_SYNC + V_BACK_PORCH)),
    .VS(V_SYNC * VBLANK / (V_FRONT_PORCH + V_SYNC + V_BACK_PORCH)),
    .VBP(VBLANK - (V_FRONT_PORCH * VBLANK / (V_FRONT_PORCH + V_SYNC + V_BACK_PORCH))
               - (V_SYNC * VBLANK / (V_FRONT_PORCH + V_SYNC + V_BACK_PORCH)))
  ) u_vga (
    .clk(clk_pix), .rst(rst_pix),
    .in_valid(rgb_valid), .in_data(rgb_data), .in_sop(rgb_sop), .in_ready(rgb_ready),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n,
    .frame_start(), .underflow(vga_underflow), .in_sync()
  );

  // ---------------- game controllers ----------------
  // Adapter board wiring, header pin -> GPIO bit: player 1 UP 40->35, DOWN 36->31,
  // LEFT 32->27, RIGHT 28->25, AB 38->33, STARTC 26->23, SEL 34->29; player 2 UP
  // 16->13, DOWN 10->9, LEFT 6->5, RIGHT 4->3, AB 14->11, STARTC 2->1, SEL 8->7.
  logic [1:0] pad_sel;
  genesis_if #(.CLK_HZ(CLK_HZ), .POLL_MS(POLL_MS)) u_gen (
    .clk(clk_sys), .rst(rst_sys),
    .pad_up    ({gpio_i[13], gpio_i[35]}),
    .pad_down  ({gpio_i[9],  gpio_i[31]}),
    .pad_left  ({gpio_i[5],  gpio_i[27]}),
    .pad_right ({gpio_i[3],  gpio_i[25]}),
    .pad_ab    ({gpio_i[11], gpio_i[33]}),
    .pad_startc({gpio_i[1],  gpio_i[23]}),
    .pad_sel,
    .read    (gen_read),
    .readdata(gen_readdata),
    .poll_done()
  );

  always_comb begin
    gpio_o      = '0;
    gpio_oe     = '0;
    gpio_o[29]  = pad_sel[0];
    gpio_oe[29] = 1'b1;
    gpio_o[7]   = pad_sel[1];
    gpio_oe[7]  = 1'b1;
  end

endmodule

// fb_streamer: the frame reader and framebuffer copier of the video output.
//
// It joins the SDRAM reader, the SRAM manager and the pixel FIFO. The processor
// sets the SDRAM address of the final (composited) framebuffer through a small
// register slave. A copy request (from the frame-done instruction) starts the
// SDRAM reader on the whole buffer at once, so its first burst is fetched while
// the SRAM manager waits for the end of the frame being shown; the manager then
// writes the frame into SRAM, yielding to FIFO refills, and `copy_done` pulses
// when the last word is in SRAM. Out of the FIFO comes the palette-index pixel
// stream, on the pixel clock, with its frame-start flag.
//
// Register slave (system clock, one-cycle read latency):
//   address 0  read/write: SDRAM byte address of the frame to copy
//   address 1  read: bit 0 copy in progress
// Parameters W, H give the frame size; FRAME_WORDS = W * H / 2 SRAM words.
// The structure (SDRAM burst reader, DMA manager, two-clock FIFO, base address
// register) follows the described design; the register map is this design's own.
module fb_streamer
  import gfx_pkg::*;
#(
  parameter int unsigned W          = SCREEN_W,
  parameter int unsigned H          = SCREEN_H,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned BURST      = 32
) (
  input  logic        clk_sys,
  input  logic        rst_sys,
  input  logic        clk_pix,
  input  logic        rst_pix,
  // register slave
  input  logic        mm_address,
  input  logic        mm_write,
  input  logic [31:0] mm_writedata,
  input  logic        mm_read,
  output logic [31:0] mm_readdata,
  // copy control
  input  logic        copy_req,
  output logic        copy_done,
  output logic        copy_busy,
  // SDRAM master
  output mm_req_t     m_req,
  input  mm_rsp_t     m_rsp,
  // SRAM pins
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_we_n,
  output logic        sram_oe_n,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  output logic        sram_ce_n,
  // pixel stream, pixel clock
  output logic        px_valid,
  output colour_t     px_data,
  output logic        px_sop,
  input  logic        px_ready,
  // events
  output logic        frame_end,
  output logic        write_paused,
  output logic        read_held
);

  localparam int unsigned FRAME_WORDS = W * H / 2;

  logic [ADDR_W-1:0] base;
  logic              mgr_busy;
  logic              reader_busy, fifo_full;   // observed by assertions only

  always_ff @(posedge clk_sys) begin
    if (rst_sys) begin
      base        <= '0;
      mm_readdata <= '0;
    end else begin
      if (mm_write && !mm_address) base <= mm_writedata;
      if (mm_read) mm_readdata <= mm_address ? {31'd0, mgr_busy} : base;
    end
  end

  logic        start_copy;
  assign start_copy = copy_req && !mgr_busy;

  logic        cp_valid, cp_ready;
  logic [15:0] cp_data;

  fb_sdram_reader #(.BURST(BURST), .DEPTH(2 * BURST)) u_reader (
    .clk      (clk_sys),
    .rst      (rst_sys),
    .start    (start_copy),
    .base     (base),
    .nwords   (24'(FRAME_WORDS)),
    .busy     (reader_busy),
    .m_req,
    .m_rsp,
    .out_valid(cp_valid),
    .out_data (cp_data),
    .out_ready(cp_ready)
  );

  logic [$clog2(FIFO_DEPTH):0] fifo_level;
  logic        fifo_wr, fifo_sop;
  logic [15:0] fifo_wdata;

  fb_dma_manager #(.FRAME_WORDS(FRAME_WORDS), .FIFO_DEPTH(FIFO_DEPTH)) u_mgr (
    .clk        (clk_sys),
    .rst        (rst_sys),
    .fifo_level,
    .fifo_wr,
    .fifo_wdata,
    .fifo_sop,
    .copy_start (start_copy),
    .copy_busy  (mgr_busy),
    .copy_done,
    .cp_valid,
    .cp_data,
    .cp_ready,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_we_n, .sram_oe_n, .sram_ub_n, .sram_lb_n, .sram_ce_n,
    .frame_end,
    .write_paused,
    .read_held
  );

  pixel_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk_wr   (clk_sys),
    .rst_wr   (rst_sys),
    .wr       (fifo_wr),
    .wr_data  (fifo_wdata),
    .wr_sop   (fifo_sop),
    .full     (fifo_full),
    .wr_level (fifo_level),
    .clk_rd   (clk_pix),
    .rst_rd   (rst_pix),
    .out_valid(px_valid),
    .out_data (px_data),
    .out_sop  (px_sop),
    .out_ready(px_ready)
  );

  assign copy_busy = mgr_busy;

  // The manager's watermarks keep the FIFO from ever filling up, and the reader
  // has finished issuing requests whenever a copy ends
  assert property (@(posedge clk_sys) disable iff (rst_sys) !fifo_full);
  assert property (@(posedge clk_sys) disable iff (rst_sys) copy_done |-> !reader_busy);

endmodule

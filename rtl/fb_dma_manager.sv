// fb_dma_manager: owns the SRAM framebuffer and schedules its two users.
//
// The SRAM holds the frame being shown, one 16-bit word per two pixels, words
// 0 .. FRAME_WORDS-1. Two kinds of access compete for it, one per system clock:
//
//  * Refill reads. When the pixel FIFO's fill drops below LOW_WM words, the
//    manager reads consecutive frame words into it until the fill reaches
//    HIGH_WM or the last word of the frame has been read. The first word of a
//    frame is flagged as frame start. Reading the last word is the "frame end".
//  * Copy writes. After `copy_start`, words streamed from the SDRAM reader are
//    written to SRAM from word 0 up, but only once the next frame end has
//    passed, so the copy starts right after the previous frame left the SRAM.
//    Refill reads take priority: a write waits in any cycle the FIFO needs
//    data. While a copy is running a read never overtakes the write address,
//    so the display never shows a word of the new frame area that still holds
//    old data. `copy_done` pulses when the last write is issued; it reaches the
//    SRAM pins in the next clock.
//
// SRAM pins are registered: a decision made in cycle t drives the pins for
// cycle t+1, and read data is taken into the FIFO at the end of cycle t+1. The
// chip stays enabled with both byte lanes on; WE_N is low for each write cycle.
// Event outputs (frame_end, write_paused, read_held) pulse once per occurrence.
// The refill-priority scheme and the start of copying at a frame end follow the
// described design; the watermarks, the no-overtake rule and the SRAM cycle
// timing are this design's own.
module fb_dma_manager
  import gfx_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = SCREEN_W * SCREEN_H / 2,
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned LOW_WM      = FIFO_DEPTH / 4,
  parameter int unsigned HIGH_WM     = FIFO_DEPTH - 4
) (
  input  logic        clk,
  input  logic        rst,
  // pixel FIFO write side
  input  logic [$clog2(FIFO_DEPTH):0] fifo_level,
  output logic        fifo_wr,
  output logic [15:0] fifo_wdata,
  output logic        fifo_sop,
  // copy control and data from the SDRAM reader
  input  logic        copy_start,
  output logic        copy_busy,
  output logic        copy_done,
  input  logic        cp_valid,
  input  logic [15:0] cp_data,
  output logic        cp_ready,
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
  // events
  output logic        frame_end,
  output logic        write_paused,
  output logic        read_held
);

  localparam int LW = $clog2(FIFO_DEPTH) + 1;
  localparam logic [17:0] LAST = 18'(FRAME_WORDS - 1);

  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_WRITE} cstate_t;
  cstate_t cstate;

  logic [17:0] rd_addr, wr_addr;
  logic        refill;
  logic        rd_issued, rd_sop_q;

  logic [LW:0] level_eff;
  assign level_eff = (LW+1)'(fifo_level) + (LW+1)'(rd_issued);

  logic read_ok, do_read, do_write;
  assign read_ok  = !(cstate == C_WRITE && rd_addr >= wr_addr);
  assign do_read  = refill && read_ok;
  assign do_write = !do_read && cstate == C_WRITE && cp_valid;
  assign cp_ready = do_write;

  assign frame_end    = do_read && rd_addr == LAST;
  assign write_paused = cstate == C_WRITE && cp_valid && do_read;
  assign read_held    = refill && !read_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_addr   <= '0;
      wr_addr   <= '0;
      refill    <= 1'b0;
      cstate    <= C_IDLE;
      rd_issued <= 1'b0;
      rd_sop_q  <= 1'b0;
      sram_addr <= '0;
      sram_dq_o <= '0;
      sram_dq_oe <= 1'b0;
      sram_we_n <= 1'b1;
      sram_oe_n <= 1'b1;
    end else begin
      // refill control
      if (refill) begin
        if (do_read && (rd_addr == LAST || level_eff + 1'b1 >= (LW+1)'(HIGH_WM)))
          refill <= 1'b0;
      end else if (level_eff < (LW+1)'(LOW_WM)) begin
        refill <= 1'b1;
      end

      if (do_read) rd_addr <= (rd_addr == LAST) ? '0 : rd_addr + 1'b1;

      // copy control
      unique case (cstate)
        C_IDLE:  if (copy_start) begin
          cstate  <= C_WAIT;
          wr_addr <= '0;
        end
        C_WAIT:  if (frame_end) cstate <= C_WRITE;
        C_WRITE: if (do_write) begin
          wr_addr <= wr_addr + 1'b1;
          if (wr_addr == LAST) cstate <= C_IDLE;
        end
        default: cstate <= C_IDLE;
      endcase

      // SRAM pin register
      sram_addr  <= do_read ? rd_addr : wr_addr;
      sram_dq_o  <= cp_data;
      sram_dq_oe <= do_write;
      sram_we_n  <= !do_write;
      sram_oe_n  <= !do_read;
      rd_issued  <= do_read;
      rd_sop_q   <= do_read && rd_addr == '0;
    end
  end

  assign copy_done  = do_write && wr_addr == LAST;
  assign copy_busy  = cstate != C_IDLE;
  assign sram_ub_n  = 1'b0;
  assign sram_lb_n  = 1'b0;
  assign sram_ce_n  = 1'b0;

  // FIFO side: data read in the previous cycle's decision arrives now
  assign fifo_wr    = rd_issued;
  assign fifo_wdata = sram_dq_i;
  assign fifo_sop   = rd_sop_q;

  assert property (@(posedge clk) disable iff (rst) !(do_read && do_write));

endmodule

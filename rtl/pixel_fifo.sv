// pixel_fifo: dual-clock FIFO between the SRAM frame reader (system clock) and
// the video output (pixel clock).
//
// The write side takes one 16-bit SRAM word, two pixels, per system clock,
// together with a start-of-frame flag for its first pixel. The read side gives
// one 8-bit pixel per pixel clock, the low byte of each word first, as a
// valid/ready stream with the start-of-frame flag on the first pixel only.
// Write and read pointers cross the clock domains in Gray code through two
// flip-flops each. The write side reports its fill level in words, which the
// frame reader uses to decide when to refill and when SRAM writes must yield;
// that level counts words not yet seen as read, so it never under-states the fill.
//
// Parameters: DEPTH words (a power of two).
// Timing: a written word becomes visible to the reader three to four pixel
// clocks later; the read data path is combinational from the storage array.
// The two-pixels-in, one-pixel-out behaviour across two clocks follows the
// described design; the depth and the flag are this design's own.
module pixel_fifo
  import gfx_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk_wr,
  input  logic                     rst_wr,
  input  logic                     wr,
  input  logic [15:0]              wr_data,   // {pixel 1, pixel 0}
  input  logic                     wr_sop,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   wr_level,
  input  logic                     clk_rd,
  input  logic                     rst_rd,
  output logic                     out_valid,
  output colour_t                  out_data,
  output logic                     out_sop,
  input  logic                     out_ready
);

  localparam int AW = $clog2(DEPTH);

  logic [16:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [AW:0] wptr, wptr_gray;   // write domain
  logic [AW:0] rptr, rptr_gray;   // read domain

  // ---------------- write domain ----------------
  logic [AW:0] rgray_m, rgray_s;   // read pointer synchronised into write domain
  logic [AW:0] rptr_w;

  always_ff @(posedge clk_wr) begin
    if (rst_wr) begin
      rgray_m <= '0;
      rgray_s <= '0;
    end else begin
      rgray_m <= rptr_gray;
      rgray_s <= rgray_m;
    end
  end
  assign rptr_w   = gray2bin(rgray_s);
  assign wr_level = wptr - rptr_w;
  assign full     = (wr_level == (AW+1)'(DEPTH));

  always_ff @(posedge clk_wr) begin
    if (wr && !full) mem[wptr[AW-1:0]] <= {wr_sop, wr_data};
  end
  always_ff @(posedge clk_wr) begin
    if (rst_wr) begin
      wptr      <= '0;
      wptr_gray <= '0;
    end else if (wr && !full) begin
      wptr      <= wptr + 1'b1;
      wptr_gray <= bin2gray(wptr + 1'b1);
    end
  end

  // ---------------- read domain ----------------
  logic [AW:0] wgray_m, wgray_s;
  logic        half;            // 0: low byte next, 1: high byte next

  always_ff @(posedge clk_rd) begin
    if (rst_rd) begin
      wgray_m <= '0;
      wgray_s <= '0;
    end else begin
      wgray_m <= wptr_gray;
      wgray_s <= wgray_m;
    end
  end

  logic [16:0] head;
  assign head      = mem[rptr[AW-1:0]];
  assign out_valid = (rptr_gray != wgray_s);
  assign out_data  = half ? head[15:8] : head[7:0];
  assign out_sop   = !half && head[16];

  always_ff @(posedge clk_rd) begin
    if (rst_rd) begin
      rptr      <= '0;
      rptr_gray <= '0;
      half      <= 1'b0;
    end else if (out_valid && out_ready) begin
      half <= !half;
      if (half) begin
        rptr      <= rptr + 1'b1;
        rptr_gray <= bin2gray(rptr + 1'b1);
      end
    end
  end

  assert property (@(posedge clk_wr) disable iff (rst_wr) wr |-> !full);

endmodule

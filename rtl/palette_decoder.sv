// palette_decoder: turns 8-bit palette indices into 16-bit RGB565 colours.
//
// A 256 x 16 palette RAM (512 bytes) sits between a pixel stream and a
// memory-mapped slave. The stream side runs on the pixel clock: each accepted
// index reads the RAM and the colour leaves one clock later, with the
// start-of-frame flag carried alongside; valid/ready flow control holds the
// pipeline when the sink stalls. The slave side runs on the system clock and
// reads or writes palette entries (word address = palette index), so the
// processor can switch palettes at any time; a switch is not synchronised to
// the frame.
//
// The RAM starts out holding the default palette, the direct RGB332 to RGB565
// mapping: index bits [7:5] red, [4:2] green, [1:0] blue, each widened by
// repeating its high bits (red r -> {r, r[2:1]}, green g -> {g, g}, blue b ->
// {b, b, b[1]}).
//
// Timing: stream latency one pixel clock, one pixel per clock; slave reads
// return one system clock after `read`.
// The 8-to-16-bit mapping, the RAM size and the dual-port structure follow the
// described design; the bit-widening rule of the default palette is this
// design's own reading of "standard 8-bit to 16-bit colour mapping".
module palette_decoder
  import gfx_pkg::*;
(
  // memory-mapped slave, system clock
  input  logic       clk_sys,
  input  logic       rst_sys,
  input  logic [7:0] mm_address,
  input  logic       mm_write,
  input  logic [15:0] mm_writedata,
  input  logic       mm_read,
  output logic [15:0] mm_readdata,
  // pixel stream, pixel clock
  input  logic       clk_pix,
  input  logic       rst_pix,
  input  logic       in_valid,
  input  colour_t    in_data,
  input  logic       in_sop,
  output logic       in_ready,
  output logic       out_valid,
  output rgb565_t    out_data,
  output logic       out_sop,
  input  logic       out_ready
);

  function automatic rgb565_t rgb332_to_565(colour_t c);
    logic [2:0] r, g;
    logic [1:0] b;
    {r, g, b} = c;
    return {r, r[2:1], g, g, b, b, b[1]};
  endfunction

  rgb565_t pal [256];

  initial begin
    for (int i = 0; i < 256; i++) pal[i] = rgb332_to_565(colour_t'(i));
  end

  // Port A: system-clock slave
  always_ff @(posedge clk_sys) begin
    if (mm_write) pal[mm_address] <= mm_writedata;
  end
  always_ff @(posedge clk_sys) begin
    if (rst_sys)      mm_readdata <= '0;
    else if (mm_read) mm_readdata <= pal[mm_address];
  end

  // Port B: pixel-clock lookup stage
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk_pix) begin
    if (in_valid && in_ready) out_data <= pal[in_data];
  end

  always_ff @(posedge clk_pix) begin
    if (rst_pix) begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      out_sop   <= in_valid && in_sop;
    end
  end

  assert property (@(posedge clk_pix) disable iff (rst_pix)
                   out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule

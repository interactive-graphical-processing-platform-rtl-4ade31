// vga_sync_gen: VGA timing generator and video DAC formatter.
//
// Two counters on the pixel clock walk an 800 x 525 raster (640 x 480 visible,
// 16/96/48 pixel clocks of horizontal front porch, sync and back porch, 10/2/33
// lines of vertical ones), which at 25.2 MHz gives 60.0 frames per second. In
// the visible area it takes one RGB565 pixel per clock from a valid/ready
// stream and expands it to the 10-bit-per-channel DAC format by repeating the
// high bits. Sync pulses are active low.
//
// Frame alignment: the stream marks the first pixel of each frame. Until that
// pixel is present at the top-left position, the generator is out of sync: it
// shows black and drops pixels that do not start a frame. If the stream runs
// dry in the visible area, the pixel is shown black, `underflow` pulses, and the
// generator waits for the next frame start.
//
// Timing: all outputs are registered, one pixel clock after the counter state
// they belong to. vga_sync_n is held low (no sync on green).
// The 640x480 @ 60 Hz timing numbers follow the described design; the stream
// alignment and underflow handling are this design's own.
module vga_sync_gen
  import gfx_pkg::*;
#(
  parameter int unsigned HA  = H_ACTIVE,
  parameter int unsigned HFP = H_FRONT_PORCH,
  parameter int unsigned HS  = H_SYNC,
  parameter int unsigned HBP = H_BACK_PORCH,
  parameter int unsigned VA  = V_ACTIVE,
  parameter int unsigned VFP = V_FRONT_PORCH,
  parameter int unsigned VS  = V_SYNC,
  parameter int unsigned VBP = V_BACK_PORCH
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  rgb565_t    in_data,
  input  logic       in_sop,
  output logic       in_ready,
  output logic [9:0] vga_r,
  output logic [9:0] vga_g,
  output logic [9:0] vga_b,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic       vga_blank_n,
  output logic       vga_sync_n,
  output logic       frame_start,   // pulses with the first visible pixel's outputs
  output logic       underflow,
  output logic       in_sync
);

  localparam int unsigned HT = HA + HFP + HS + HBP;
  localparam int unsigned VT = VA + VFP + VS + VBP;
  localparam int HW = $clog2(HT);
  localparam int VW = $clog2(VT);

  logic [HW-1:0] h;
  logic [VW-1:0] v;
  logic          synced;

  logic active, origin;
  assign active = (h < HW'(HA)) && (v < VW'(VA));
  assign origin = (h == '0) && (v == '0);

  logic show;     // a stream pixel is displayed at this position
  always_comb begin
    if (synced && !origin) begin
      show     = active && in_valid;
      in_ready = active;
    end else if (origin && in_valid && in_sop) begin
      show     = 1'b1;
      in_ready = 1'b1;
    end else begin
      show     = 1'b0;
      in_ready = in_valid && !in_sop;     // discard until a frame start
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      h <= '0;
      v <= '0;
      synced <= 1'b0;
    end else begin
      if (h == HW'(HT - 1)) begin
        h <= '0;
        v <= (v == VW'(VT - 1)) ? '0 : v + 1'b1;
      end else h <= h + 1'b1;

      if (origin)                        synced <= in_valid && in_sop;
      else if (synced && active && !in_valid) synced <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {vga_r, vga_g, vga_b} <= '0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
      frame_start <= 1'b0;
      underflow   <= 1'b0;
    end else begin
      if (show) begin
        vga_r <= {in_data[15:11], in_data[15:11]};
        vga_g <= {in_data[10:5], in_data[10:7]};
        vga_b <= {in_data[4:0], in_data[4:0]};
      end else begin
        {vga_r, vga_g, vga_b} <= '0;
      end
      vga_hs      <= !((h >= HW'(HA + HFP)) && (h < HW'(HA + HFP + HS)));
      vga_vs      <= !((v >= VW'(VA + VFP)) && (v < VW'(VA + VFP + VS)));
      vga_blank_n <= active;
      frame_start <= origin && show;
      underflow   <= synced && !origin && active && !in_valid;
    end
  end

  assign vga_sync_n = 1'b0;
  assign in_sync    = synced;

endmodule

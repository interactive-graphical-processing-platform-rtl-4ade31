// ci_copy_rect: custom instruction that copies a rectangular window from one
// framebuffer to another, with or without a transparent colour.
//
// This is the layer-compositing operation: a window of w x h pixels at (sx, sy)
// in the source buffer is copied to (dx, dy) in the destination buffer, row by
// row, through avalon_copy_seq. With transparency on, source pixels equal to the
// transparent colour are not written, so the destination shows through. Both
// buffers use a row stride of W bytes. The window is not clipped: the caller
// keeps it inside both buffers, as the software layer does.
//
// Custom-instruction sub-operations (register layout is this design's own):
//   n=0  dataa = source base byte address, datab = destination base byte address
//   n=1  dataa = {sy, sx}, datab = {h, w}          (unsigned 16-bit)
//   n=2  dataa = {dy, dx}, datab[8] = transparency on, datab[7:0] = colour
//   n=3  run; `ci_done` pulses when the last row is finished
// `ci_result` returns the number of pixels left out as transparent in the last run.
// Timing: about one clock per pixel for even-aligned windows (reads and writes
// of two pixels per clock, see avalon_copy_seq), up to about 1.5 when source and
// destination alignments differ, plus a few clocks per row and per 64-byte chunk.
module ci_copy_rect
  import gfx_pkg::*;
#(
  parameter int unsigned W = SCREEN_W
) (
  input  logic        clk,
  input  logic        rst,
  input  ci_req_t     ci,
  output logic        ci_done,
  output logic [31:0] ci_result,
  output logic        running,
  output mm_req_t     m_req,
  input  mm_rsp_t     m_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_ROW, S_WAIT} state_t;
  state_t state;

  logic [ADDR_W-1:0] src_base, dst_base;
  logic [15:0]       sx, sy, dx, dy, w, h, row;
  logic              t_en;
  colour_t           t_colour;
  logic              reg_done;
  logic [31:0]       skip_count;

  logic [ADDR_W-1:0] src_addr, dst_addr;
  assign src_addr = src_base + ADDR_W'(32'(sy + row) * W) + ADDR_W'(sx);
  assign dst_addr = dst_base + ADDR_W'(32'(dy + row) * W) + ADDR_W'(dx);

  logic row_start, row_busy, row_done;
  logic [1:0] skipped;
  assign row_start = (state == S_ROW);

  avalon_copy_seq u_row (
    .clk, .rst,
    .start   (row_start),
    .src     (src_addr),
    .dst     (dst_addr),
    .count   (w),
    .t_en    (t_en),
    .t_colour(t_colour),
    .busy    (row_busy),
    .done    (row_done),
    .skipped (skipped),
    .m_req,
    .m_rsp
  );

  logic last_row;
  assign last_row = (row == h - 16'd1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      {src_base, dst_base} <= '0;
      {sx, sy, dx, dy, w, h, row} <= '0;
      t_en     <= 1'b0;
      t_colour <= '0;
      reg_done <= 1'b0;
      skip_count <= '0;
    end else begin
      reg_done <= 1'b0;
      skip_count <= skip_count + 32'(skipped);
      unique case (state)
        S_IDLE: if (ci.start) begin
          unique case (ci.n)
            2'd0: begin src_base <= ci.dataa; dst_base <= ci.datab; reg_done <= 1'b1; end
            2'd1: begin
              sx <= ci.dataa[15:0]; sy <= ci.dataa[31:16];
              w  <= ci.datab[15:0]; h  <= ci.datab[31:16];
              reg_done <= 1'b1;
            end
            2'd2: begin
              dx <= ci.dataa[15:0]; dy <= ci.dataa[31:16];
              t_en <= ci.datab[8]; t_colour <= ci.datab[7:0];
              reg_done <= 1'b1;
            end
            default: begin
              row        <= '0;
              skip_count <= '0;
              if (w == 16'd0 || h == 16'd0) reg_done <= 1'b1;
              else                          state    <= S_ROW;
            end
          endcase
        end
        S_ROW:  state <= S_WAIT;
        S_WAIT: if (row_done) begin
          if (last_row) state <= S_IDLE;
          else begin
            row   <= row + 16'd1;
            state <= S_ROW;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ci_done   = reg_done || (state == S_WAIT && row_done && last_row);
  assign ci_result = skip_count + 32'(skipped);   // includes a skip in the final cycle
  assign running   = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (rst) row_start |-> !row_busy);

endmodule

// ci_draw_rect: custom instruction that fills a rectangle in a framebuffer.
//
// The processor first loads the instruction's registers (IDLE state), then
// issues the run sub-operation, which stalls it until the rectangle is drawn
// (RUNNING state). The corners are inclusive, may be given in either order and
// are clipped to the W x H framebuffer, so a rectangle reaching past the edge
// draws only its visible part. Each row is written by avalon_write_seq, two
// pixels per clock.
//
// Custom-instruction sub-operations (selected by n, the register layout is this
// design's own):
//   n=0  dataa = framebuffer base byte address, datab[7:0] = fill colour
//   n=1  dataa = {y1, x1}, datab = {y2, x2}   (signed 16-bit coordinates)
//   n=2  run; `ci_done` pulses when the last pixel write has been accepted
// Register writes complete with `ci_done` in the cycle after `start`.
// Timing: about ceil(width/2) + 2 clocks per visible row with a zero-wait memory.
// The IDLE/RUNNING structure and the per-instruction base, geometry and colour
// registers follow the described design.
module ci_draw_rect
  import gfx_pkg::*;
#(
  parameter int unsigned W = SCREEN_W,   // framebuffer width, also the row stride
  parameter int unsigned H = SCREEN_H
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

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_ROW, S_WAIT} state_t;
  state_t state;

  logic [ADDR_W-1:0] base;
  colour_t           colour;
  coord_t            x1, y1, x2, y2;

  // Clipped, ordered bounds (valid from S_SETUP on)
  coord_t xl, xr, yb;
  coord_t y;
  logic   reg_done;

  function automatic coord_t cmin(coord_t a, coord_t b);
    return (a < b) ? a : b;
  endfunction
  function automatic coord_t cmax(coord_t a, coord_t b);
    return (a > b) ? a : b;
  endfunction

  logic              row_start, row_busy, row_done;
  logic [ADDR_W-1:0] row_addr;
  logic [15:0]       row_count;

  assign row_addr  = base + ADDR_W'(unsigned'(32'(y)) * W) + ADDR_W'(unsigned'(32'(xl)));
  assign row_count = 16'(xr - xl + 16'sd1);
  assign row_start = (state == S_ROW);

  avalon_write_seq u_row (
    .clk, .rst,
    .start (row_start),
    .addr  (row_addr),
    .count (row_count),
    .colour(colour),
    .busy  (row_busy),
    .done  (row_done),
    .m_req,
    .m_rsp
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      base     <= '0;
      colour   <= '0;
      {x1, y1, x2, y2} <= '0;
      {xl, xr, yb} <= '0;
      y        <= '0;
      reg_done <= 1'b0;
    end else begin
      reg_done <= 1'b0;
      unique case (state)
        S_IDLE: if (ci.start) begin
          unique case (ci.n)
            2'd0: begin base <= ci.dataa; colour <= ci.datab[7:0]; reg_done <= 1'b1; end
            2'd1: begin
              x1 <= ci.dataa[15:0]; y1 <= ci.dataa[31:16];
              x2 <= ci.datab[15:0]; y2 <= ci.datab[31:16];
              reg_done <= 1'b1;
            end
            2'd2: state <= S_SETUP;
            default: reg_done <= 1'b1;
          endcase
        end
        S_SETUP: begin
          xl <= cmax(cmin(x1, x2), 16'sd0);
          xr <= cmin(cmax(x1, x2), 16'(W - 1));
          yb <= cmin(cmax(y1, y2), 16'(H - 1));
          y  <= cmax(cmin(y1, y2), 16'sd0);
          // Nothing visible: finish at once
          if (cmax(cmin(x1, x2), 16'sd0) > cmin(cmax(x1, x2), 16'(W - 1)) ||
              cmax(cmin(y1, y2), 16'sd0) > cmin(cmax(y1, y2), 16'(H - 1)))
            state <= S_IDLE;
          else
            state <= S_ROW;
        end
        S_ROW:  state <= S_WAIT;
        S_WAIT: if (row_done) begin
          if (y == yb) state <= S_IDLE;
          else begin
            y     <= y + 16'sd1;
            state <= S_ROW;
          end
        end
      endcase
    end
  end

  logic empty_finish;
  assign empty_finish = (state == S_SETUP) &&
      (cmax(cmin(x1, x2), 16'sd0) > cmin(cmax(x1, x2), 16'(W - 1)) ||
       cmax(cmin(y1, y2), 16'sd0) > cmin(cmax(y1, y2), 16'(H - 1)));

  assign ci_done   = reg_done || empty_finish || (state == S_WAIT && row_done && y == yb);
  assign ci_result = '0;
  assign running   = (state != S_IDLE);

  // The row engine is only started when it is idle
  assert property (@(posedge clk) disable iff (rst) row_start |-> !row_busy);

endmodule

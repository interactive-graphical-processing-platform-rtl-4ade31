// ci_draw_line: custom instruction that draws a line with Bresenham's algorithm.
//
// The line runs from (x1, y1) to (x2, y2), both end points included, in any of
// the eight octants, using only integer additions and compares. Every point of
// the line is stepped through, but only points inside the W x H framebuffer are
// written, so coordinates beyond the screen edge are handled gracefully (an
// off-screen point costs one clock and no write).
//
// Custom-instruction sub-operations (register layout is this design's own):
//   n=0  dataa = framebuffer base byte address, datab[7:0] = colour
//   n=1  dataa = {y1, x1}, datab = {y2, x2}   (signed 16-bit coordinates)
//   n=2  run; `ci_done` pulses when the last point has been handled
// Timing: one clock per point plus one setup clock with a zero-wait memory; the
// processor is stalled for the whole run.
// Bresenham's integer algorithm and the clipping of off-screen points follow the
// described design; the per-pixel byte-enable write is this design's own.
module ci_draw_line
  import gfx_pkg::*;
#(
  parameter int unsigned W = SCREEN_W,
  parameter int unsigned H = SCREEN_H
) (
  input  logic        clk,
  input  logic        rst,
  input  ci_req_t     ci,
  output logic        ci_done,
  output logic [31:0] ci_result,
  output logic        running,
  output logic        clipped,   // pulses for each point skipped as off-screen
  output mm_req_t     m_req,
  input  mm_rsp_t     m_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_PLOT} state_t;
  state_t state;

  logic [ADDR_W-1:0] base;
  colour_t           colour;
  coord_t            x1, y1, x2, y2;
  coord_t            x, y;
  logic signed [17:0] dx, dy, err;   // dy holds -|y2 - y1|
  logic               sx, sy;        // step direction: 1 = decrement
  logic               reg_done;

  logic on_screen;
  assign on_screen = (x >= 0) && (17'(x) < $signed(17'(W))) && (y >= 0) && (17'(y) < $signed(17'(H)));

  logic [ADDR_W-1:0] paddr;
  assign paddr = base + ADDR_W'(unsigned'(32'(y)) * W) + ADDR_W'(unsigned'(32'(x)));

  always_comb begin
    m_req            = MM_REQ_IDLE;
    m_req.write      = (state == S_PLOT) && on_screen;
    m_req.address    = {paddr[ADDR_W-1:1], 1'b0};
    m_req.writedata  = {colour, colour};
    m_req.byteenable = paddr[0] ? 2'b10 : 2'b01;
  end

  // The current point is finished this cycle
  logic step;
  assign step = (state == S_PLOT) && (!on_screen || !m_rsp.waitrequest);
  logic last;
  assign last = (x == x2) && (y == y2);

  logic signed [18:0] e2;
  assign e2 = 19'(err) <<< 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      base     <= '0;
      colour   <= '0;
      {x1, y1, x2, y2, x, y} <= '0;
      {dx, dy, err} <= '0;
      {sx, sy} <= '0;
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
          x   <= x1;
          y   <= y1;
          sx  <= (x2 < x1);
          sy  <= (y2 < y1);
          dx  <= (x2 >= x1) ? 18'(x2) - 18'(x1) : 18'(x1) - 18'(x2);
          dy  <= (y2 >= y1) ? 18'(y1) - 18'(y2) : 18'(y2) - 18'(y1);
          err <= ((x2 >= x1) ? 18'(x2) - 18'(x1) : 18'(x1) - 18'(x2))
               + ((y2 >= y1) ? 18'(y1) - 18'(y2) : 18'(y2) - 18'(y1));
          state <= S_PLOT;
        end
        S_PLOT: if (step) begin
          if (last) state <= S_IDLE;
          else begin
            // err accumulates both corrections when both axes step
            err <= err + ((e2 >= 19'(dy)) ? dy : 18'sd0) + ((e2 <= 19'(dx)) ? dx : 18'sd0);
            if (e2 >= 19'(dy)) x <= sx ? x - 16'sd1 : x + 16'sd1;
            if (e2 <= 19'(dx)) y <= sy ? y - 16'sd1 : y + 16'sd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ci_done   = reg_done || (step && last);
  assign ci_result = '0;
  assign running   = (state != S_IDLE);
  assign clipped   = (state == S_PLOT) && !on_screen;

endmodule

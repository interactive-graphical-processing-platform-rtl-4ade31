// ci_draw_circ: custom instruction that draws the outline of a circle.
//
// It runs the integer midpoint (Bresenham) circle algorithm over one octant,
// starting at (r, 0) and stepping y up while x >= y, and plots the eight
// symmetric points of every step. Points outside the W x H framebuffer are
// skipped. Filled circles are drawn by software from several calls.
//
// Custom-instruction sub-operations (register layout is this design's own):
//   n=0  dataa = framebuffer base byte address, datab[7:0] = colour
//   n=1  dataa = {cy, cx} (signed 16-bit), datab[15:0] = radius
//   n=2  run; `ci_done` pulses when the last point has been handled
// Timing: eight clocks per octant step (one per symmetric point) with a
// zero-wait memory, so about 8 * 0.71 * r clocks for radius r.
// The algorithm family follows the described design; the decision-variable
// form (d = 1 - r) and the point order are this design's own.
module ci_draw_circ
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
  output mm_req_t     m_req,
  input  mm_rsp_t     m_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_PLOT} state_t;
  state_t state;

  logic [ADDR_W-1:0] base;
  colour_t           colour;
  coord_t            cx, cy;
  logic [15:0]       radius;
  logic signed [17:0] ox, oy, d;   // octant point and decision variable
  logic [2:0]         k;           // which of the eight symmetric points
  logic               reg_done;

  // Current symmetric point
  logic signed [17:0] px, py;
  always_comb begin
    unique case (k)
      3'd0: begin px = 18'(cx) + ox; py = 18'(cy) + oy; end
      3'd1: begin px = 18'(cx) - ox; py = 18'(cy) + oy; end
      3'd2: begin px = 18'(cx) + ox; py = 18'(cy) - oy; end
      3'd3: begin px = 18'(cx) - ox; py = 18'(cy) - oy; end
      3'd4: begin px = 18'(cx) + oy; py = 18'(cy) + ox; end
      3'd5: begin px = 18'(cx) - oy; py = 18'(cy) + ox; end
      3'd6: begin px = 18'(cx) + oy; py = 18'(cy) - ox; end
      default: begin px = 18'(cx) - oy; py = 18'(cy) - ox; end
    endcase
  end

  logic on_screen;
  assign on_screen = (px >= 0) && (px < $signed(18'(W))) && (py >= 0) && (py < $signed(18'(H)));

  logic [ADDR_W-1:0] paddr;
  assign paddr = base + ADDR_W'(unsigned'(32'(py)) * W) + ADDR_W'(unsigned'(32'(px)));

  always_comb begin
    m_req            = MM_REQ_IDLE;
    m_req.write      = (state == S_PLOT) && on_screen;
    m_req.address    = {paddr[ADDR_W-1:1], 1'b0};
    m_req.writedata  = {colour, colour};
    m_req.byteenable = paddr[0] ? 2'b10 : 2'b01;
  end

  logic step;
  assign step = (state == S_PLOT) && (!on_screen || !m_rsp.waitrequest);

  // Next octant point, computed when the eighth point of this one is done
  logic signed [17:0] ny, nx, nd;
  always_comb begin
    ny = oy + 18'sd1;
    if (d < 0) begin
      nx = ox;
      nd = d + (ny <<< 1) + 18'sd1;
    end else begin
      nx = ox - 18'sd1;
      nd = d + ((ny - nx) <<< 1) + 18'sd1;
    end
  end
  logic last;
  assign last = (k == 3'd7) && (ny > nx);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      base     <= '0;
      colour   <= '0;
      {cx, cy} <= '0;
      radius   <= '0;
      {ox, oy, d} <= '0;
      k        <= '0;
      reg_done <= 1'b0;
    end else begin
      reg_done <= 1'b0;
      unique case (state)
        S_IDLE: if (ci.start) begin
          unique case (ci.n)
            2'd0: begin base <= ci.dataa; colour <= ci.datab[7:0]; reg_done <= 1'b1; end
            2'd1: begin
              cx <= ci.dataa[15:0]; cy <= ci.dataa[31:16];
              radius <= ci.datab[15:0];
              reg_done <= 1'b1;
            end
            2'd2: state <= S_SETUP;
            default: reg_done <= 1'b1;
          endcase
        end
        S_SETUP: begin
          ox    <= 18'(radius);
          oy    <= '0;
          d     <= 18'sd1 - 18'(radius);
          k     <= '0;
          state <= S_PLOT;
        end
        S_PLOT: if (step) begin
          k <= k + 3'd1;
          if (k == 3'd7) begin
            if (ny > nx) state <= S_IDLE;
            ox <= nx;
            oy <= ny;
            d  <= nd;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ci_done   = reg_done || (step && last);
  assign ci_result = '0;
  assign running   = (state != S_IDLE);

endmodule

// genesis_if: reads two Sega Genesis 3-button controllers and presents their
// buttons as one memory-mapped register.
//
// A Genesis pad is a multiplexer: with its select line low, pins 6 and 9 carry
// A and Start; with select high they carry B and C, and pins 3 and 4 carry Left
// and Right (which read low while select is low). Up and Down are on pins 1 and
// 2 in both phases. Buttons pull their pin low when pressed. Every POLL_MS
// milliseconds this block drives select low, waits SETTLE clocks, samples the
// low phase, drives select high, waits again and samples the high phase, then
// updates the register. Select idles high. Pad inputs pass through two
// flip-flops before use.
//
// Register (read at any address, one-cycle read latency), 1 = pressed:
//   bits  7:0  player 1 {start, c, b, a, right, left, down, up}
//   bits 15:8  player 2, same order
//   bits 31:16 zero
// Pad pins, index 0 = player 1: pad_up (pin 1), pad_down (pin 2), pad_left (3),
// pad_right (4), pad_ab (6), pad_startc (9); sel (7) is driven.
// The pin multiplexing follows the controller's published pinout; the
// register layout, settle time and select idle level are this design's own.
module genesis_if #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned POLL_MS = 60,
  parameter int unsigned SETTLE  = 100        // clocks between select change and sample
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  pad_up,
  input  logic [1:0]  pad_down,
  input  logic [1:0]  pad_left,
  input  logic [1:0]  pad_right,
  input  logic [1:0]  pad_ab,
  input  logic [1:0]  pad_startc,
  output logic [1:0]  pad_sel,
  // memory-mapped slave
  input  logic        read,
  output logic [31:0] readdata,
  output logic        poll_done     // pulses when the register is updated
);

  localparam int unsigned POLL_CYCLES = CLK_HZ / 1000 * POLL_MS;
  localparam int unsigned TMAX = (POLL_CYCLES > 2 * SETTLE + 3) ? POLL_CYCLES : 2 * SETTLE + 3;
  localparam int CW = $clog2(TMAX + 1);   // the timer also counts the settle times

  // Two-flop input synchroniser, 6 pins x 2 players
  logic [11:0] pins_meta, pins;
  always_ff @(posedge clk) begin
    pins_meta <= {pad_startc, pad_ab, pad_right, pad_left, pad_down, pad_up};
    pins      <= pins_meta;
  end
  logic [1:0] s_up, s_down, s_left, s_right, s_ab, s_startc;
  assign {s_startc, s_ab, s_right, s_left, s_down, s_up} = pins;

  typedef enum logic [1:0] {S_WAIT, S_LOW, S_HIGH} state_t;
  state_t state;

  logic [CW-1:0] timer;
  logic [1:0]    a_q, start_q;
  logic [15:0]   buttons;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_LOW;       // first poll right after reset
      timer   <= '0;
      a_q     <= '0;
      start_q <= '0;
      buttons <= '0;
      pad_sel <= 2'b00;
      poll_done <= 1'b0;
    end else begin
      poll_done <= 1'b0;
      unique case (state)
        S_WAIT: begin
          if (timer >= CW'(POLL_CYCLES - 1)) begin
            timer   <= '0;
            pad_sel <= 2'b00;
            state   <= S_LOW;
          end else timer <= timer + 1'b1;
        end
        S_LOW: begin
          if (timer >= CW'(SETTLE)) begin
            a_q     <= ~s_ab;
            start_q <= ~s_startc;
            pad_sel <= 2'b11;
            timer   <= '0;
            state   <= S_HIGH;
          end else timer <= timer + 1'b1;
        end
        S_HIGH: begin
          if (timer >= CW'(SETTLE)) begin
            for (int p = 0; p < 2; p++)
              buttons[p*8 +: 8] <= {start_q[p], ~s_startc[p], ~s_ab[p], a_q[p],
                                    ~s_right[p], ~s_left[p], ~s_down[p], ~s_up[p]};
            poll_done <= 1'b1;
            timer     <= CW'(2 * SETTLE + 2);   // poll period counts from its start
            state     <= S_WAIT;
          end else timer <= timer + 1'b1;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst)       readdata <= '0;
    else if (read) readdata <= {16'h0000, buttons};
  end

endmodule

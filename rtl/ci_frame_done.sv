// ci_frame_done: custom instruction that hands a finished frame to the display.
//
// Issuing it (any n) asks the frame streamer to copy the final SDRAM framebuffer
// into the SRAM display buffer. The instruction stays in its RUNNING state, and
// so stalls the processor, until the copy is complete, so software can start
// drawing the next frame as soon as it returns. Because the copy itself starts
// only at the end of the frame being shown, the swap is synchronised to the
// video frame. `ci_result` returns the number of frames handed over since reset.
//
// Timing: `copy_req` pulses the cycle after `start`; `ci_done` pulses in the
// cycle `copy_done` is seen.
// Triggering the SDRAM-to-SRAM copy from a custom instruction follows the
// described design; blocking until the copy ends and the frame count are this
// design's own.
module ci_frame_done
  import gfx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ci_req_t     ci,
  output logic        ci_done,
  output logic [31:0] ci_result,
  output logic        running,
  output logic        copy_req,
  input  logic        copy_done
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RUN} state_t;
  state_t      state;
  logic [31:0] frames;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      frames <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ci.start) state <= S_REQ;
        S_REQ:  state <= S_RUN;
        S_RUN:  if (copy_done) begin
          state  <= S_IDLE;
          frames <= frames + 32'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign copy_req  = (state == S_REQ);
  assign ci_done   = (state == S_RUN) && copy_done;
  assign ci_result = frames + 32'(ci_done);
  assign running   = (state != S_IDLE);

endmodule

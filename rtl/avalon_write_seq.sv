// avalon_write_seq: fills a contiguous run of bytes with one colour.
//
// Given a start byte address, a byte count and a colour, it issues Avalon-MM
// writes on a 16-bit bus, two pixels per accepted write. An odd start address
// gives a first write with only the high byte enabled, an odd remainder a last
// write with only the low byte enabled. It is the row engine of the rectangle
// and clear operations.
//
// Interface: pulse `start` with `addr`, `count` and `colour` valid; `busy` stays
// high until the last write is accepted, and `done` pulses in the cycle that
// write is accepted. A zero count gives `done` the cycle after `start`.
// Timing: one word per clock whenever `waitrequest` is low.
// Writing two pixels per clock follows the described design; the byte-enable
// handling of odd edges is this design's own.
module avalon_write_seq
  import gfx_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       count,
  input  colour_t           colour,
  output logic              busy,
  output logic              done,
  output mm_req_t           m_req,
  input  mm_rsp_t           m_rsp
);

  logic [ADDR_W-1:0] cur_addr;
  logic [15:0]       remaining;
  colour_t           col_q;
  logic              zero_done;

  // Bytes covered by the write presented in this cycle
  logic [1:0] nbytes;
  logic [1:0] be;
  always_comb begin
    if (cur_addr[0]) begin
      nbytes = 2'd1;
      be     = 2'b10;
    end else if (remaining == 16'd1) begin
      nbytes = 2'd1;
      be     = 2'b01;
    end else begin
      nbytes = 2'd2;
      be     = 2'b11;
    end
  end

  always_comb begin
    m_req            = MM_REQ_IDLE;
    m_req.write      = busy;
    m_req.address    = {cur_addr[ADDR_W-1:1], 1'b0};
    m_req.writedata  = {col_q, col_q};
    m_req.byteenable = be;
  end

  logic accepted;
  assign accepted = busy && !m_rsp.waitrequest;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      cur_addr  <= '0;
      remaining <= '0;
      col_q     <= '0;
      zero_done <= 1'b0;
    end else begin
      zero_done <= 1'b0;
      if (start && !busy) begin
        cur_addr  <= addr;
        remaining <= count;
        col_q     <= colour;
        busy      <= (count != 16'd0);
        zero_done <= (count == 16'd0);
      end else if (accepted) begin
        cur_addr  <= cur_addr + ADDR_W'(nbytes);
        remaining <= remaining - 16'(nbytes);
        if (remaining == 16'(nbytes)) busy <= 1'b0;
      end
    end
  end

  assign done = zero_done || (accepted && remaining == 16'(nbytes));

endmodule

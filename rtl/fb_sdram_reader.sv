// fb_sdram_reader: reads a framebuffer out of SDRAM in bursts.
//
// After `start` it reads `nwords` consecutive 16-bit words from byte address
// `base` with pipelined Avalon-MM reads and hands them on, in order, as a
// valid/ready stream. Reads are issued in bursts of BURST back-to-back
// requests, and a burst is only begun when the local buffer has room for all of
// it, counting reads still in flight, so returned data can never overflow it.
// A new `start` while busy restarts the transfer.
//
// Timing: one read request per clock during a burst; the first words are
// available once the memory's read latency has passed.
// Reading the SDRAM buffer in bursts follows the described design; BURST and the
// buffer depth are this design's own choices.
module fb_sdram_reader
  import gfx_pkg::*;
#(
  parameter int unsigned BURST = 32,
  parameter int unsigned DEPTH = 64        // local buffer, words; at least BURST
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [23:0]       nwords,
  output logic              busy,          // requests still to be issued
  output mm_req_t           m_req,
  input  mm_rsp_t           m_rsp,
  output logic              out_valid,
  output logic [15:0]       out_data,
  input  logic              out_ready
);

  localparam int AW = $clog2(DEPTH);

  logic [15:0]       buffer [DEPTH];
  logic [AW:0]       wp, rp;           // buffer pointers
  logic [AW:0]       reserved;         // words held plus reads in flight
  logic [ADDR_W-1:0] addr;
  logic [23:0]       left;             // words still to request
  logic [$clog2(BURST+1)-1:0] burst_left;
  logic              flushing;         // drop data of reads from a restarted transfer
  logic [AW:0]       inflight;

  logic req_acc, pop;
  assign req_acc = m_req.read && !m_rsp.waitrequest;
  assign pop     = out_valid && out_ready;

  always_comb begin
    m_req            = MM_REQ_IDLE;
    m_req.read       = (burst_left != 0);
    m_req.address    = {addr[ADDR_W-1:1], 1'b0};
    m_req.byteenable = 2'b11;
  end

  logic [AW:0] space;
  assign space = (AW+1)'(DEPTH) - reserved;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; reserved <= '0; inflight <= '0;
      addr <= '0; left <= '0; burst_left <= '0; flushing <= 1'b0;
    end else begin
      // bookkeeping of reads in flight
      inflight <= inflight + (AW+1)'(req_acc) - (AW+1)'(m_rsp.readdatavalid);

      if (start) begin
        addr       <= base;
        left       <= nwords;
        burst_left <= '0;
        wp <= '0; rp <= '0;
        reserved   <= inflight - (AW+1)'(m_rsp.readdatavalid);
        flushing   <= (inflight - (AW+1)'(m_rsp.readdatavalid)) != 0;
      end else begin
        if (m_rsp.readdatavalid && !flushing) begin
          buffer[wp[AW-1:0]] <= m_rsp.readdata;
          wp <= wp + 1'b1;
        end
        if (flushing && m_rsp.readdatavalid && inflight == (AW+1)'(1)) flushing <= 1'b0;
        if (pop) rp <= rp + 1'b1;
        reserved <= reserved + (AW+1)'(req_acc) - (AW+1)'(pop)
                  - (AW+1)'(flushing && m_rsp.readdatavalid);
        if (req_acc) begin
          addr       <= addr + ADDR_W'(2);
          left       <= left - 24'd1;
          burst_left <= burst_left - 1'b1;
        end else if (burst_left == 0 && left != 0 && space >= (AW+1)'(BURST)) begin
          burst_left <= (left >= 24'(BURST)) ? ($clog2(BURST+1))'(BURST)
                                             : ($clog2(BURST+1))'(left);
        end
      end
    end
  end

  assign busy      = (left != 0);
  assign out_valid = (wp != rp);
  assign out_data  = buffer[rp[AW-1:0]];

  assert property (@(posedge clk) disable iff (rst)
                   m_rsp.readdatavalid && !flushing |-> (wp - rp) < (AW+1)'(DEPTH));

endmodule

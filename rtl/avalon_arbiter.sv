// avalon_arbiter: shares one Avalon-MM slave (the SDRAM port) among N masters.
//
// A master that raises read or write is granted the slave when the slave is
// free; it keeps the grant while it keeps requesting and until every read it
// has issued has returned its data, so read data (returned later, flagged by
// readdatavalid) always goes back to the master that asked for it. When the
// owner lets go, the next requester is chosen round-robin, starting after the
// previous owner, in the same cycle. Masters that are not granted see
// waitrequest high.
//
// Timing: no added latency for the granted master; a change of owner costs no
// cycle when the slave has no reads outstanding.
// The shared bus itself comes from the described system; this arbitration
// scheme is this design's own, standing in for the generated interconnect.
module avalon_arbiter
  import gfx_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned MAX_OUTSTANDING = 255
) (
  input  logic    clk,
  input  logic    rst,
  input  mm_req_t m_req [N],
  output mm_rsp_t m_rsp [N],
  output mm_req_t s_req,
  input  mm_rsp_t s_rsp,
  output logic [((N > 1) ? $clog2(N) : 1)-1:0] owner   // master granted in this cycle
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] cur;          // current or last owner
  logic          held;         // cur still holds the grant
  localparam int OW = $clog2(MAX_OUTSTANDING + 1);
  logic [OW-1:0] outstanding;

  logic [N-1:0] reqv;
  always_comb
    for (int i = 0; i < N; i++) reqv[i] = m_req[i].read || m_req[i].write;

  // Round-robin choice among requesters, starting after `cur`
  logic [IW-1:0] pick;
  logic          any;
  always_comb begin
    pick = cur;
    any  = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(cur) + k) % N;
      if (!any && reqv[idx]) begin
        pick = IW'(idx);
        any  = 1'b1;
      end
    end
  end

  logic keep;
  assign keep = held && (reqv[cur] || outstanding != 0);
  logic [IW-1:0] sel;
  assign sel = keep ? cur : pick;

  always_comb begin
    s_req = keep || any ? m_req[sel] : MM_REQ_IDLE;
    for (int i = 0; i < N; i++) begin
      m_rsp[i].readdata      = s_rsp.readdata;
      m_rsp[i].readdatavalid = s_rsp.readdatavalid && (IW'(i) == sel);
      m_rsp[i].waitrequest   = !((keep || any) && IW'(i) == sel) || s_rsp.waitrequest;
    end
  end

  logic rd_accept;
  assign rd_accept = s_req.read && !s_rsp.waitrequest;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur         <= '0;
      held        <= 1'b0;
      outstanding <= '0;
    end else begin
      cur  <= sel;
      held <= keep || any;
      outstanding <= outstanding + OW'(rd_accept) - OW'(s_rsp.readdatavalid);
    end
  end

  assign owner = sel;

  // Read data may only come back for reads that were issued
  assert property (@(posedge clk) disable iff (rst)
                   s_rsp.readdatavalid |-> (outstanding != 0));

endmodule

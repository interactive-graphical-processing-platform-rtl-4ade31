// avalon_arbiter_tb: three traffic generators issue random reads and writes,
// each to a private region of an SDRAM model with 3-clock read latency and
// random wait states, through the arbiter. Every returned read word must equal
// the generator's own record of that location (so misrouted or reordered data
// is caught), every generator must finish its operations, and the arbiter must
// have switched owners.
module avalon_arbiter_tb;
  import gfx_pkg::*;

  localparam int N = 3, OPS = 300, REGION = 64;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  mm_req_t m_req [N];
  mm_rsp_t m_rsp [N];
  mm_req_t s_req;
  mm_rsp_t s_rsp;
  logic [1:0] owner;

  avalon_arbiter #(.N(N)) dut (.clk, .rst, .m_req, .m_rsp, .s_req, .s_rsp, .owner);
  sdram_model #(.WORDS(N * REGION), .LATENCY(3), .WAIT_PCT(20)) mem (.clk, .rst, .req(s_req), .rsp(s_rsp));

  int checks = 0, failures = 0, switches = 0;
  int done_ops [N];
  logic [1:0] last_owner = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && s_req.read | s_req.write) begin
    if (owner != last_owner) switches++;
    last_owner <= owner;
  end

  for (genvar g = 0; g < N; g++) begin : gen_m
    logic [15:0] shadow [REGION];
    logic [15:0] expq [$];
    initial begin
      for (int i = 0; i < REGION; i++) shadow[i] = '0;
      done_ops[g] = 0;
      m_req[g] = MM_REQ_IDLE;
    end
    always @(posedge clk) begin
      if (!rst) begin
        if (m_rsp[g].readdatavalid) begin
          check(expq.size() > 0, $sformatf("master %0d: unexpected read data", g));
          if (expq.size() > 0) begin
            check(m_rsp[g].readdata == expq[0],
                  $sformatf("master %0d: read %04x expected %04x", g, m_rsp[g].readdata, expq[0]));
            void'(expq.pop_front());
          end
        end
        if ((m_req[g].read || m_req[g].write) && !m_rsp[g].waitrequest) begin
          int w;
          w = int'(m_req[g].address[ADDR_W-1:1]) - g * REGION;
          if (m_req[g].read) expq.push_back(shadow[w]);
          else shadow[w] = m_req[g].writedata;
          done_ops[g]++;
          m_req[g] <= MM_REQ_IDLE;
        end else if (!(m_req[g].read || m_req[g].write) && done_ops[g] < OPS && ($urandom % 3 != 0)) begin
          mm_req_t r;
          r = MM_REQ_IDLE;
          r.address = ADDR_W'((g * REGION + int'($urandom % REGION)) * 2);
          r.byteenable = 2'b11;
          if ($urandom % 2) r.read = 1'b1;
          else begin
            r.write = 1'b1;
            r.writedata = 16'($urandom);
          end
          m_req[g] <= r;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < N * REGION; i++) mem.mem[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    wait (done_ops[0] == OPS && done_ops[1] == OPS && done_ops[2] == OPS);
    repeat (10) @(negedge clk);
    for (int g = 0; g < N; g++) check(done_ops[g] == OPS, "all operations done");
    check(gen_m[0].expq.size() == 0 && gen_m[1].expq.size() == 0 && gen_m[2].expq.size() == 0,
          "all reads answered");
    check(switches > 10, $sformatf("owner switched %0d times", switches));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

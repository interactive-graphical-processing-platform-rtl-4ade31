// sdram_model: behavioural stand-in for the SDRAM controller and chip, seen as
// an Avalon-MM slave: byte addresses, 16-bit words with byte enables, pipelined
// reads returning after LATENCY clocks, no response during reset, and waitrequest raised at random in
// WAIT_PCT percent of cycles. Not synthesizable, testbench use only. The array
// `mem` is public so testbenches can preload and inspect it.
module sdram_model
  import gfx_pkg::*;
#(
  parameter int unsigned WORDS   = 1 << 20,
  parameter int unsigned LATENCY = 3,
  parameter int unsigned WAIT_PCT = 0
) (
  input  logic    clk,
  input  logic    rst,     // requests are ignored and pending reads dropped while high
  input  mm_req_t req,
  output mm_rsp_t rsp
);

  logic [15:0] mem [WORDS];
  logic        wait_q = 1'b0;
  int unsigned wait_pct = WAIT_PCT;   // may be changed by the testbench at run time
  logic [LATENCY-1:0] vpipe = '0;
  logic [15:0] dpipe [LATENCY];
  int unsigned reads = 0, writes = 0;

  initial for (int i = 0; i < LATENCY; i++) dpipe[i] = '0;

  assign rsp.waitrequest   = wait_q;
  assign rsp.readdatavalid = vpipe[LATENCY-1];
  assign rsp.readdata      = dpipe[LATENCY-1];

  function automatic int unsigned widx(logic [ADDR_W-1:0] a);
    return int'(a[ADDR_W-1:1]) % WORDS;
  endfunction

  always @(posedge clk) begin
    logic nv;
    logic [15:0] nd;
    nv = 1'b0;
    nd = '0;
    if (!wait_q && !rst) begin
      if (req.write) begin
        if (req.byteenable[0]) mem[widx(req.address)][7:0]  <= req.writedata[7:0];
        if (req.byteenable[1]) mem[widx(req.address)][15:8] <= req.writedata[15:8];
        writes <= writes + 1;
      end else if (req.read) begin
        nv = 1'b1;
        nd = mem[widx(req.address)];
        reads <= reads + 1;
      end
    end
    vpipe <= {vpipe[LATENCY-2:0], nv};
    dpipe[0] <= nd;
    for (int i = 1; i < LATENCY; i++) dpipe[i] <= dpipe[i-1];
    wait_q <= (wait_pct != 0) && (($urandom % 100) < wait_pct);
  end

  // byte view helpers
  function automatic logic [7:0] peek(int unsigned byte_addr);
    logic [15:0] w;
    w = mem[(byte_addr >> 1) % WORDS];
    return byte_addr[0] ? w[15:8] : w[7:0];
  endfunction

  task automatic poke(int unsigned byte_addr, logic [7:0] v);
    if (byte_addr[0]) mem[(byte_addr >> 1) % WORDS][15:8] = v;
    else              mem[(byte_addr >> 1) % WORDS][7:0]  = v;
  endtask

  task automatic fill(logic [15:0] v);
    for (int i = 0; i < WORDS; i++) mem[i] = v;
  endtask

endmodule

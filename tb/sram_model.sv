// sram_model: behavioural model of the board's 256K x 16 asynchronous SRAM.
// Reads are combinational from the address while OE_N and CE_N are low; a word
// is written at the clock edge that ends a cycle with WE_N low (the controller
// drives the pins from registers, so this matches a write pulse of one cycle).
// Byte lanes follow UB_N/LB_N. The pins are ignored at the first two clock
// edges, while the controller's pin registers still hold their power-up
// values. Not synthesizable, testbench use only.
module sram_model #(
  parameter int unsigned WORDS = 1 << 18
) (
  input  logic        clk,
  input  logic [17:0] addr,
  input  logic [15:0] dq_o,
  input  logic        dq_oe,
  output logic [15:0] dq_i,
  input  logic        we_n,
  input  logic        oe_n,
  input  logic        ub_n,
  input  logic        lb_n,
  input  logic        ce_n
);

  logic [15:0] mem [WORDS];
  int unsigned writes = 0;
  int unsigned edges = 0;

  assign dq_i = (!ce_n && !oe_n && we_n) ? mem[int'(addr) % WORDS] : 16'hDEAD;

  always @(posedge clk) begin
    if (edges < 2) edges <= edges + 1;
    else if (!ce_n && !we_n) begin
      if (!dq_oe) $error("SRAM write with data bus not driven");
      if (!lb_n) mem[int'(addr) % WORDS][7:0]  <= dq_o[7:0];
      if (!ub_n) mem[int'(addr) % WORDS][15:8] <= dq_o[15:8];
      writes <= writes + 1;
    end
  end

endmodule

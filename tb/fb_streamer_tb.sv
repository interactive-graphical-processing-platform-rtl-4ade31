// fb_streamer_tb: the whole frame reader / copier at a 16 x 8 frame, with an
// SDRAM model (3-clock reads, random wait states), an SRAM model and a
// display-like consumer on the pixel clock. The base-address register is
// written and read back; a copy request must raise the busy status, copy the
// SDRAM picture into SRAM, pulse copy_done once, and every frame received
// after that must show the SDRAM picture, each one whole and flagged at its
// start. Two copies from two SDRAM buffers are made.
module fb_streamer_tb;
  import gfx_pkg::*;

  localparam int W = 16, H = 8, NPIX = W * H, FW = NPIX / 2;
  localparam int HBL = 12, VBL = 40;

  logic clk_sys = 0, clk_pix = 0, rst_sys = 1, rst_pix = 1;
  always #10 clk_sys = ~clk_sys;
  always #19.8 clk_pix = ~clk_pix;

  logic mm_address, mm_write, mm_read;
  logic [31:0] mm_writedata, mm_readdata;
  logic copy_req, copy_done, copy_busy;
  mm_req_t m_req;
  mm_rsp_t m_rsp;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_we_n, sram_oe_n, sram_ub_n, sram_lb_n, sram_ce_n;
  logic px_valid, px_sop, px_ready;
  colour_t px_data;
  logic frame_end, write_paused, read_held;

  fb_streamer #(.W(W), .H(H), .FIFO_DEPTH(16), .BURST(4)) dut (.*);
  sdram_model #(.WORDS(2048), .LATENCY(3), .WAIT_PCT(10)) sdram (.clk(clk_sys), .rst(rst_sys), .req(m_req), .rsp(m_rsp));
  sram_model #(.WORDS(1024)) sram (.clk(clk_sys), .addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe),
    .dq_i(sram_dq_i), .we_n(sram_we_n), .oe_n(sram_oe_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n), .ce_n(sram_ce_n));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] picture(int p, int i);
    return 8'((p * 91 + i * 7 + 3) & 8'hFF);
  endfunction

  // display-like consumer
  int hpos = 0, line = 0, idle = 0, frames_seen = 0, pix_in_frame = 0, dones = 0;
  logic [7:0] fbuf [NPIX];
  int frame_kind [64];
  assign px_ready = (idle == 0);
  always @(posedge clk_pix) if (!rst_pix) begin
    if (idle > 0) idle--;
    else if (px_valid) begin
      if (pix_in_frame == 0) check(px_sop, "frame starts with the flag");
      fbuf[pix_in_frame] = px_data;
      pix_in_frame++;
      hpos++;
      if (hpos == W) begin
        hpos = 0; line++; idle = HBL;
        if (line == H) begin
          int kind;
          line = 0; idle = VBL; pix_in_frame = 0;
          kind = -1;
          for (int p = 0; p < 3; p++) begin
            bit same;
            same = 1;
            for (int i = 0; i < NPIX; i++) if (fbuf[i] != picture(p, i)) same = 0;
            if (same) kind = p;
          end
          frame_kind[frames_seen] = kind;
          check(kind >= 0, $sformatf("frame %0d is one whole picture", frames_seen));
          if (frames_seen < 63) frames_seen++;
        end
      end
    end
  end
  always @(posedge clk_sys) if (copy_done) dones++;

  task automatic reg_write(logic a, logic [31:0] d);
    @(negedge clk_sys);
    mm_address = a; mm_write = 1; mm_writedata = d;
    @(negedge clk_sys);
    mm_write = 0;
  endtask
  task automatic reg_read(logic a, output logic [31:0] d);
    @(negedge clk_sys);
    mm_address = a; mm_read = 1;
    @(negedge clk_sys);
    mm_read = 0;
    d = mm_readdata;
  endtask

  task automatic copy_from(int base_byte, int pic);
    logic [31:0] d;
    int f0;
    reg_write(0, 32'(base_byte));
    reg_read(0, d);
    check(d == 32'(base_byte), "base address reads back");
    dones = 0;
    @(negedge clk_sys);
    copy_req = 1;
    @(negedge clk_sys);
    copy_req = 0;
    reg_read(1, d);
    check(d[0], "busy while copying");
    wait (dones == 1);
    repeat (3) @(negedge clk_sys);
    reg_read(1, d);
    check(!d[0], "idle after the copy");
    check(dones == 1, "one copy_done");
    for (int i = 0; i < FW; i++)
      check(sram.mem[i] == {picture(pic, 2*i+1), picture(pic, 2*i)}, $sformatf("SRAM word %0d", i));
    f0 = frames_seen;
    wait (frames_seen >= f0 + 2);
    check(frame_kind[frames_seen - 1] == pic, $sformatf("picture %0d displayed", pic));
  endtask

  initial begin
    mm_address = 0; mm_write = 0; mm_read = 0; mm_writedata = 0; copy_req = 0;
    repeat (3) @(negedge clk_pix);
    for (int i = 0; i < FW; i++) begin
      sram.mem[i] = {picture(0, 2*i+1), picture(0, 2*i)};
      sdram.mem[100 + i] = {picture(1, 2*i+1), picture(1, 2*i)};
      sdram.mem[600 + i] = {picture(2, 2*i+1), picture(2, 2*i)};
    end
    rst_sys = 0; rst_pix = 0;
    wait (frames_seen == 1);
    check(frame_kind[0] == 0, "initial SRAM picture shown");
    copy_from(200, 1);
    copy_from(1200, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk_sys);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

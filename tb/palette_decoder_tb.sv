// palette_decoder_tb: streams random palette indices through the decoder on a
// 25 MHz-like pixel clock with random source gaps and sink back-pressure, and
// checks every output colour, in order, with its frame-start flag. First the
// power-up palette is checked against the RGB332 -> RGB565 expansion; then the
// whole palette is rewritten through the system-clock slave, read back, and
// the stream checked against the new contents. The one-clock lookup latency is
// checked with the sink always ready.
module palette_decoder_tb;
  import gfx_pkg::*;

  logic clk_sys = 0, clk_pix = 0, rst_sys = 1, rst_pix = 1;
  always #10 clk_sys = ~clk_sys;
  always #20 clk_pix = ~clk_pix;

  logic [7:0] mm_address;
  logic mm_write, mm_read;
  logic [15:0] mm_writedata, mm_readdata;
  logic in_valid, in_sop, in_ready, out_valid, out_sop, out_ready;
  colour_t in_data;
  rgb565_t out_data;

  palette_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  rgb565_t expect_pal [256];
  logic [16:0] expq [$];      // {sop, colour}
  bit random_ready = 1;

  // Independent form of the default palette: scale each field to full range
  // by shifting and or-ing in its top bits
  function automatic rgb565_t default_colour(int i);
    int r, g, b;
    r = (i >> 5) & 7; g = (i >> 2) & 7; b = i & 3;
    return rgb565_t'(((r << 2) | (r >> 1)) << 11 | ((g << 3) | g) << 5 | ((b << 3) | (b << 1) | (b >> 1)));
  endfunction

  // source
  int to_send = 0;
  always @(posedge clk_pix) begin
    if (!rst_pix) begin
      if (in_valid && in_ready) begin
        expq.push_back({in_sop, expect_pal[in_data]});
        to_send--;
        in_valid <= 1'b0;
      end
      if ((!in_valid || in_ready) && to_send > 0 && ($urandom % 4 != 0)) begin
        in_valid <= 1'b1;
        in_data  <= colour_t'($urandom);
        in_sop   <= ($urandom % 8 == 0);
      end
      out_ready <= random_ready ? ($urandom % 3 != 0) : 1'b1;
    end
  end
  // sink
  always @(posedge clk_pix) begin
    if (!rst_pix && out_valid && out_ready) begin
      check(expq.size() > 0, "output without input");
      if (expq.size() > 0) begin
        check({out_sop, out_data} == expq[0],
              $sformatf("out %0d/%04x expected %0d/%04x", out_sop, out_data, expq[0][16], expq[0][15:0]));
        void'(expq.pop_front());
      end
    end
  end

  task automatic stream(int n);
    to_send = n;
    wait (to_send == 0);
    repeat (5) @(posedge clk_pix);
    check(expq.size() == 0, "all pixels came out");
  endtask

  initial begin
    mm_address = 0; mm_write = 0; mm_read = 0; mm_writedata = 0;
    in_valid = 0; in_data = 0; in_sop = 0; out_ready = 0;
    for (int i = 0; i < 256; i++) expect_pal[i] = default_colour(i);
    repeat (3) @(negedge clk_pix);
    rst_sys = 0; rst_pix = 0;
    stream(2000);
    // latency: with the sink always ready a pixel leaves one clock after entry
    random_ready = 0;
    stream(200);
    check(lat_checked > 0, "latency was measured");
    // rewrite the palette through the slave
    for (int i = 0; i < 256; i++) begin
      @(negedge clk_sys);
      mm_address = 8'(i); mm_write = 1; mm_writedata = 16'($urandom);
      expect_pal[i] = mm_writedata;
    end
    @(negedge clk_sys);
    mm_write = 0;
    for (int i = 0; i < 256; i += 17) begin
      mm_address = 8'(i); mm_read = 1;
      @(negedge clk_sys);
      mm_read = 0;
      check(mm_readdata == expect_pal[i], $sformatf("palette read %0d = %04x", i, mm_readdata));
    end
    random_ready = 1;
    stream(2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: pixel clock count at each accepted index; with the sink always
  // ready the colour must be taken exactly one clock later
  int pcyc = 0, lat_checked = 0;
  int stampq [$];
  always @(posedge clk_pix) begin
    pcyc <= pcyc + 1;
    if (!rst_pix && in_valid && in_ready) stampq.push_back(pcyc);
    if (!rst_pix && out_valid && out_ready && stampq.size() > 0) begin
      if (!random_ready && out_ready) begin
        check(pcyc - stampq[0] == 1, $sformatf("lookup latency %0d clocks", pcyc - stampq[0]));
        lat_checked++;
      end
      void'(stampq.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk_pix);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

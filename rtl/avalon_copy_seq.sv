// avalon_copy_seq: copies a contiguous run of bytes, optionally leaving out one
// "transparent" colour. It is the row engine of the rectangle-copy (layer
// compositing) instruction.
//
// The run is handled in chunks of up to CHUNK bytes. For each chunk the engine
// first issues back-to-back pipelined reads of every 16-bit source word the
// chunk touches and packs the returned bytes into a local buffer (taking only
// the wanted byte of a word at an odd start or end). It then writes the buffer
// to the destination: two bytes per write when the destination address is
// even, one byte otherwise. With transparency on, a byte equal to the
// transparent colour gets its byte enable cleared, so the destination keeps
// what it held; a write whose bytes are both transparent is not issued at all.
// Source and destination may have any alignment.
//
// Interface: pulse `start` with the addresses, count and transparency settings;
// `busy` is high until the last byte is handled and `done` pulses in that
// clock. `skipped` gives the number of bytes left out in each clock (0 to 2).
// Reads are pipelined Avalon-MM reads (data returns with `readdatavalid`).
// Timing, zero-wait memory with read latency L: a chunk of k bytes takes
// (words read) + L + 1 clocks to fetch plus one clock per write or skip, so an
// aligned run costs about one clock per byte (k/2 reads + k/2 writes). A
// full-screen 640x480 copy is about 7 ms at 50 MHz.
// Following the described design: the copy component moving a block of memory
// byte by byte and the per-byte transparent colour. The chunked
// read-then-write scheme, CHUNK and the two-byte writes are this design's own.
module avalon_copy_seq
  import gfx_pkg::*;
#(
  parameter int unsigned CHUNK = 64          // bytes per read/write chunk, even, >= 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [ADDR_W-1:0] src,
  input  logic [ADDR_W-1:0] dst,
  input  logic [15:0]       count,
  input  logic              t_en,
  input  colour_t           t_colour,
  output logic              busy,
  output logic              done,
  output logic [1:0]        skipped,   // bytes left out as transparent in this clock
  output mm_req_t           m_req,
  input  mm_rsp_t           m_rsp
);

  localparam int CW = $clog2(CHUNK + 1);   // byte counts within a chunk
  localparam int BI = $clog2(CHUNK);       // buffer index

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_t;
  state_t state;

  logic [ADDR_W-1:0] s_addr, d_addr, iss_addr;
  logic [15:0]       remaining;            // bytes not yet written, whole run
  logic [CW-1:0]     chunk, iss_left, rcv_left, wp, rp;
  logic              r_odd;                // next byte to receive sits in a high lane
  logic              ten_q;
  colour_t           tcol_q;
  colour_t           cbuf [CHUNK];
  logic              zero_done;

  // ---------------- write side: the next operation ----------------
  logic          pair, t_lo, t_hi;
  colour_t       b0, b1;
  logic [1:0]    be, n_bytes, n_skip;
  logic          adv, last_op;
  always_comb begin
    b0    = cbuf[BI'(rp)];
    b1    = cbuf[BI'(rp + CW'(1))];
    pair  = !d_addr[0] && (chunk - rp) >= CW'(2);
    t_lo  = ten_q && b0 == tcol_q;
    t_hi  = ten_q && b1 == tcol_q;
    if (pair) begin
      n_bytes = 2'd2;
      be      = {!t_hi, !t_lo};
      n_skip  = 2'(t_lo) + 2'(t_hi);
    end else begin
      n_bytes = 2'd1;
      be      = t_lo ? 2'b00 : (d_addr[0] ? 2'b10 : 2'b01);
      n_skip  = 2'(t_lo);
    end
    adv     = (state == S_WRITE) && (be == 2'b00 || !m_rsp.waitrequest);
    last_op = (rp + CW'(n_bytes)) == chunk;
  end

  // ---------------- next chunk set-up ----------------
  logic [ADDR_W-1:0] ch_sa;
  logic [15:0]       ch_rem;
  logic [CW-1:0]     ch_cb, ch_words;
  always_comb begin
    if (state == S_IDLE) begin
      ch_sa  = src;
      ch_rem = count;
    end else begin
      ch_sa  = s_addr + ADDR_W'(chunk);
      ch_rem = remaining - 16'(n_bytes);
    end
    ch_cb    = (ch_rem < 16'(CHUNK)) ? CW'(ch_rem) : CW'(CHUNK);
    ch_words = CW'((CW'(ch_sa[0]) + ch_cb - CW'(1)) >> 1) + CW'(1);
  end

  always_comb begin
    m_req = MM_REQ_IDLE;
    if (state == S_READ && iss_left != '0) begin
      m_req.read       = 1'b1;
      m_req.address    = iss_addr;
      m_req.byteenable = 2'b11;
    end else if (state == S_WRITE && be != 2'b00) begin
      m_req.write      = 1'b1;
      m_req.address    = {d_addr[ADDR_W-1:1], 1'b0};
      m_req.writedata  = pair ? {b1, b0} : {b0, b0};
      m_req.byteenable = be;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      s_addr    <= '0;
      d_addr    <= '0;
      iss_addr  <= '0;
      remaining <= '0;
      chunk     <= '0;
      iss_left  <= '0;
      rcv_left  <= '0;
      wp        <= '0;
      rp        <= '0;
      r_odd     <= 1'b0;
      ten_q     <= 1'b0;
      tcol_q    <= '0;
      zero_done <= 1'b0;
    end else begin
      zero_done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          d_addr    <= dst;
          remaining <= count;
          ten_q     <= t_en;
          tcol_q    <= t_colour;
          if (count == 16'd0) zero_done <= 1'b1;
          else begin
            s_addr   <= ch_sa;
            chunk    <= ch_cb;
            iss_addr <= {ch_sa[ADDR_W-1:1], 1'b0};
            iss_left <= ch_words;
            rcv_left <= ch_cb;
            r_odd    <= ch_sa[0];
            wp       <= '0;
            rp       <= '0;
            state    <= S_READ;
          end
        end
        S_READ: begin
          if (m_req.read && !m_rsp.waitrequest) begin
            iss_addr <= iss_addr + ADDR_W'(2);
            iss_left <= iss_left - CW'(1);
          end
          if (m_rsp.readdatavalid) begin
            if (r_odd) begin
              cbuf[BI'(wp)] <= m_rsp.readdata[15:8];
              wp       <= wp + CW'(1);
              rcv_left <= rcv_left - CW'(1);
              r_odd    <= 1'b0;
              if (rcv_left == CW'(1)) state <= S_WRITE;
            end else if (rcv_left >= CW'(2)) begin
              cbuf[BI'(wp)]          <= m_rsp.readdata[7:0];
              cbuf[BI'(wp + CW'(1))] <= m_rsp.readdata[15:8];
              wp       <= wp + CW'(2);
              rcv_left <= rcv_left - CW'(2);
              if (rcv_left == CW'(2)) state <= S_WRITE;
            end else begin
              cbuf[BI'(wp)] <= m_rsp.readdata[7:0];
              wp       <= wp + CW'(1);
              rcv_left <= '0;
              state    <= S_WRITE;
            end
          end
        end
        S_WRITE: if (adv) begin
          d_addr    <= d_addr + ADDR_W'(n_bytes);
          remaining <= remaining - 16'(n_bytes);
          rp        <= rp + CW'(n_bytes);
          if (last_op) begin
            if (remaining == 16'(n_bytes)) state <= S_IDLE;
            else begin
              s_addr   <= ch_sa;
              chunk    <= ch_cb;
              iss_addr <= {ch_sa[ADDR_W-1:1], 1'b0};
              iss_left <= ch_words;
              rcv_left <= ch_cb;
              r_odd    <= ch_sa[0];
              wp       <= '0;
              rp       <= '0;
              state    <= S_READ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign skipped = adv ? n_skip : 2'd0;
  assign done    = zero_done || (adv && last_op && remaining == 16'(n_bytes));

  // a read is never issued beyond the words of the current chunk
  a_reads: assert property (@(posedge clk) disable iff (rst)
                            m_req.read |-> iss_left != '0);

endmodule

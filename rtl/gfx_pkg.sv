// gfx_pkg: types and constants shared by the graphics platform.
//
// Screen geometry and VGA timing follow the 640x480 @ 60 Hz mode the platform is
// built around (800 x 525 pixel clocks per frame, 25.2 MHz pixel clock). Framebuffers
// hold one byte per pixel (a palette index), rows of 640 bytes, stored in 16-bit
// memories with the even pixel in the low byte. The memory bus width (16 bits), the
// byte addressing and the custom-instruction register layout are this design's
// choices.
package gfx_pkg;

  // Screen and framebuffer geometry
  localparam int unsigned SCREEN_W = 640;
  localparam int unsigned SCREEN_H = 480;

  // VGA 640x480 @ 60 Hz timing, in pixel clocks (horizontal) and lines (vertical)
  localparam int unsigned H_ACTIVE      = 640;
  localparam int unsigned H_FRONT_PORCH = 16;
  localparam int unsigned H_SYNC        = 96;
  localparam int unsigned H_BACK_PORCH  = 48;
  localparam int unsigned V_ACTIVE      = 480;
  localparam int unsigned V_FRONT_PORCH = 10;
  localparam int unsigned V_SYNC        = 2;
  localparam int unsigned V_BACK_PORCH  = 33;

  // Memory bus: byte address, 16-bit data with two byte enables
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 16;

  typedef logic [7:0]  colour_t;   // palette index
  typedef logic [15:0] rgb565_t;   // decoded colour, R[15:11] G[10:5] B[4:0]
  typedef logic signed [15:0] coord_t;

  // Request a bus master presents to the SDRAM side of the interconnect
  typedef struct packed {
    logic              read;
    logic              write;
    logic [ADDR_W-1:0] address;     // byte address, bit 0 ignored (word access)
    logic [DATA_W-1:0] writedata;
    logic [1:0]        byteenable;
  } mm_req_t;

  // Response the interconnect returns to a master
  typedef struct packed {
    logic              waitrequest;
    logic              readdatavalid;
    logic [DATA_W-1:0] readdata;
  } mm_rsp_t;

  localparam mm_req_t MM_REQ_IDLE = '{read: 1'b0, write: 1'b0, address: '0,
                                      writedata: '0, byteenable: 2'b00};

  // Nios II style multi-cycle custom-instruction port, as seen by one instruction
  typedef struct packed {
    logic        start;   // one-cycle pulse: instruction issued
    logic [1:0]  n;       // sub-operation selector
    logic [31:0] dataa;
    logic [31:0] datab;
  } ci_req_t;

  // Byte address of pixel (x, y) in a framebuffer
  function automatic logic [ADDR_W-1:0] pixel_addr(input logic [ADDR_W-1:0] base,
                                                   input int unsigned x,
                                                   input int unsigned y,
                                                   input int unsigned stride);
    return base + ADDR_W'(y * stride + x);
  endfunction

endpackage

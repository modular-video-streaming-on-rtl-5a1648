// esm_pkg: types and constants shared by the video streaming modules.
//
// The streaming chain runs in one clock domain (the VGA pixel clock). Modules
// talk to the external per-slot SRAMs through a request/response pair of
// structs: a request is held until the slot's SRAM controller grants it, and
// read data returns SRAM_RD_LAT cycles after the grant, in order.
// The SRAM bank size (2 MByte per slot) is the board's; the 32-bit word width,
// the pixel formats and the bus layouts on crossbar channels are this
// design's own choices.
package esm_pkg;

  // One 2 MByte SRAM bank of 32-bit words: 512 Ki words.
  localparam int unsigned SRAM_AW     = 19;
  localparam int unsigned SRAM_DW     = 32;
  // Cycles from a granted read request to its data: one cycle to register the
  // request onto the SRAM pins, one cycle of SRAM access.
  localparam int unsigned SRAM_RD_LAT = 2;

  typedef logic [SRAM_AW-1:0] sram_addr_t;
  typedef logic [SRAM_DW-1:0] sram_data_t;

  typedef struct packed {
    logic       valid;
    logic       we;
    sram_addr_t addr;
    sram_data_t wdata;
  } sram_req_t;

  typedef struct packed {
    logic       gnt;
    logic       rvalid;
    sram_data_t rdata;
  } sram_rsp_t;

  // Requester index at a slot's SRAM controller.
  typedef enum logic [1:0] {
    PORT_LEFT    = 2'd0,
    PORT_CENTRAL = 2'd1,
    PORT_RIGHT   = 2'd2
  } sram_port_e;

  // Edge detector loaded into the processing slot.
  typedef enum logic [1:0] {
    FILT_SOBEL   = 2'd0,
    FILT_PREWITT = 2'd1,
    FILT_LAPLACE = 2'd2
  } filter_e;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] u;
    logic [7:0] v;
  } yuv_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Width of one crossbar channel (pin group of a micro slot).
  localparam int unsigned XBAR_CW = 32;

  // Camera stream as carried on a crossbar channel (26 bits, LSB-aligned).
  typedef struct packed {
    logic valid;  // pixel strobe
    logic sof;    // first pixel of a frame
    yuv_t pix;
  } cam_bus_t;

  // VGA output as carried on a crossbar channel (27 bits, LSB-aligned).
  typedef struct packed {
    logic hsync_n;
    logic vsync_n;
    logic de;
    rgb_t pix;
  } vga_bus_t;

  // Luminance used by the edge detectors: (R + 2G + B) / 4.
  function automatic logic [7:0] rgb_to_gray(rgb_t p);
    return 8'(({2'b00, p.r} + {1'b0, p.g, 1'b0} + {2'b00, p.b}) >> 2);
  endfunction

endpackage

// vga_render: VGA rendering module.
//
// Generates VGA timing (default 640x480 at 60 Hz with a 25.175 MHz pixel
// clock, negative sync pulses) and, for every visible pixel, reads the frame
// stored in the slot's SRAM. The stored frame is a region of interest of
// IMG_W x IMG_H pixels (a quarter of the VGA screen by default), repeated over
// the screen, so the monitor shows four copies of it. Pixel (x, y) of the
// screen shows word BASE + (y mod IMG_H) * IMG_W + (x mod IMG_W).
//
// Timing: a read is requested in the cycle the counters reach a visible
// pixel; syncs and data-enable are delayed by SRAM_RD_LAT so that they line up
// with the returned data. The renderer must have the highest priority at its
// SRAM controller; if a read is not granted the pixel is shown black and
// underrun pulses. frame_start pulses at pixel (0,0) of the counters.
// vga.pix carries the pixel word's low 24 bits.
//
// The source names the VGA renderer and shows four regions of interest on the
// screen; the timing values are the standard VGA ones and the tiling and the
// read scheme are this design's choices.
module vga_render
  import esm_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned IMG_W    = 320,
  parameter int unsigned IMG_H    = 240,
  parameter int unsigned BASE     = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  output sram_req_t rd_req,
  input  sram_rsp_t rd_rsp,
  output vga_bus_t  vga,
  output logic      frame_start,
  output logic      underrun
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [$clog2(H_TOTAL)-1:0] hcnt;
  logic [$clog2(V_TOTAL)-1:0] vcnt;
  logic [$clog2(IMG_W)-1:0]   tx;
  logic [$clog2(IMG_H)-1:0]   ty;
  logic [SRAM_AW-1:0]         row_base;   // BASE + ty * IMG_W
  logic                       active, hs, vs;

  logic [SRAM_RD_LAT-1:0] de_d, hs_d, vs_d, req_d;

  assign active = (32'(hcnt) < H_ACTIVE) && (32'(vcnt) < V_ACTIVE);
  assign hs     = (32'(hcnt) >= H_ACTIVE + H_FP) && (32'(hcnt) < H_ACTIVE + H_FP + H_SYNC);
  assign vs     = (32'(vcnt) >= V_ACTIVE + V_FP) && (32'(vcnt) < V_ACTIVE + V_FP + V_SYNC);

  always_comb begin
    rd_req.valid = active;
    rd_req.we    = 1'b0;
    rd_req.addr  = row_base + SRAM_AW'(tx);
    rd_req.wdata = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt     <= '0;
      vcnt     <= '0;
      tx       <= '0;
      ty       <= '0;
      row_base <= SRAM_AW'(BASE);
    end else begin
      // horizontal position inside the region of interest
      if (active) tx <= (32'(tx) == IMG_W - 1) ? '0 : tx + 1'b1;
      if (32'(hcnt) == H_TOTAL - 1) begin
        hcnt <= '0;
        tx   <= '0;
        if (32'(vcnt) < V_ACTIVE) begin
          // next visible line: advance the region-of-interest row
          if (32'(ty) == IMG_H - 1) begin
            ty       <= '0;
            row_base <= SRAM_AW'(BASE);
          end else begin
            ty       <= ty + 1'b1;
            row_base <= row_base + SRAM_AW'(IMG_W);
          end
        end
        if (32'(vcnt) == V_TOTAL - 1) begin
          vcnt     <= '0;
          ty       <= '0;
          row_base <= SRAM_AW'(BASE);
        end else begin
          vcnt <= vcnt + 1'b1;
        end
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end

  // Align syncs with the SRAM read latency.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de_d  <= '0;
      hs_d  <= '0;
      vs_d  <= '0;
      req_d <= '0;
    end else begin
      de_d  <= {de_d[SRAM_RD_LAT-2:0], active};
      hs_d  <= {hs_d[SRAM_RD_LAT-2:0], hs};
      vs_d  <= {vs_d[SRAM_RD_LAT-2:0], vs};
      req_d <= {req_d[SRAM_RD_LAT-2:0], active && rd_rsp.gnt};
    end
  end

  always_comb begin
    vga.de      = de_d[SRAM_RD_LAT-1];
    vga.hsync_n = !hs_d[SRAM_RD_LAT-1];
    vga.vsync_n = !vs_d[SRAM_RD_LAT-1];
    vga.pix     = (vga.de && rd_rsp.rvalid) ? rgb_t'(rd_rsp.rdata[23:0]) : '0;
    underrun    = vga.de && !req_d[SRAM_RD_LAT-1];
  end

  assign frame_start = (hcnt == '0) && (vcnt == '0);

endmodule

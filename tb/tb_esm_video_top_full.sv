// tb_esm_video_top_full: the end-to-end test of esm_chain_tb_body.svh with
// the design at its default size: 320x240 region of interest, shown four
// times on a 640x480 VGA screen (800x525 clocks per frame).
module tb_esm_video_top_full;
  localparam int W = 320, H = 240;
  localparam int HA = 640, HF = 16, HS = 96, HB = 48, VA = 480, VF = 10, VS = 2, VB = 33;
  localparam int WATCHDOG = 20000000;

`include "esm_chain_tb_body.svh"

  esm_video_top u_dut (.*);
endmodule

// tb_esm_video_top: end-to-end test of the streaming chain at reduced size
// (16x12 region of interest on a 32x24 screen with short blanking), so that
// every mechanism is exercised in a fraction of a second. The scenario and
// checks are in esm_chain_tb_body.svh.
module tb_esm_video_top;
  localparam int W = 16, H = 12;
  localparam int HA = 32, HF = 2, HS = 4, HB = 4, VA = 24, VF = 1, VS = 2, VB = 2;
  localparam int WATCHDOG = 200000;

`include "esm_chain_tb_body.svh"

  esm_video_top #(
    .IMG_W(W), .IMG_H(H),
    .H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)
  ) u_dut (.*);
endmodule

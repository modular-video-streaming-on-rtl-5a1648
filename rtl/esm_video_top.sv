// esm_video_top: modular video streaming chain on a slotted FPGA.
//
// Three modules sit in three neighbouring slots of the FPGA, each slot with
// its own external SRAM bank on top and a pin group towards the peripheral
// crossbar at the bottom:
//   slot S1 (micro slots B-D): frame_capture - camera YUV -> RGB frames,
//            written alternately to RAM1 (own) and RAM2 (right neighbour);
//   slot S2 (micro slots E-G): frame_processing - edge detection (Sobel,
//            Prewitt or Laplace) on the buffer not being written, result
//            written to RAM3 (right neighbour);
//   slot S3 (micro slots H-J): vga_render - shows RAM3 on a VGA monitor.
// Each slot has an sram_controller that arbitrates between the slot's own
// module and its two neighbours with a run-time priority order
// (sram_prio[slot][0] first). The renderer must be first at RAM3.
// The camera and the monitor reach the modules only through io_crossbar,
// which routes peripheral ports to the micro-slot channels of the modules:
// CAP_CH carries the camera bus (cam_bus_t), RND_CH the VGA bus (vga_bus_t),
// both LSB-aligned in a channel. The crossbar comes up with every route off
// and must be programmed through the cfg_* port.
//
// The SRAM banks are external: their synchronous pins are ports
// (sram_*[0..2] for RAM1..RAM3). Everything runs on one clock, the VGA pixel
// clock. The slot assignment of the three modules, the single clock and the
// neighbour wiring of the SRAM ports are this design's reading of the
// published block diagrams.
module esm_video_top
  import esm_pkg::*;
#(
  parameter int unsigned IMG_W    = 320,
  parameter int unsigned IMG_H    = 240,
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned N_CH     = 22,
  parameter int unsigned N_PER    = 4,
  parameter int unsigned CAP_CH   = 1,
  parameter int unsigned RND_CH   = 7,
  localparam int unsigned IW      = $clog2((N_CH > N_PER ? N_CH : N_PER))
) (
  input  logic               clk,
  input  logic               rst_n,
  // peripheral side of the crossbar
  input  logic [XBAR_CW-1:0] per_in  [N_PER],
  output logic [XBAR_CW-1:0] per_out [N_PER],
  // crossbar configuration
  input  logic               cfg_we,
  input  logic               cfg_to_per,
  input  logic [IW-1:0]      cfg_dst,
  input  logic [IW-1:0]      cfg_src,
  input  logic               cfg_en,
  // edge detector to load into the processing slot
  input  filter_e            filter_sel,
  // SRAM priority order per slot
  input  sram_port_e         sram_prio [3][3],
  // external SRAM banks of slots S1..S3
  output logic               sram_ce    [3],
  output logic               sram_we    [3],
  output sram_addr_t         sram_addr  [3],
  output sram_data_t         sram_wdata [3],
  input  sram_data_t         sram_rdata [3],
  // status
  output logic               cap_frame_done,
  output logic               cap_frame_drop,
  output logic               cap_overflow,
  output logic               buf_full [2],
  output logic               proc_busy,
  output logic               proc_frame_done,
  output logic               proc_wr_stall,
  output filter_e            proc_filter,
  output logic               rnd_frame_start,
  output logic               rnd_underrun,
  output logic               sram_conflict [3]
);

  localparam sram_req_t NO_REQ = '0;

  // crossbar channels
  logic [XBAR_CW-1:0] ch_in  [N_CH];
  logic [XBAR_CW-1:0] ch_out [N_CH];

  // SRAM requests per controller: [slot][left/central/right]
  sram_req_t req [3][3];
  sram_rsp_t rsp [3][3];

  sram_req_t cap_wr_req [2];
  sram_rsp_t cap_wr_rsp [2];
  sram_req_t proc_rd_req [2];
  sram_rsp_t proc_rd_rsp [2];
  sram_req_t proc_wr_req, rnd_rd_req;
  sram_rsp_t proc_wr_rsp, rnd_rd_rsp;

  logic     buf_release [2];
  cam_bus_t cam;
  vga_bus_t vga;

  // ------------------------------------------------------------ crossbar
  io_crossbar #(.N_CH(N_CH), .N_PER(N_PER), .CW(XBAR_CW)) u_xbar (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we     (cfg_we),
    .cfg_to_per (cfg_to_per),
    .cfg_dst    (cfg_dst),
    .cfg_src    (cfg_src),
    .cfg_en     (cfg_en),
    .ch_out     (ch_out),
    .ch_in      (ch_in),
    .per_in     (per_in),
    .per_out    (per_out)
  );

  assign cam = cam_bus_t'(ch_in[CAP_CH][$bits(cam_bus_t)-1:0]);

  always_comb begin
    for (int c = 0; c < N_CH; c++) ch_out[c] = '0;
    ch_out[RND_CH] = XBAR_CW'(vga);
  end

  // ------------------------------------------------------------ slot S1
  frame_capture #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_capture (
    .clk         (clk),
    .rst_n       (rst_n),
    .cam         (cam),
    .wr_req      (cap_wr_req),
    .wr_rsp      (cap_wr_rsp),
    .buf_full    (buf_full),
    .buf_release (buf_release),
    .frame_done  (cap_frame_done),
    .frame_drop  (cap_frame_drop),
    .overflow    (cap_overflow)
  );

  // ------------------------------------------------------------ slot S2
  frame_processing #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_processing (
    .clk         (clk),
    .rst_n       (rst_n),
    .filter_sel  (filter_sel),
    .buf_full    (buf_full),
    .buf_release (buf_release),
    .rd_req      (proc_rd_req),
    .rd_rsp      (proc_rd_rsp),
    .wr_req      (proc_wr_req),
    .wr_rsp      (proc_wr_rsp),
    .cur_filter  (proc_filter),
    .busy        (proc_busy),
    .frame_done  (proc_frame_done),
    .wr_stall    (proc_wr_stall)
  );

  // ------------------------------------------------------------ slot S3
  vga_render #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .IMG_W(IMG_W), .IMG_H(IMG_H)
  ) u_render (
    .clk         (clk),
    .rst_n       (rst_n),
    .rd_req      (rnd_rd_req),
    .rd_rsp      (rnd_rd_rsp),
    .vga         (vga),
    .frame_start (rnd_frame_start),
    .underrun    (rnd_underrun)
  );

  // ------------------------------------------------------------ SRAM ports
  always_comb begin
    // RAM1: capture (central), processing (right neighbour)
    req[0][PORT_LEFT]    = NO_REQ;
    req[0][PORT_CENTRAL] = cap_wr_req[0];
    req[0][PORT_RIGHT]   = proc_rd_req[0];
    // RAM2: capture (left neighbour), processing (central)
    req[1][PORT_LEFT]    = cap_wr_req[1];
    req[1][PORT_CENTRAL] = proc_rd_req[1];
    req[1][PORT_RIGHT]   = NO_REQ;
    // RAM3: processing (left neighbour), renderer (central)
    req[2][PORT_LEFT]    = proc_wr_req;
    req[2][PORT_CENTRAL] = rnd_rd_req;
    req[2][PORT_RIGHT]   = NO_REQ;

    cap_wr_rsp[0]  = rsp[0][PORT_CENTRAL];
    proc_rd_rsp[0] = rsp[0][PORT_RIGHT];
    cap_wr_rsp[1]  = rsp[1][PORT_LEFT];
    proc_rd_rsp[1] = rsp[1][PORT_CENTRAL];
    proc_wr_rsp    = rsp[2][PORT_LEFT];
    rnd_rd_rsp     = rsp[2][PORT_CENTRAL];
  end

  for (genvar s = 0; s < 3; s++) begin : g_slot
    sram_controller u_ctrl (
      .clk        (clk),
      .rst_n      (rst_n),
      .prio       (sram_prio[s]),
      .req        (req[s]),
      .rsp        (rsp[s]),
      .conflict   (sram_conflict[s]),
      .sram_ce    (sram_ce[s]),
      .sram_we    (sram_we[s]),
      .sram_addr  (sram_addr[s]),
      .sram_wdata (sram_wdata[s]),
      .sram_rdata (sram_rdata[s])
    );
  end

endmodule

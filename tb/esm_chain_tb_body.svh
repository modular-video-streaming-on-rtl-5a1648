// Shared body of the end-to-end testbenches of esm_video_top.
//
// The including module defines the localparams W, H (region of interest),
// HA, HF, HS, HB, VA, VF, VS, VB (VGA timing), WATCHDOG (cycles) and
// instantiates esm_video_top as u_dut on the signals declared here.
//
// Scenario: camera frames enter on the video peripheral port, pass the
// crossbar into the capture slot, are converted and stored alternately in
// RAM1/RAM2, edge-detected by the processing slot into RAM3 and shown by the
// renderer, whose VGA bus leaves through the crossbar on the same peripheral
// port. The testbench computes each expected edge image itself (YUV->RGB,
// luminance, kernel, border) and compares every visible pixel of a whole VGA
// frame, tiled 2x2, with it. Steps:
//   1. crossbar not yet programmed: a camera frame must not reach the chain
//      and the VGA port must stay silent;
//   2. Sobel, Prewitt and Laplace frames, each checked on screen (emulated
//      reconfiguration of the processing slot between frames);
//   3. the camera moves to another peripheral port and the crossbar is
//      re-programmed; four frames then come back to back: the capture module
//      must drop a frame while both buffers are full; the last frame taken is
//      checked on screen.
// Mechanisms counted (each must occur): route off, re-route, frames in buffer 0 and in
// buffer 1, each of the three filters, frame drop, processing write stall
// behind the renderer, SRAM conflict at RAM3. Underruns of the renderer and
// capture FIFO overflows must not occur.

  import esm_pkg::*;

  localparam int NPIX   = W * H;
  localparam int PER_VIDEO = 1;
  localparam int CAP_CH = 1, RND_CH = 7;

  logic clk = 0, rst_n = 0;
  logic [XBAR_CW-1:0] per_in [4], per_out [4];
  logic               cfg_we, cfg_to_per, cfg_en;
  logic [4:0]         cfg_dst, cfg_src;
  filter_e            filter_sel, proc_filter;
  sram_port_e         sram_prio [3][3];
  logic               sram_ce [3], sram_we [3];
  sram_addr_t         sram_addr [3];
  sram_data_t         sram_wdata [3], sram_rdata [3];
  logic               cap_frame_done, cap_frame_drop, cap_overflow, buf_full [2];
  logic               proc_busy, proc_frame_done, proc_wr_stall;
  logic               rnd_frame_start, rnd_underrun, sram_conflict [3];

  for (genvar s = 0; s < 3; s++) begin : g_ram
    sram_model #(.AW(SRAM_AW), .DW(SRAM_DW)) u_ram (
      .clk(clk), .ce(sram_ce[s]), .we(sram_we[s]), .addr(sram_addr[s]),
      .wdata(sram_wdata[s]), .rdata(sram_rdata[s]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_drop = 0, n_cap = 0, n_ovf = 0, n_stall = 0, n_conflict3 = 0, n_underrun = 0;
  int n_buf [2] = '{0, 0};
  int n_filter [3] = '{0, 0, 0};
  int n_route_off = 0, n_reroute = 0;
  logic prev_full [2] = '{0, 0};

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (cap_frame_drop)   n_drop++;
      if (cap_frame_done)   n_cap++;
      if (cap_overflow)     n_ovf++;
      if (proc_wr_stall)    n_stall++;
      if (sram_conflict[2]) n_conflict3++;
      if (rnd_underrun)     n_underrun++;
      if (proc_frame_done)  n_filter[int'(proc_filter)]++;
      for (int b = 0; b < 2; b++) begin
        if (buf_full[b] && !prev_full[b]) n_buf[b]++;
        prev_full[b] <= buf_full[b];
      end
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference
  function automatic int clampi(int x);
    return x < 0 ? 0 : (x > 255 ? 255 : x);
  endfunction
  function automatic int fdiv(int x);
    return (x >= 0) ? x / 256 : -((-x + 255) / 256);
  endfunction

  yuv_t cam_img [NPIX];
  logic [7:0] exp_img [NPIX];

  function automatic yuv_t cam_pixel(int seed, int x, int y);
    logic [7:0] yy;
    // a bright disc and a diagonal band on a gradient background
    int dx = x - W / 2 - seed, dy = y - H / 2;
    if (dx * dx + dy * dy < (H / 3) * (H / 3)) yy = 8'd200;
    else if (((x + y + seed) / 4) % 3 == 0)    yy = 8'd120;
    else                                      yy = 8'(20 + (x * 3 + y * 2 + seed * 7) % 60);
    return '{y: yy, u: 8'(128 + ((x * 5 + seed) % 32) - 16), v: 8'(128 + ((y * 7 + seed) % 32) - 16)};
  endfunction

  function automatic int gray_of(yuv_t p);
    int y, u, v, r, g, b;
    y = p.y; u = int'(p.u) - 128; v = int'(p.v) - 128;
    r = clampi(y + fdiv(359 * v));
    g = clampi(y - fdiv(88 * u + 183 * v));
    b = clampi(y + fdiv(454 * u));
    return (r + 2 * g + b) / 4;
  endfunction

  task automatic make_expected(int seed, filter_e f);
    int gray [];
    gray = new[NPIX];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        cam_img[y * W + x] = cam_pixel(seed, x, y);
        gray[y * W + x]    = gray_of(cam_img[y * W + x]);
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int m, k, gx, gy, l;
        if (x == 0 || y == 0 || x == W - 1 || y == H - 1) m = 0;
        else if (f == FILT_LAPLACE) begin
          l = gray[(y-1)*W + x] + gray[(y+1)*W + x] + gray[y*W + x-1] + gray[y*W + x+1] - 4 * gray[y*W + x];
          m = l < 0 ? -l : l;
        end else begin
          k  = (f == FILT_SOBEL) ? 2 : 1;
          gx = gray[(y-1)*W + x+1] + k * gray[y*W + x+1] + gray[(y+1)*W + x+1]
             - gray[(y-1)*W + x-1] - k * gray[y*W + x-1] - gray[(y+1)*W + x-1];
          gy = gray[(y+1)*W + x-1] + k * gray[(y+1)*W + x] + gray[(y+1)*W + x+1]
             - gray[(y-1)*W + x-1] - k * gray[(y-1)*W + x] - gray[(y-1)*W + x+1];
          m  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        end
        exp_img[y * W + x] = 8'(m > 255 ? 255 : m);
      end
  endtask

  // ---------------------------------------------------------------- camera
  int cam_port = PER_VIDEO;   // peripheral port the camera is plugged into

  task automatic send_frame(int seed);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        cam_bus_t c;
        c = '{valid: 1'b1, sof: (x == 0 && y == 0), pix: cam_pixel(seed, x, y)};
        per_in[cam_port] = XBAR_CW'(c);
        @(negedge clk);
      end
    per_in[cam_port] = '0;
  endtask

  // ---------------------------------------------------------------- screen
  bit check_en = 0;
  int sx = 0, sy = 0, n_checked = 0, n_bad = 0;
  logic prev_de = 0;
  always @(posedge clk) begin
    vga_bus_t v;
    v = vga_bus_t'(per_out[PER_VIDEO][$bits(vga_bus_t)-1:0]);
    if (!v.vsync_n) begin
      sx = 0;
      sy = 0;
    end else if (v.de) begin
      if (check_en) begin
        logic [7:0] e;
        e = exp_img[(sy % H) * W + (sx % W)];
        n_checked++;
        if (v.pix != {e, e, e}) begin
          n_bad++;
          if (n_bad < 6) $display("screen (%0d,%0d): %h expected %h", sx, sy, v.pix, e);
        end
      end
      sx++;
    end else if (prev_de) begin
      sx = 0;
      sy++;
    end
    prev_de <= v.de;
  end

  task automatic wait_frame_start();
    @(posedge clk);
    while (!rnd_frame_start) @(posedge clk);
  endtask

  // Shows the current RAM3 content for one whole VGA frame and checks it.
  task automatic check_screen(string what);
    wait_frame_start();
    n_checked = 0;
    n_bad = 0;
    check_en = 1;
    wait_frame_start();
    check_en = 0;   // the new frame's first pixel is still in the pipeline
    checks++;
    if (n_bad != 0 || n_checked != HA * VA) begin
      failures++;
      $display("%s: %0d of %0d screen pixels wrong (expected %0d checked)", what, n_bad, n_checked, HA * VA);
    end else
      $display("%s: %0d screen pixels correct", what, n_checked);
    @(negedge clk);
  endtask

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 8) begin
      @(negedge clk);
      if (proc_busy || buf_full[0] || buf_full[1]) quiet = 0;
      else quiet++;
    end
  endtask

  task automatic xbar_route(bit to_per, int dst, int src);
    cfg_we = 1; cfg_to_per = to_per; cfg_dst = 5'(dst); cfg_src = 5'(src); cfg_en = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // ---------------------------------------------------------------- scenario
  initial begin
    int drops_before, last_taken;
    for (int p = 0; p < 4; p++) per_in[p] = '0;
    cfg_we = 0; cfg_to_per = 0; cfg_en = 0; cfg_dst = 0; cfg_src = 0;
    filter_sel = FILT_SOBEL;
    sram_prio[0] = '{PORT_CENTRAL, PORT_RIGHT, PORT_LEFT};
    sram_prio[1] = '{PORT_CENTRAL, PORT_LEFT, PORT_RIGHT};
    sram_prio[2] = '{PORT_CENTRAL, PORT_LEFT, PORT_RIGHT};   // renderer first
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. no route: nothing gets through
    send_frame(99);
    repeat (20) @(negedge clk);
    checks++;
    if (n_cap != 0 || n_drop != 0 || per_out[PER_VIDEO] != '0) begin
      failures++;
      $display("traffic passed an unprogrammed crossbar");
    end else n_route_off++;

    xbar_route(1'b0, CAP_CH, PER_VIDEO);   // camera -> capture slot
    xbar_route(1'b1, PER_VIDEO, RND_CH);   // render slot -> monitor

    // 2. one frame per edge detector
    for (int f = 0; f < 3; f++) begin
      filter_sel = filter_e'(f);
      make_expected(f, filter_e'(f));
      send_frame(f);
      wait_idle();
      check_screen(f == 0 ? "Sobel" : f == 1 ? "Prewitt" : "Laplace");
    end

    // 3. frames back to back, from a source on another peripheral port:
    //    only the crossbar route changes
    cam_port = 2;
    xbar_route(1'b0, CAP_CH, cam_port);
    n_reroute++;
    filter_sel = FILT_PREWITT;
    last_taken = -1;
    for (int k = 10; k < 14; k++) begin
      drops_before = n_drop;
      send_frame(k);
      if (n_drop == drops_before) last_taken = k;
    end
    wait_idle();
    make_expected(last_taken, FILT_PREWITT);
    check_screen("burst, last frame taken");

    // mechanisms
    checks++;
    if (n_route_off == 0 || n_reroute == 0 || n_buf[0] == 0 || n_buf[1] == 0 || n_drop == 0 || n_stall == 0 ||
        n_conflict3 == 0 || n_filter[0] == 0 || n_filter[1] == 0 || n_filter[2] == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    checks++;
    if (n_underrun != 0 || n_ovf != 0) begin
      failures++;
      $display("renderer underruns %0d, capture overflows %0d", n_underrun, n_ovf);
    end
    $display("route-off=%0d reroutes=%0d captured=%0d buf0=%0d buf1=%0d drops=%0d stalls=%0d ram3-conflicts=%0d",
             n_route_off, n_reroute, n_cap, n_buf[0], n_buf[1], n_drop, n_stall, n_conflict3);
    $display("filters sobel=%0d prewitt=%0d laplace=%0d underruns=%0d overflows=%0d cycles=%0d",
             n_filter[0], n_filter[1], n_filter[2], n_underrun, n_ovf, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

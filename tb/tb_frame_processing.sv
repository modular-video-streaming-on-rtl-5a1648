// tb_frame_processing: 10x7 RGB frames are placed in the two input buffers
// (stubbed SRAM ports that return reads two cycles after the grant) and the
// module is handed buffer 0, 1, 0, 1 with Sobel, Prewitt, Laplace and Sobel
// selected. The result memory is compared with a reference computed here:
// luminance (R+2G+B)/4, the selected 3x3 kernel, |Gx|+|Gy| or |L| saturated
// to 255, zero on the one-pixel border. Frames 3 and 4 run with the output
// port refusing most writes (stalls must lose nothing). Also checked: the
// buffer released is the one processed, the filter latched at frame start,
// and, with free ports, one pixel per clock (frame in at most
// W*H + W + 1 + 16 cycles).
module tb_frame_processing;
  import esm_pkg::*;
  localparam int W = 10, H = 7, NPIX = W * H, IN_BASE = 5, OUT_BASE = 40;
  logic clk = 0, rst_n = 0;
  filter_e   filter_sel, cur_filter;
  logic      buf_full [2], buf_release [2];
  sram_req_t rd_req [2], wr_req;
  sram_rsp_t rd_rsp [2], wr_rsp;
  logic      busy, frame_done, wr_stall;
  int        deny_rd, deny_wr;
  int checks = 0, failures = 0, n_stall = 0;

  frame_processing #(.IMG_W(W), .IMG_H(H), .IN_BASE(IN_BASE), .OUT_BASE(OUT_BASE)) dut (.*);
  sram_port_stub #(.AW(8)) u_b0  (.clk(clk), .deny_pct(deny_rd), .req(rd_req[0]), .rsp(rd_rsp[0]));
  sram_port_stub #(.AW(8)) u_b1  (.clk(clk), .deny_pct(deny_rd), .req(rd_req[1]), .rsp(rd_rsp[1]));
  sram_port_stub #(.AW(8)) u_out (.clk(clk), .deny_pct(deny_wr), .req(wr_req), .rsp(wr_rsp));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && wr_stall) n_stall++;

  int gray [H][W];

  function automatic int ref_pixel(filter_e f, int y, int x);
    int gx, gy, l, k, m;
    if (x == 0 || y == 0 || x == W - 1 || y == H - 1) return 0;
    if (f == FILT_LAPLACE) begin
      l = gray[y-1][x] + gray[y+1][x] + gray[y][x-1] + gray[y][x+1] - 4 * gray[y][x];
      m = l < 0 ? -l : l;
    end else begin
      k  = (f == FILT_SOBEL) ? 2 : 1;
      gx = (gray[y-1][x+1] + k * gray[y][x+1] + gray[y+1][x+1])
         - (gray[y-1][x-1] + k * gray[y][x-1] + gray[y+1][x-1]);
      gy = (gray[y+1][x-1] + k * gray[y+1][x] + gray[y+1][x+1])
         - (gray[y-1][x-1] + k * gray[y-1][x] + gray[y-1][x+1]);
      m  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    end
    return m > 255 ? 255 : m;
  endfunction

  task automatic load(int b, int seed);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [7:0] r, g, bl;
        r  = 8'($urandom_range(0, 255));
        g  = 8'((x * 40 + seed * 13) % 256);
        bl = 8'(y * 30 + seed);
        if (b == 0) u_b0.mem[IN_BASE + y * W + x] = {8'h0, r, g, bl};
        else        u_b1.mem[IN_BASE + y * W + x] = {8'h0, r, g, bl};
        gray[y][x] = (int'(r) + 2 * int'(g) + int'(bl)) / 4;
      end
  endtask

  task automatic run(int b, filter_e f, int seed, bit timed);
    int t0, t1, bad;
    bit released;
    load(b, seed);
    foreach (u_out.mem[i]) u_out.mem[i] = 32'hBAD0_0000;
    filter_sel = f;
    buf_full[b] = 1'b1;
    t0 = 0;
    released = 0;
    @(negedge clk);
    filter_sel = filter_e'((int'(f) + 1) % 3);   // changes after the start must not matter
    while (!frame_done) begin
      if (buf_release[0] || buf_release[1]) released = 1;
      @(negedge clk);
      t0++;
      if (t0 > 5000) break;
    end
    checks++;
    if (!buf_release[b] || buf_release[1-b] || cur_filter != f) begin
      failures++;
      $display("frame %0d: release %0d%0d filter %0d", seed, buf_release[1], buf_release[0], cur_filter);
    end
    buf_full[b] = 1'b0;
    if (timed) begin
      checks++;
      if (t0 > NPIX + W + 1 + 16) begin
        failures++;
        $display("frame %0d: %0d cycles, expected at most %0d", seed, t0, NPIX + W + 1 + 16);
      end
    end
    bad = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [31:0] got;
        logic [7:0]  e;
        got = u_out.mem[OUT_BASE + y * W + x];
        e   = 8'(ref_pixel(f, y, x));
        checks++;
        if (got != {8'h0, e, e, e}) begin
          failures++;
          if (bad++ < 5) $display("frame %0d (%0d,%0d): %h expected %h", seed, x, y, got, e);
        end
      end
    @(negedge clk);
    t1 = 0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    buf_full[0] = 0; buf_full[1] = 0;
    filter_sel = FILT_SOBEL;
    deny_rd = 0; deny_wr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run(0, FILT_SOBEL,   1, 1);
    run(1, FILT_PREWITT, 2, 1);
    deny_rd = 30; deny_wr = 80;
    run(0, FILT_LAPLACE, 3, 0);
    run(1, FILT_SOBEL,   4, 0);
    checks++;
    if (n_stall == 0) begin failures++; $display("no write stall seen"); end
    $display("write stalls=%0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

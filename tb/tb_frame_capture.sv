// tb_frame_capture: an 8x6 camera stream with random pixel gaps, written into
// two stubbed SRAM ports that refuse a share of the writes. The testbench
// releases buffers itself. It checks: each frame lands, converted to RGB, in
// the buffer that is its turn (0, 1, 0, ...); buf_full rises only when the
// whole frame is in memory; a frame arriving while its buffer is still full
// is dropped whole and not written; a sof in mid-frame abandons the partial
// frame; a FIFO that overflows is reported.
module tb_frame_capture;
  import esm_pkg::*;
  localparam int W = 8, H = 6, NPIX = W * H, BASE = 16;
  logic clk = 0, rst_n = 0;
  cam_bus_t  cam;
  sram_req_t wr_req [2];
  sram_rsp_t wr_rsp [2];
  logic      buf_full [2], buf_release [2];
  logic      frame_done, frame_drop, overflow;
  int        deny [2];
  int checks = 0, failures = 0, n_drop = 0, n_done = 0, n_ovf = 0;

  frame_capture #(.IMG_W(W), .IMG_H(H), .BASE(BASE), .FIFO_DEPTH(8)) dut (.*);
  sram_port_stub #(.AW(8)) u_m0 (.clk(clk), .deny_pct(deny[0]), .req(wr_req[0]), .rsp(wr_rsp[0]));
  sram_port_stub #(.AW(8)) u_m1 (.clk(clk), .deny_pct(deny[1]), .req(wr_req[1]), .rsp(wr_rsp[1]));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && frame_drop) n_drop++;
    if (rst_n && frame_done) n_done++;
    if (rst_n && overflow)   n_ovf++;
  end

  function automatic int clampi(int x);
    return x < 0 ? 0 : (x > 255 ? 255 : x);
  endfunction
  function automatic int fdiv(int x);
    return (x >= 0) ? x / 256 : -((-x + 255) / 256);
  endfunction
  function automatic logic [31:0] to_rgb(yuv_t p);
    int y, u, v;
    y = p.y; u = int'(p.u) - 128; v = int'(p.v) - 128;
    return {8'h00, 8'(clampi(y + fdiv(359 * v))), 8'(clampi(y - fdiv(88 * u + 183 * v))),
            8'(clampi(y + fdiv(454 * u)))};
  endfunction

  yuv_t frame [NPIX];

  task automatic send_frame(int seed, int gap_pct, int npix = NPIX);
    for (int i = 0; i < NPIX; i++)
      frame[i] = '{y: 8'(seed * 37 + i * 5), u: 8'(seed * 11 + i * 3), v: 8'(255 - i * 7 - seed)};
    for (int i = 0; i < npix; i++) begin
      while ($urandom_range(0, 99) < gap_pct) begin
        cam = '0;
        @(negedge clk);
      end
      cam = '{valid: 1'b1, sof: (i == 0), pix: frame[i]};
      @(negedge clk);
    end
    cam = '0;
  endtask

  task automatic check_buffer(int b, string what);
    int bad = 0;
    for (int i = 0; i < NPIX; i++) begin
      logic [31:0] got;
      got = (b == 0) ? u_m0.mem[BASE + i] : u_m1.mem[BASE + i];
      if (got != to_rgb(frame[i])) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("%s: buffer %0d has %0d wrong pixels", what, b, bad);
    end
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic release_buf(int b);
    buf_release[b] = 1'b1;
    @(negedge clk);
    buf_release[b] = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cam = '0;
    buf_release[0] = 0; buf_release[1] = 0;
    deny[0] = 10; deny[1] = 10;
    foreach (u_m0.mem[i]) begin u_m0.mem[i] = '0; u_m1.mem[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // frame A -> buffer 0
    send_frame(1, 20);
    wait_cycles(30);
    checks++;
    if (!buf_full[0] || buf_full[1]) begin failures++; $display("A: buf_full %0d%0d", buf_full[1], buf_full[0]); end
    check_buffer(0, "A");

    // frame B -> buffer 1, no gaps and a free port
    deny[1] = 0;
    send_frame(2, 0);
    deny[1] = 10;
    wait_cycles(30);
    checks++;
    if (!buf_full[0] || !buf_full[1]) begin failures++; $display("B: buf_full %0d%0d", buf_full[1], buf_full[0]); end
    check_buffer(1, "B");

    // frame C: both buffers full -> dropped, buffer 0 keeps frame A's data
    for (int i = 0; i < NPIX; i++) u_m0.mem[BASE + i] = 32'hDEAD;
    send_frame(3, 30);
    wait_cycles(30);
    checks++;
    if (n_drop != 1 || u_m0.mem[BASE] != 32'hDEAD) begin
      failures++;
      $display("C: drops=%0d mem=%h", n_drop, u_m0.mem[BASE]);
    end

    // release buffer 0: frame D goes there; buf_full[0] only after the whole frame
    release_buf(0);
    checks++;
    if (buf_full[0]) begin failures++; $display("release ignored"); end
    fork
      send_frame(4, 25);
      begin
        // while the frame streams in, the buffer must not be reported full
        repeat (NPIX) begin
          @(negedge clk);
          if (buf_full[0] && cam.valid) begin
            checks++;
            failures++;
            $display("D: buffer full before the frame ended");
            break;
          end
        end
      end
    join
    wait_cycles(30);
    check_buffer(0, "D");

    // mid-frame sof: release buffer 1, send half of E, then F whole
    release_buf(1);
    deny[1] = 0;
    send_frame(5, 0, NPIX / 2);
    checks++;
    if (buf_full[1]) begin failures++; $display("E: half frame handed over"); end
    send_frame(6, 0);
    wait_cycles(30);
    checks++;
    if (buf_full[1] || n_drop != 2) begin
      failures++;
      $display("F: buf_full[1]=%0d drops=%0d", buf_full[1], n_drop);
    end
    // F's sof arrived while E was in progress: E abandoned, F dropped.
    // The next frame G must be taken into buffer 1.
    send_frame(7, 0);
    wait_cycles(30);
    check_buffer(1, "G");

    // overflow: buffer 1's port refuses everything for a while
    release_buf(0);
    deny[0] = 100;
    send_frame(8, 0);
    deny[0] = 0;
    wait_cycles(30);
    checks++;
    if (n_ovf == 0) begin failures++; $display("overflow not reported"); end

    checks++;
    if (n_done != 5) begin failures++; $display("frames done %0d, expected 5", n_done); end
    $display("done=%0d drops=%0d overflow=%0d grants=%0d/%0d denied=%0d/%0d", n_done, n_drop, n_ovf,
             u_m0.n_grants, u_m1.n_grants, u_m0.n_denied, u_m1.n_denied);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_yuv2rgb: random YUV pixels with random gaps; checks the one-clock
// latency of valid/sof, the exact fixed-point result, and that it stays within
// 2 of the floating-point BT.601 conversion.
module tb_yuv2rgb;
  import esm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_sof, out_valid, out_sof;
  yuv_t yuv;
  rgb_t rgb;
  int checks = 0, failures = 0;

  yuv2rgb dut (.*);
  always #5 clk = ~clk;

  function automatic int clampi(int x);
    return x < 0 ? 0 : (x > 255 ? 255 : x);
  endfunction
  // floor division by 256 of a signed value
  function automatic int fdiv(int x);
    return (x >= 0) ? x / 256 : -((-x + 255) / 256);
  endfunction

  function automatic bit near(logic [7:0] got, real x);
    int d;
    d = int'(got) - clampi(int'(x));
    return d >= -2 && d <= 2;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_sof = 0; yuv = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int y, u, v, r, g, b;
      real rr, gr, br;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_sof   = ($urandom_range(0, 9) == 0);
      yuv      = '{y: 8'($urandom), u: 8'($urandom), v: 8'($urandom)};
      y = yuv.y; u = int'(yuv.u) - 128; v = int'(yuv.v) - 128;
      r = clampi(y + fdiv(359 * v));
      g = clampi(y - fdiv(88 * u + 183 * v));
      b = clampi(y + fdiv(454 * u));
      rr = y + 1.402 * v;  gr = y - 0.344136 * u - 0.714136 * v;  br = y + 1.772 * u;
      @(negedge clk);
      checks++;
      if (out_valid != in_valid || out_sof != (in_sof && in_valid)) begin
        failures++;
        $display("strobe latency wrong");
      end
      if (in_valid) begin
        checks++;
        if (rgb.r != 8'(r) || rgb.g != 8'(g) || rgb.b != 8'(b)) begin
          failures++;
          $display("yuv %h -> %h, expected %02h%02h%02h", yuv, rgb, r, g, b);
        end
        checks++;
        if (!near(rgb.r, rr) || !near(rgb.g, gr) || !near(rgb.b, br)) begin
          failures++;
          $display("yuv %h -> %h too far from BT.601", yuv, rgb);
        end
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

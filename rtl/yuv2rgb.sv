// yuv2rgb: YUV to RGB conversion of the capture module, one pixel per clock.
//
// ITU-R BT.601 coefficients in 8-bit fixed point (x/256):
//   R = Y + (359*(V-128)) >>> 8
//   G = Y - (88*(U-128) + 183*(V-128)) >>> 8
//   B = Y + (454*(U-128)) >>> 8
// each clamped to 0..255 (>>> rounds toward minus infinity). The source only
// names the conversion; the standard and the fixed-point format are this
// design's choice. One register stage: rgb, out_valid and out_sof follow
// in_valid/in_sof by one clock.
module yuv2rgb
  import esm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sof,
  input  yuv_t yuv,
  output logic out_valid,
  output logic out_sof,
  output rgb_t rgb
);

  function automatic logic [7:0] clamp8(logic signed [17:0] x);
    if (x < 0)        return 8'd0;
    else if (x > 255) return 8'd255;
    else              return x[7:0];
  endfunction

  logic signed [17:0] y, u, v, r_s, g_s, b_s;
  rgb_t               rgb_d;

  always_comb begin
    y   = $signed({10'b0, yuv.y});
    u   = $signed({10'b0, yuv.u}) - 18'sd128;
    v   = $signed({10'b0, yuv.v}) - 18'sd128;
    r_s = y + ((18'sd359 * v) >>> 8);
    g_s = y - ((18'sd88 * u + 18'sd183 * v) >>> 8);
    b_s = y + ((18'sd454 * u) >>> 8);
    rgb_d.r = clamp8(r_s);
    rgb_d.g = clamp8(g_s);
    rgb_d.b = clamp8(b_s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      rgb       <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_sof && in_valid;
      if (in_valid) rgb <= rgb_d;
    end
  end

endmodule

// sobel_prewitt_filter: gradient edge detector on a 3x3 window.
//
// Sobel and Prewitt share one structure and differ only in the weight of the
// centre row/column taps: CENTER_W = 2 gives Sobel, CENTER_W = 1 Prewitt.
//   Gx = (w[0][2] + C*w[1][2] + w[2][2]) - (w[0][0] + C*w[1][0] + w[2][0])
//   Gy = (w[2][0] + C*w[2][1] + w[2][2]) - (w[0][0] + C*w[0][1] + w[0][2])
//   edge = min(|Gx| + |Gy|, 255)
// The |Gx| + |Gy| magnitude and the saturation to 8 bits are this design's
// choices; the source names the two operators only. Purely combinational.
module sobel_prewitt_filter #(
  parameter int unsigned CENTER_W = 2
) (
  input  logic [7:0] win [3][3],
  output logic [7:0] edge_out
);

  logic signed [12:0] gx, gy;
  logic        [12:0] ax, ay;
  logic        [13:0] mag;

  always_comb begin
    gx = 13'sd0;
    gy = 13'sd0;
    for (int i = 0; i < 3; i++) begin
      // Taps in the middle row/column carry the centre weight.
      gx += (i == 1 ? 13'(CENTER_W) : 13'sd1) * ($signed({5'b0, win[i][2]}) - $signed({5'b0, win[i][0]}));
      gy += (i == 1 ? 13'(CENTER_W) : 13'sd1) * ($signed({5'b0, win[2][i]}) - $signed({5'b0, win[0][i]}));
    end
    ax  = gx[12] ? 13'(-gx) : 13'(gx);
    ay  = gy[12] ? 13'(-gy) : 13'(gy);
    mag = {1'b0, ax} + {1'b0, ay};
    edge_out = (mag > 14'd255) ? 8'hFF : mag[7:0];
  end

endmodule

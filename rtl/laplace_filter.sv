// laplace_filter: Laplace edge detector on a 3x3 window.
//
// Uses the 4-neighbour Laplace kernel
//     0  1  0
//     1 -4  1
//     0  1  0
// and outputs min(|L|, 255). The kernel choice (4- rather than 8-neighbour)
// and the saturation are this design's own; the source names the operator and
// states that its structure differs from Sobel/Prewitt. Purely combinational.
module laplace_filter (
  input  logic [7:0] win [3][3],
  output logic [7:0] edge_out
);

  logic signed [11:0] l;
  logic        [11:0] al;

  always_comb begin
    l  = $signed({4'b0, win[0][1]}) + $signed({4'b0, win[1][0]})
       + $signed({4'b0, win[1][2]}) + $signed({4'b0, win[2][1]})
       - 12'sd4 * $signed({4'b0, win[1][1]});
    al = l[11] ? 12'(-l) : 12'(l);
    edge_out = (al > 12'd255) ? 8'hFF : al[7:0];
  end

endmodule

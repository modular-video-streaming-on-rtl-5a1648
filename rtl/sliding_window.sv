// sliding_window: WIN x WIN neighbourhood of a raster-scanned image.
//
// Structure as in the classic line-buffer window: WIN rows of WIN pixel
// registers. Each shift_en places pix_in in the newest cell of the bottom row
// and moves every row one cell along. The oldest cell of each row is pushed
// into a line FIFO whose output becomes the newest cell of the row above, so
// the row above always holds the same columns one image line earlier. The
// oldest cell of the top row is discarded. With a line of LINE_W pixels each
// FIFO holds LINE_W - WIN pixels; until a FIFO has filled, zeros enter the
// row above.
//
// Interface: win[r][c] is the window in image orientation, r = 0 the oldest
// line (top) and c = 0 the oldest column (left); win[WIN-1][WIN-1] is the
// pixel shifted in last. The outputs are registered and change one clock
// after shift_en.
//
// The register/FIFO chain follows the published 5x5 arrangement; the zero fill
// at start-up and the FIFO implementation are this design's choices.
module sliding_window #(
  parameter int unsigned WIN    = 5,
  parameter int unsigned LINE_W = 320,
  parameter int unsigned PW     = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift_en,
  input  logic [PW-1:0] pix_in,
  output logic [PW-1:0] win [WIN][WIN]
);

  localparam int unsigned DEPTH = LINE_W - WIN;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  // wreg[r][k]: k = 0 is the newest cell of row r, k = WIN-1 the oldest.
  logic [PW-1:0] wreg     [WIN][WIN];
  logic [PW-1:0] fifo_out [WIN-1];
  logic          fifo_full[WIN-1];

  for (genvar r = 0; r < WIN - 1; r++) begin : g_fifo
    logic [CW-1:0] cnt;
    logic          empty;
    // Row r is fed from the oldest cell of row r+1.
    line_fifo #(.W(PW), .DEPTH(DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (shift_en),
      .din   (wreg[r+1][WIN-1]),
      .pop   (shift_en && fifo_full[r]),
      .dout  (fifo_out[r]),
      .count (cnt),
      .full  (fifo_full[r]),
      .empty (empty)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < WIN; r++)
        for (int k = 0; k < WIN; k++)
          wreg[r][k] <= '0;
    end else if (shift_en) begin
      for (int r = 0; r < WIN; r++) begin
        for (int k = WIN - 1; k > 0; k--)
          wreg[r][k] <= wreg[r][k-1];
        if (r == WIN - 1) wreg[r][0] <= pix_in;
        else              wreg[r][0] <= fifo_full[r] ? fifo_out[r] : '0;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN; c++)
        win[r][c] = wreg[r][WIN-1-c];
  end

endmodule

// frame_capture: capture module of the streaming chain.
//
// Takes the camera stream (one YUV pixel per strobe, sof on the first pixel of
// a frame), converts it to RGB and writes whole frames of IMG_W x IMG_H pixels
// alternately into two frame buffers: buffer 0 in the SRAM of the capture
// slot (wr_req[0], as central module) and buffer 1 in the SRAM of the
// neighbouring processing slot (wr_req[1], as its left neighbour). Pixel n of
// a frame goes to word BASE + n, as 0x00RRGGBB.
//
// Hand-over: when the last pixel of a frame has been written, buf_full[b] is
// set and the next frame goes to the other buffer. The consumer clears
// buf_full[b] by pulsing buf_release[b] when it has finished reading. A frame
// whose target buffer is still full is dropped whole (frame_drop pulses at its
// sof), as a camera cannot be stalled. A small FIFO absorbs cycles in which
// the SRAM controller does not grant the write; a pixel that finds it full is
// lost and overflow pulses. A sof in the middle of a frame abandons the
// partial frame (its buffer is not handed over) and drops the new one.
//
// The alternating two-buffer scheme follows the source; the drop policy, the
// FIFO, the address layout and the handshake are this design's choices.
// Latency: yuv2rgb adds one clock, the FIFO one more before the write request.
module frame_capture
  import esm_pkg::*;
#(
  parameter int unsigned IMG_W      = 320,
  parameter int unsigned IMG_H      = 240,
  parameter int unsigned BASE       = 0,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cam_bus_t  cam,
  output sram_req_t wr_req [2],
  input  sram_rsp_t wr_rsp [2],
  output logic      buf_full [2],
  input  logic      buf_release [2],
  output logic      frame_done,
  output logic      frame_drop,
  output logic      overflow
);

  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam int unsigned NW   = $clog2(NPIX);

  typedef struct packed {
    logic [NW-1:0] idx;
    rgb_t          pix;
  } entry_t;

  logic     c_valid, c_sof;
  rgb_t     c_rgb;
  logic     wbuf;          // buffer being (or next to be) written
  logic     capturing;     // pixels of the current frame are being taken
  logic     draining;      // all pixels taken, waiting for the FIFO to empty
  logic [NW-1:0] pix_cnt;

  entry_t   f_din, f_dout;
  logic     f_push, f_pop, f_full, f_empty;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
  logic     take_first, take_pix, granted;

  yuv2rgb u_conv (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (cam.valid),
    .in_sof    (cam.sof),
    .yuv       (cam.pix),
    .out_valid (c_valid),
    .out_sof   (c_sof),
    .rgb       (c_rgb)
  );

  // A frame starts only into a free buffer and when the previous one is done.
  assign take_first = c_valid && c_sof && !capturing && !draining && !buf_full[wbuf];
  assign take_pix   = take_first || (c_valid && capturing && !c_sof);
  assign frame_drop = c_valid && c_sof && !take_first;

  assign f_din    = '{idx: take_first ? '0 : pix_cnt, pix: c_rgb};
  assign f_push   = take_pix;
  assign overflow = take_pix && f_full && !f_pop;

  line_fifo #(.W($bits(entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (f_push && !overflow),
    .din   (f_din),
    .pop   (f_pop),
    .dout  (f_dout),
    .count (f_count),
    .full  (f_full),
    .empty (f_empty)
  );

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      wr_req[b].valid = !f_empty && (wbuf == 1'(b));
      wr_req[b].we    = 1'b1;
      wr_req[b].addr  = SRAM_AW'(BASE) + SRAM_AW'(f_dout.idx);
      wr_req[b].wdata = SRAM_DW'(f_dout.pix);
    end
    granted = wr_rsp[wbuf].gnt && !f_empty;
  end
  assign f_pop = granted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbuf        <= 1'b0;
      capturing   <= 1'b0;
      draining    <= 1'b0;
      pix_cnt     <= '0;
      buf_full[0] <= 1'b0;
      buf_full[1] <= 1'b0;
      frame_done  <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      for (int b = 0; b < 2; b++)
        if (buf_release[b]) buf_full[b] <= 1'b0;

      // A sof inside a frame abandons it; that buffer is not handed over.
      if (c_valid && c_sof && capturing) capturing <= 1'b0;

      if (take_pix) begin
        if (32'(take_first ? '0 : pix_cnt) == NPIX - 1) begin
          capturing <= 1'b0;
          draining  <= 1'b1;
        end else begin
          capturing <= 1'b1;
        end
        pix_cnt <= (take_first ? '0 : pix_cnt) + 1'b1;
      end

      // Frame complete once its last pixel left the FIFO.
      if (draining && f_empty) begin
        draining       <= 1'b0;
        buf_full[wbuf] <= 1'b1;
        wbuf           <= !wbuf;
        frame_done     <= 1'b1;
      end
    end
  end

endmodule

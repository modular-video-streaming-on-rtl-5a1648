// frame_processing: edge-detection module of the streaming chain.
//
// Waits until the capture module has filled frame buffer b (buf_full[b]),
// reads it pixel by pixel (buffer 0 through rd_req[0], the capture slot's
// SRAM as right neighbour; buffer 1 through rd_req[1], its own SRAM),
// converts each pixel to luminance, shifts it through a 3x3 sliding window and
// applies the edge detector selected by filter_sel. filter_sel is sampled at
// the start of each frame and stands for the module that is currently loaded
// into the slot (Sobel, Prewitt or Laplace). Results are written, as
// 0x00EEEEEE grey pixels, to word OUT_BASE + n of the rendering slot's SRAM
// (wr_req, as its left neighbour). When the whole frame is written the buffer
// is released (buf_release[b] pulses), frame_done pulses and the next frame is
// taken from the other buffer.
//
// Window alignment: after input pixel i has been shifted in, the window is
// centred on pixel i - (IMG_W + 1). The output for a pixel on the one-pixel
// image border is 0. After the last pixel of the frame, IMG_W + 1 zero pixels
// are shifted in to push the last rows through the window.
//
// Flow control: writes wait in an output FIFO until the rendering slot's
// controller grants them (the renderer has priority there); reads are only
// issued while the FIFO has room for every pixel already in flight, so
// nothing is lost when writes stall. wr_stall is high while a write waits.
//
// The read-window-filter-write structure follows the source; the alignment,
// the border policy, the luminance formula and the flow control are this
// design's choices.
module frame_processing
  import esm_pkg::*;
#(
  parameter int unsigned IMG_W      = 320,
  parameter int unsigned IMG_H      = 240,
  parameter int unsigned IN_BASE    = 0,
  parameter int unsigned OUT_BASE   = 0,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  filter_e   filter_sel,
  input  logic      buf_full [2],
  output logic      buf_release [2],
  output sram_req_t rd_req [2],
  input  sram_rsp_t rd_rsp [2],
  output sram_req_t wr_req,
  input  sram_rsp_t wr_rsp,
  output filter_e   cur_filter,
  output logic      busy,
  output logic      frame_done,
  output logic      wr_stall
);

  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam int unsigned LAG   = IMG_W + 1;          // input-to-centre offset
  localparam int unsigned NIN   = NPIX + LAG;         // pixels shifted per frame
  localparam int unsigned NW    = $clog2(NIN + 1);
  localparam int unsigned XW    = $clog2(IMG_W);
  localparam int unsigned YW    = $clog2(IMG_H);
  localparam int unsigned FCW   = $clog2(FIFO_DEPTH + 1);

  typedef struct packed {
    logic [NW-1:0] idx;
    logic [7:0]    pix;
  } entry_t;

  logic          rbuf;
  logic [NW-1:0] issued;     // window inputs started (reads + zero pixels)
  logic [NW-1:0] shifted;    // window inputs shifted in
  logic [NW-1:0] written;    // output pixels written
  logic [FCW:0]  outstanding;
  logic [FCW:0]  inflight;   // inputs started, not yet past the window stage
  logic          can_issue, rd_go, inject, in_valid, rd_gnt;
  logic [7:0]    in_pix;
  rgb_t          rd_pix;

  // window and output stage
  logic [7:0]    win [3][3];
  logic [7:0]    e_sobel, e_prewitt, e_laplace, e_sel;
  logic          win_new;          // window updated in the previous cycle
  logic          out_valid;
  logic [NW-1:0] out_idx;
  logic [XW-1:0] ox;
  logic [YW-1:0] oy;
  logic          border;

  entry_t        f_din, f_dout;
  logic          f_full, f_empty, f_pop;
  logic [FCW-1:0] f_count;

  // ---------------------------------------------------------------- input
  assign can_issue = busy && (32'(f_count) + 32'(inflight) < FIFO_DEPTH);
  assign rd_go     = can_issue && (32'(issued) < NPIX);
  // zero pixels only after every read has returned, to keep the order
  assign inject    = can_issue && (32'(issued) >= NPIX) && (32'(issued) < NIN)
                     && (outstanding == '0);

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      rd_req[b].valid = rd_go && (rbuf == 1'(b));
      rd_req[b].we    = 1'b0;
      rd_req[b].addr  = SRAM_AW'(IN_BASE) + SRAM_AW'(issued);
      rd_req[b].wdata = '0;
    end
  end
  assign rd_gnt = rd_go && rd_rsp[rbuf].gnt;

  assign rd_pix   = rgb_t'(rd_rsp[rbuf].rdata[23:0]);
  assign in_valid = rd_rsp[rbuf].rvalid || inject;
  assign in_pix   = rd_rsp[rbuf].rvalid ? rgb_to_gray(rd_pix) : 8'd0;

  sliding_window #(.WIN(3), .LINE_W(IMG_W), .PW(8)) u_win (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (in_valid),
    .pix_in   (in_pix),
    .win      (win)
  );

  // ---------------------------------------------------------------- filters
  sobel_prewitt_filter #(.CENTER_W(2)) u_sobel   (.win(win), .edge_out(e_sobel));
  sobel_prewitt_filter #(.CENTER_W(1)) u_prewitt (.win(win), .edge_out(e_prewitt));
  laplace_filter                       u_laplace (.win(win), .edge_out(e_laplace));

  always_comb begin
    unique case (cur_filter)
      FILT_SOBEL:   e_sel = e_sobel;
      FILT_PREWITT: e_sel = e_prewitt;
      FILT_LAPLACE: e_sel = e_laplace;
      default:      e_sel = 8'd0;
    endcase
  end

  assign out_valid = win_new && (32'(shifted) > LAG);
  assign border    = (ox == '0) || (32'(ox) == IMG_W - 1) || (oy == '0) || (32'(oy) == IMG_H - 1);
  assign f_din     = '{idx: out_idx, pix: border ? 8'd0 : e_sel};

  line_fifo #(.W($bits(entry_t)), .DEPTH(FIFO_DEPTH)) u_ofifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (out_valid),
    .din   (f_din),
    .pop   (f_pop),
    .dout  (f_dout),
    .count (f_count),
    .full  (f_full),
    .empty (f_empty)
  );

  always_comb begin
    wr_req.valid = !f_empty;
    wr_req.we    = 1'b1;
    wr_req.addr  = SRAM_AW'(OUT_BASE) + SRAM_AW'(f_dout.idx);
    wr_req.wdata = SRAM_DW'({3{f_dout.pix}});
  end
  assign f_pop    = !f_empty && wr_rsp.gnt;
  assign wr_stall = !f_empty && !wr_rsp.gnt;

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbuf           <= 1'b0;
      busy           <= 1'b0;
      cur_filter     <= FILT_SOBEL;
      issued         <= '0;
      shifted        <= '0;
      written        <= '0;
      outstanding    <= '0;
      inflight       <= '0;
      win_new        <= 1'b0;
      out_idx        <= '0;
      ox             <= '0;
      oy             <= '0;
      frame_done     <= 1'b0;
      buf_release[0] <= 1'b0;
      buf_release[1] <= 1'b0;
    end else begin
      frame_done     <= 1'b0;
      buf_release[0] <= 1'b0;
      buf_release[1] <= 1'b0;
      win_new        <= in_valid;

      if (!busy) begin
        if (buf_full[rbuf]) begin
          busy       <= 1'b1;
          cur_filter <= filter_sel;
          issued     <= '0;
          shifted    <= '0;
          written    <= '0;
          out_idx    <= '0;
          ox         <= '0;
          oy         <= '0;
        end
      end else begin
        if (rd_gnt || inject) issued <= issued + 1'b1;
        if (in_valid)         shifted <= shifted + 1'b1;
        if (out_valid) begin
          out_idx <= out_idx + 1'b1;
          if (32'(ox) == IMG_W - 1) begin
            ox <= '0;
            oy <= oy + 1'b1;
          end else begin
            ox <= ox + 1'b1;
          end
        end
        if (f_pop) begin
          written <= written + 1'b1;
          if (32'(written) == NPIX - 1) begin
            busy              <= 1'b0;
            frame_done        <= 1'b1;
            buf_release[rbuf] <= 1'b1;
            rbuf              <= !rbuf;
          end
        end
      end

      case ({rd_gnt, rd_rsp[rbuf].rvalid})
        2'b10:   outstanding <= outstanding + 1'b1;
        2'b01:   outstanding <= outstanding - 1'b1;
        default: ;
      endcase
      case ({rd_gnt || inject, win_new})
        2'b10:   inflight <= inflight + 1'b1;
        2'b01:   inflight <= inflight - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_ofifo_overflow: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> !f_full || f_pop)
    else $error("frame_processing: output FIFO overflow");

endmodule

// tb_sliding_window: shifts a random image through a 5x5 window with a short
// line and compares every window position with the image pixel it must hold:
// after pixel i, win[r][c] = img[i - (4-r)*LINE_W - (4-c)] (0 before the
// start). Shifts are spaced at random to check that the window only moves on
// shift_en.
module tb_sliding_window;
  localparam int WIN = 5, LINE_W = 9, NPIX = LINE_W * 8;
  logic clk = 0, rst_n = 0;
  logic shift_en;
  logic [7:0] pix_in;
  logic [7:0] win [WIN][WIN];
  logic [7:0] img [NPIX];
  int checks = 0, failures = 0;

  sliding_window #(.WIN(WIN), .LINE_W(LINE_W), .PW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift_en = 0; pix_in = 0;
    foreach (img[i]) img[i] = 8'($urandom_range(1, 255));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk);
      shift_en = 1;
      pix_in   = img[i];
      @(negedge clk);
      shift_en = 0;
      pix_in   = 8'hEE;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          int j;
          logic [7:0] exp;
          j   = i - (WIN - 1 - r) * LINE_W - (WIN - 1 - c);
          exp = (j >= 0) ? img[j] : 8'd0;
          checks++;
          if (win[r][c] !== exp) begin
            failures++;
            if (failures < 10) $display("i=%0d win[%0d][%0d]=%h exp %h", i, r, c, win[r][c], exp);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sobel_prewitt_filter: applies random and hand-picked 3x3 windows to the
// Sobel (centre weight 2) and Prewitt (centre weight 1) instances and compares
// with the kernels written out tap by tap.
module tb_sobel_prewitt_filter;
  logic [7:0] win [3][3];
  logic [7:0] e_sobel, e_prewitt;
  int checks = 0, failures = 0;

  sobel_prewitt_filter #(.CENTER_W(2)) u_sobel   (.win(win), .edge_out(e_sobel));
  sobel_prewitt_filter #(.CENTER_W(1)) u_prewitt (.win(win), .edge_out(e_prewitt));

  function automatic int ref_edge(int k);
    int gx, gy, m;
    gx = -win[0][0] + win[0][2] - k*win[1][0] + k*win[1][2] - win[2][0] + win[2][2];
    gy = -win[0][0] - k*win[0][1] - win[0][2] + win[2][0] + k*win[2][1] + win[2][2];
    m  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 255 ? 255 : m;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          case (n % 4)
            0: win[r][c] = 8'($urandom);
            1: win[r][c] = 8'($urandom_range(0, 20));              // small gradients
            2: win[r][c] = (c == 2) ? 8'd40 : 8'd10;              // vertical edge
            default: win[r][c] = (r == 0) ? 8'd7 : 8'd0;          // horizontal edge
          endcase
      #1;
      checks += 2;
      if (e_sobel != 8'(ref_edge(2))) begin
        failures++;
        $display("sobel %0d exp %0d", e_sobel, ref_edge(2));
      end
      if (e_prewitt != 8'(ref_edge(1))) begin
        failures++;
        $display("prewitt %0d exp %0d", e_prewitt, ref_edge(1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

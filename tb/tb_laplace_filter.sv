// tb_laplace_filter: random and hand-picked windows against the 4-neighbour
// Laplace kernel written out tap by tap.
module tb_laplace_filter;
  logic [7:0] win [3][3];
  logic [7:0] edge_out;
  int checks = 0, failures = 0;

  laplace_filter dut (.win(win), .edge_out(edge_out));

  function automatic int ref_edge();
    int l;
    l = win[0][1] + win[1][0] + win[1][2] + win[2][1] - 4 * win[1][1];
    if (l < 0) l = -l;
    return l > 255 ? 255 : l;
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
          case (n % 3)
            0: win[r][c] = 8'($urandom);
            1: win[r][c] = 8'($urandom_range(0, 30));
            default: win[r][c] = (r == 1 && c == 1) ? 8'($urandom_range(0, 60)) : 8'd9;
          endcase
      #1;
      checks++;
      if (edge_out != 8'(ref_edge())) begin
        failures++;
        $display("laplace %0d exp %0d", edge_out, ref_edge());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

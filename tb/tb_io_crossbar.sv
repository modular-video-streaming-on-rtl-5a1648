// tb_io_crossbar: programs random routes in both directions (and disables
// some) and checks every channel and peripheral output, one clock after the
// inputs, against a route table kept by the testbench. Writes to
// out-of-range indices must not change any route.
module tb_io_crossbar;
  localparam int N_CH = 22, N_PER = 4, CW = 32, IW = 5;
  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_to_per, cfg_en;
  logic [IW-1:0] cfg_dst, cfg_src;
  logic [CW-1:0] ch_out [N_CH], ch_in [N_CH], per_in [N_PER], per_out [N_PER];
  int checks = 0, failures = 0;
  int ch_route [N_CH], per_route [N_PER];   // -1: disabled

  io_crossbar #(.N_CH(N_CH), .N_PER(N_PER), .CW(CW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW-1:0] ch_prev [N_CH], per_prev [N_PER];
    cfg_we = 0; cfg_to_per = 0; cfg_en = 0; cfg_dst = 0; cfg_src = 0;
    foreach (ch_route[c]) ch_route[c] = -1;
    foreach (per_route[p]) per_route[p] = -1;
    foreach (ch_out[c]) ch_out[c] = '0;
    foreach (per_in[p]) per_in[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // inputs of this cycle
      foreach (ch_out[c]) ch_out[c] = $urandom;
      foreach (per_in[p]) per_in[p] = $urandom;
      ch_prev = ch_out;
      per_prev = per_in;
      // a configuration write now and then, effective from the next edge
      cfg_we = ($urandom_range(0, 3) == 0);
      cfg_to_per = 1'($urandom);
      cfg_en = ($urandom_range(0, 4) != 0);
      cfg_dst = IW'($urandom_range(0, cfg_to_per ? N_PER : N_CH));      // one past the end now and then
      cfg_src = IW'($urandom_range(0, cfg_to_per ? N_CH - 1 : N_PER - 1));
      @(posedge clk);
      #1;
      // outputs registered from the routes valid before this edge
      foreach (ch_in[c]) begin
        checks++;
        if (ch_in[c] != (ch_route[c] < 0 ? '0 : per_prev[ch_route[c]])) begin
          failures++;
          $display("n=%0d ch_in[%0d] wrong", n, c);
        end
      end
      foreach (per_out[p]) begin
        checks++;
        if (per_out[p] != (per_route[p] < 0 ? '0 : ch_prev[per_route[p]])) begin
          failures++;
          $display("n=%0d per_out[%0d] wrong", n, p);
        end
      end
      if (cfg_we) begin
        if (cfg_to_per && cfg_dst < N_PER) per_route[cfg_dst] = cfg_en ? int'(cfg_src) : -1;
        if (!cfg_to_per && cfg_dst < N_CH) ch_route[cfg_dst] = cfg_en ? int'(cfg_src) : -1;
      end
      cfg_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

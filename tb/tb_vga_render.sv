// tb_vga_render: small VGA timing (12x8 visible, 20x12 total) showing a 6x4
// region of interest, i.e. 2x2 copies. The testbench plays the SRAM
// controller: it grants reads (or, during the second frame, refuses some) and
// returns data = pattern(address) two cycles later. Independent counters
// predict, per cycle, sync pulses, data enable and the pixel two cycles after
// its position, the read address, frame_start and underrun.
module tb_vga_render;
  import esm_pkg::*;
  localparam int HA = 12, HF = 2, HS = 3, HB = 3, VA = 8, VF = 1, VS = 2, VB = 1;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  localparam int IW = 6, IH = 4, BASE = 100;
  logic clk = 0, rst_n = 0;
  sram_req_t rd_req;
  sram_rsp_t rd_rsp;
  vga_bus_t  vga;
  logic      frame_start, underrun;
  int checks = 0, failures = 0, n_underrun = 0, n_frames = 0;

  vga_render #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
               .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB),
               .IMG_W(IW), .IMG_H(IH), .BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [23:0] pattern(int a);
    return 24'(a * 32'h010203 + 32'h55);
  endfunction

  // SRAM controller stand-in
  logic deny;
  logic [1:0] v_pipe;
  logic [23:0] d_pipe [2];
  always_comb begin
    rd_rsp.gnt    = rd_req.valid && !deny;
    rd_rsp.rvalid = v_pipe[1];
    rd_rsp.rdata  = {8'h00, d_pipe[1]};
  end
  always @(posedge clk) begin
    v_pipe    <= {v_pipe[0], rd_rsp.gnt && !rd_req.we};
    d_pipe[0] <= pattern(int'(rd_req.addr));
    d_pipe[1] <= d_pipe[0];
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected outputs, two entries deep
    logic        e_de [3], e_hs [3], e_vs [3], e_gnt [3];
    logic [23:0] e_pix [3];
    deny = 0;
    v_pipe = '0;
    foreach (e_de[i]) begin e_de[i] = 0; e_hs[i] = 0; e_vs[i] = 0; e_gnt[i] = 0; e_pix[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          logic act;
          int   addr;
          deny = (f == 1) && ($urandom_range(0, 3) == 0);
          #1;
          act  = (h < HA) && (v < VA);
          addr = BASE + (v % IH) * IW + (h % IW);
          // inputs of this cycle
          checks++;
          if (rd_req.valid != act || (act && int'(rd_req.addr) != addr)) begin
            failures++;
            $display("f%0d (%0d,%0d): req %0d addr %0d, expected %0d %0d", f, h, v, rd_req.valid, rd_req.addr, act, addr);
          end
          checks++;
          if (frame_start != (h == 0 && v == 0)) begin
            failures++;
            $display("frame_start wrong at (%0d,%0d)", h, v);
          end
          if (frame_start) n_frames++;
          for (int i = 2; i > 0; i--) begin
            e_de[i] = e_de[i-1]; e_hs[i] = e_hs[i-1]; e_vs[i] = e_vs[i-1];
            e_gnt[i] = e_gnt[i-1]; e_pix[i] = e_pix[i-1];
          end
          e_de[0]  = act;
          e_hs[0]  = (h >= HA + HF) && (h < HA + HF + HS);
          e_vs[0]  = (v >= VA + VF) && (v < VA + VF + VS);
          e_gnt[0] = act && !deny;
          e_pix[0] = pattern(addr);
          // outputs: position of two cycles ago
          checks++;
          if (vga.de != e_de[2] || vga.hsync_n != !e_hs[2] || vga.vsync_n != !e_vs[2]) begin
            failures++;
            $display("f%0d (%0d,%0d): sync/de wrong", f, h, v);
          end
          checks++;
          if (vga.pix != ((e_de[2] && e_gnt[2]) ? e_pix[2] : 24'h0) || underrun != (e_de[2] && !e_gnt[2])) begin
            failures++;
            $display("f%0d (%0d,%0d): pixel %h underrun %0d, expected %h", f, h, v, vga.pix, underrun, e_pix[2]);
          end
          if (underrun) n_underrun++;
          @(negedge clk);
        end
    end
    checks++;
    if (n_underrun == 0 || n_frames != 3) begin
      failures++;
      $display("coverage: underruns=%0d frames=%0d", n_underrun, n_frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

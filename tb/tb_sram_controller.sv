// tb_sram_controller: three requesters issue random reads and writes to a
// small address range, holding each request until granted, while the
// priority order changes every 64 cycles. A reference model predicts the
// grant in every cycle (the valid requester that comes first in prio), keeps
// a shadow copy of the memory, and expects each read's data exactly
// two cycles after its grant on the port that issued it and on no other.
module tb_sram_controller;
  import esm_pkg::*;
  logic clk = 0, rst_n = 0;
  sram_port_e prio [3];
  sram_req_t  req  [3];
  sram_rsp_t  rsp  [3];
  logic       conflict, sram_ce, sram_we;
  sram_addr_t sram_addr;
  sram_data_t sram_wdata, sram_rdata;
  int checks = 0, failures = 0;
  int n_conflict = 0, n_gnt [3] = '{0, 0, 0};

  sram_controller dut (.*);
  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW)) u_mem (
    .clk(clk), .ce(sram_ce), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  always #5 clk = ~clk;

  sram_data_t shadow [16];
  // expected read returns: port and data, by cycle of arrival
  int         exp_port [int];
  sram_data_t exp_data [int];
  int cyc = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sram_port_e perms [6][3] = '{
      '{PORT_LEFT, PORT_CENTRAL, PORT_RIGHT}, '{PORT_LEFT, PORT_RIGHT, PORT_CENTRAL},
      '{PORT_CENTRAL, PORT_LEFT, PORT_RIGHT}, '{PORT_CENTRAL, PORT_RIGHT, PORT_LEFT},
      '{PORT_RIGHT, PORT_LEFT, PORT_CENTRAL}, '{PORT_RIGHT, PORT_CENTRAL, PORT_LEFT}};
    for (int i = 0; i < 3; i++) req[i] = '0;
    prio = perms[0];
    // initialise the used words through the controller later; start known
    for (int a = 0; a < 16; a++) begin
      u_mem.mem[a] = 32'hA000_0000 + a;
      shadow[a]    = 32'hA000_0000 + a;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (cyc = 0; cyc < 4000; cyc++) begin
      int win;
      if (cyc % 64 == 0) prio = perms[(cyc / 64) % 6];
      for (int i = 0; i < 3; i++)
        if (!req[i].valid && $urandom_range(0, 99) < 45) begin
          req[i].valid = 1'b1;
          req[i].we    = 1'($urandom);
          req[i].addr  = SRAM_AW'($urandom_range(0, 15));
          req[i].wdata = $urandom;
        end
      #1;
      // grant prediction
      win = -1;
      for (int k = 2; k >= 0; k--) if (req[prio[k]].valid) win = prio[k];
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (rsp[i].gnt != (win == i)) begin
          failures++;
          $display("cycle %0d: port %0d gnt=%0d, expected winner %0d", cyc, i, rsp[i].gnt, win);
        end
      end
      checks++;
      if (conflict != ((req[0].valid + req[1].valid + req[2].valid) > 1)) begin
        failures++;
        $display("cycle %0d: conflict flag wrong", cyc);
      end
      if (conflict) n_conflict++;
      // returned read data
      for (int i = 0; i < 3; i++) begin
        bit e;
        e = exp_port.exists(cyc) && exp_port[cyc] == i;
        checks++;
        if (rsp[i].rvalid != e || (e && rsp[i].rdata != exp_data[cyc])) begin
          failures++;
          $display("cycle %0d: port %0d rvalid=%0d data=%h expected %0d %h", cyc, i,
                   rsp[i].rvalid, rsp[i].rdata, e, e ? exp_data[cyc] : 0);
        end
      end
      // model the granted access
      if (win >= 0) begin
        n_gnt[win]++;
        if (req[win].we) shadow[req[win].addr[3:0]] = req[win].wdata;
        else begin
          exp_port[cyc + 2] = win;
          exp_data[cyc + 2] = shadow[req[win].addr[3:0]];
        end
      end
      @(posedge clk);
      @(negedge clk);
      if (win >= 0) req[win].valid = 1'b0;
    end
    checks++;
    if (n_conflict == 0 || n_gnt[0] == 0 || n_gnt[1] == 0 || n_gnt[2] == 0) begin
      failures++;
      $display("coverage hole: conflicts=%0d grants=%0d/%0d/%0d", n_conflict, n_gnt[0], n_gnt[1], n_gnt[2]);
    end
    $display("conflicts=%0d grants=%0d/%0d/%0d", n_conflict, n_gnt[0], n_gnt[1], n_gnt[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

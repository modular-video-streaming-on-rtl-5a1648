// sram_controller: priority access to one slot's external SRAM.
//
// Every slot owns one SRAM bank. Its controller takes requests from the
// module in the slot (central) and from the modules in the left and right
// neighbour slots, so that frames can stream from module to module through
// shared memory. Only one requester is served per cycle, chosen by a fixed
// priority order that is an input (prio[0] is served first), since the
// priority depends on the application.
//
// Timing: a request is granted in the cycle it is presented (rsp.gnt is
// combinational). The granted access is registered onto the SRAM pins at the
// next edge; the synchronous SRAM returns read data one cycle later, so
// rsp.rvalid/rdata appear SRAM_RD_LAT = 2 cycles after the grant, only on the
// port that issued the read. A requester must hold its request until granted.
//
// The three-way sharing and the priority principle follow the source; the
// handshake, the pin timing and the run-time priority input are this
// design's choices. conflict is high when a request had to wait.
module sram_controller
  import esm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sram_port_e prio [3],
  input  sram_req_t  req  [3],
  output sram_rsp_t  rsp  [3],
  output logic       conflict,
  // SRAM pins (synchronous SRAM, active-high strobes)
  output logic       sram_ce,
  output logic       sram_we,
  output sram_addr_t sram_addr,
  output sram_data_t sram_wdata,
  input  sram_data_t sram_rdata
);

  logic       any_gnt;
  logic [1:0] gnt_idx;
  logic [2:0] gnt_vec;
  logic       rd1_valid, rd2_valid;
  logic [1:0] rd1_idx, rd2_idx;

  always_comb begin
    any_gnt = 1'b0;
    gnt_idx = 2'd0;
    for (int k = 2; k >= 0; k--) begin
      if (req[prio[k]].valid) begin
        any_gnt = 1'b1;
        gnt_idx = prio[k];
      end
    end
    gnt_vec = '0;
    if (any_gnt) gnt_vec[gnt_idx] = 1'b1;
    conflict = 1'b0;
    for (int i = 0; i < 3; i++)
      if (req[i].valid && !gnt_vec[i]) conflict = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_ce    <= 1'b0;
      sram_we    <= 1'b0;
      sram_addr  <= '0;
      sram_wdata <= '0;
      rd1_valid  <= 1'b0;
      rd1_idx    <= '0;
      rd2_valid  <= 1'b0;
      rd2_idx    <= '0;
    end else begin
      sram_ce   <= any_gnt;
      sram_we   <= any_gnt && req[gnt_idx].we;
      if (any_gnt) begin
        sram_addr  <= req[gnt_idx].addr;
        sram_wdata <= req[gnt_idx].wdata;
      end
      rd1_valid <= any_gnt && !req[gnt_idx].we;
      rd1_idx   <= gnt_idx;
      rd2_valid <= rd1_valid;
      rd2_idx   <= rd1_idx;
    end
  end

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      rsp[i].gnt    = gnt_vec[i];
      rsp[i].rvalid = rd2_valid && (rd2_idx == 2'(i));
      rsp[i].rdata  = sram_rdata;
    end
  end

  a_prio_permutation: assert property (@(posedge clk) disable iff (!rst_n)
      prio[0] != prio[1] && prio[0] != prio[2] && prio[1] != prio[2])
    else $error("sram_controller: priority order is not a permutation");
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_vec))
    else $error("sram_controller: more than one grant");

endmodule

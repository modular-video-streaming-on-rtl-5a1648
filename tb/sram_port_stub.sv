// sram_port_stub: testbench stand-in for one requester port of an SRAM
// controller plus its memory. A request is granted unless the port is busy
// (a random share of cycles given by deny_pct, in percent); a granted read
// returns mem[addr] two cycles later, a granted write updates mem at once.
module sram_port_stub
  import esm_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic      clk,
  input  int        deny_pct,
  input  sram_req_t req,
  output sram_rsp_t rsp
);
  sram_data_t mem [2**AW];
  logic       busy;
  logic [1:0] v_pipe;
  sram_data_t d_pipe [2];
  int         n_grants = 0, n_denied = 0;

  initial begin
    busy   = 1'b0;
    v_pipe = '0;
  end

  always_comb begin
    rsp.gnt    = req.valid && !busy;
    rsp.rvalid = v_pipe[1];
    rsp.rdata  = d_pipe[1];
  end

  always @(posedge clk) begin
    v_pipe    <= {v_pipe[0], rsp.gnt && !req.we};
    d_pipe[0] <= mem[req.addr[AW-1:0]];
    d_pipe[1] <= d_pipe[0];
    if (rsp.gnt && req.we) mem[req.addr[AW-1:0]] <= req.wdata;
    if (rsp.gnt) n_grants++;
    if (req.valid && !rsp.gnt) n_denied++;
    busy <= ($urandom_range(0, 99) < deny_pct);
  end
endmodule

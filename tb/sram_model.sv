// sram_model: behavioural model of one external SRAM bank (testbench only).
//
// Synchronous SRAM with registered read data: a read presented on the pins in
// one cycle (ce = 1, we = 0) returns its data in the next cycle; a write
// (ce = 1, we = 1) updates the array at the clock edge. Memory contents are
// reachable as mem[] for preloading and inspection.
module sram_model #(
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ce && we)  mem[addr] <= wdata;
    if (ce && !we) rdata     <= mem[addr];
  end
endmodule

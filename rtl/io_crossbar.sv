// io_crossbar: run-time programmable crossbar between FPGA pin groups and
// peripherals (the interface controller of the MotherBoard).
//
// Slots on the FPGA reach peripherals only through this crossbar, so a module
// can be relocated to any slot and still reach its camera, display or network
// port. The FPGA side has N_CH channels, one per micro slot; the peripheral
// side N_PER ports. Each direction is a separate multiplexer:
//   ch_in[c]   <= per_in[ch_src[c]]   (peripheral to FPGA), if enabled
//   per_out[p] <= ch_out[per_src[p]]  (FPGA to peripheral), if enabled
// Disabled routes drive zero. Routes are programmed one at a time with
// cfg_we: cfg_to_per selects the direction, cfg_dst the channel or port
// being programmed, cfg_src its source, cfg_en enables it. All routes are
// disabled after reset. Outputs are registered (one clock through the
// crossbar); a new route takes effect one clock after it is written.
//
// The channel count (22 micro slots) follows the source; the channel width,
// peripheral count, the configuration interface and the register stage are
// this design's choices.
module io_crossbar #(
  parameter int unsigned N_CH  = 22,
  parameter int unsigned N_PER = 4,
  parameter int unsigned CW    = 32,
  localparam int unsigned IW   = $clog2((N_CH > N_PER ? N_CH : N_PER))
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  logic          cfg_we,
  input  logic          cfg_to_per,
  input  logic [IW-1:0] cfg_dst,
  input  logic [IW-1:0] cfg_src,
  input  logic          cfg_en,
  // FPGA side
  input  logic [CW-1:0] ch_out  [N_CH],
  output logic [CW-1:0] ch_in   [N_CH],
  // peripheral side
  input  logic [CW-1:0] per_in  [N_PER],
  output logic [CW-1:0] per_out [N_PER]
);

  localparam int unsigned CIW = (N_CH > 1) ? $clog2(N_CH) : 1;
  localparam int unsigned PIW = (N_PER > 1) ? $clog2(N_PER) : 1;

  logic [PIW-1:0] ch_src  [N_CH];
  logic          ch_en   [N_CH];
  logic [CIW-1:0] per_src [N_PER];
  logic          per_en  [N_PER];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) begin
        ch_src[c] <= '0;
        ch_en[c]  <= 1'b0;
      end
      for (int p = 0; p < N_PER; p++) begin
        per_src[p] <= '0;
        per_en[p]  <= 1'b0;
      end
    end else if (cfg_we) begin
      if (cfg_to_per) begin
        if (32'(cfg_dst) < N_PER && 32'(cfg_src) < N_CH) begin
          per_src[PIW'(cfg_dst)] <= CIW'(cfg_src);
          per_en[PIW'(cfg_dst)]  <= cfg_en;
        end
      end else begin
        if (32'(cfg_dst) < N_CH && 32'(cfg_src) < N_PER) begin
          ch_src[CIW'(cfg_dst)] <= PIW'(cfg_src);
          ch_en[CIW'(cfg_dst)]  <= cfg_en;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++)  ch_in[c]   <= '0;
      for (int p = 0; p < N_PER; p++) per_out[p] <= '0;
    end else begin
      for (int c = 0; c < N_CH; c++)
        ch_in[c] <= ch_en[c] ? per_in[ch_src[c]] : '0;
      for (int p = 0; p < N_PER; p++)
        per_out[p] <= per_en[p] ? ch_out[per_src[p]] : '0;
    end
  end

endmodule

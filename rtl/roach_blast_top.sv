// roach_blast_top: FPGA-side BLASTN accelerator between a 10GbE UDP core and the BLAST core.
//
// Two clocks: clk100 for the network side and clk60 for the BLAST core. pll_locked, from the
// clock manager, is the only reset; it is synchronised into each domain (two flip-flops,
// active-high reset while the PLL is unlocked).
//   10GbE rx FIFO -> net_rx_ctrl (32 kB input buffer, crosses to 60 MHz, next-packet requests)
//   -> blast_core (decoder, extension controller, 3 detection regions, global aggregator)
//   -> net_tx_ctrl (crosses back to 100 MHz, two-line records, end of work) -> 10GbE tx FIFO
// The 10GbE core itself, the clock manager and the embedded processor that configures the
// network core are outside this design; their signals are ports here.
// ev exposes internal events of the core (bit 0 reference element stall, 1 seed buffer
// conflict stall, 2 delay-cap stall, 3 overlap seed, 4 stalling seed serviced first,
// 5 extension started), for observation only.
// Following the source design: the block structure, clock frequencies and interfaces. Own
// choice: the reset synchronisers.
module roach_blast_top
  import blast_pkg::*;
(
  input  logic        clk100,
  input  logic        clk60,
  input  logic        pll_locked,
  input  logic [63:0] rx_data,
  input  logic        rx_valid,
  input  logic        rx_eof,
  output logic        rx_ack,
  output logic [63:0] tx_data,
  output logic        tx_valid,
  output logic        tx_eof,
  input  logic        tx_ready,
  output logic        work_done,
  output logic [2:0]  region_finished,
  output logic [5:0]  ev
);
  logic [1:0]  rs100, rs60;
  logic        rst100, rst60;
  logic        ctrl_valid, ctrl_pop, in_empty, in_ready, out_valid, out_ready;
  logic [63:0] in_data;
  aln_t        out_data;

  always_ff @(posedge clk100) rs100 <= {rs100[0], !pll_locked};
  always_ff @(posedge clk60)  rs60  <= {rs60[0],  !pll_locked};
  assign rst100 = rs100[1];
  assign rst60  = rs60[1];

  net_rx_ctrl u_rx (
    .clk(clk100), .rst(rst100), .rx_data, .rx_valid, .rx_eof, .rx_ack,
    .ctrl_valid, .ctrl_pop, .core_clk(clk60), .core_rst(rst60),
    .core_rd_en(in_ready), .core_data(in_data), .core_empty(in_empty));

  blast_core u_core (
    .clk(clk60), .rst(rst60), .in_data, .in_valid(!in_empty), .in_ready,
    .out_valid, .out_data, .out_ready, .finished(region_finished), .ev);

  net_tx_ctrl u_tx (
    .clk(clk100), .rst(rst100), .core_clk(clk60), .core_rst(rst60),
    .aln_valid(out_valid), .aln_data(out_data), .aln_ready(out_ready),
    .ctrl_valid, .ctrl_pop, .tx_data, .tx_valid, .tx_eof, .tx_ready, .work_done);
endmodule

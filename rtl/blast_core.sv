// blast_core: the seed-detection and extension engine (60 MHz domain).
//
// 64-bit words from the network input buffer enter the decoder, which turns them into a
// stream of 4-bit symbols and holds the run parameters. The symbol stream goes, in the same
// clock, to the extension controller (which fills every extension unit's query and database
// memories) and to all N_REGIONS detection regions, each holding a 128-letter slice of the
// query (query element r*128 .. r*128+127). If any region's input buffer nears full, backoff
// stops the decoder for everyone. The global aggregator merges the regions' alignment
// records into one 104-bit output stream; each region adds one zero-length record when it
// has finished, so N_REGIONS zero-length records mean the whole run is done.
// A core reset (three 1011 symbols) resets everything but the decoder's input word.
// Following the source design: the block structure, three regions of 128 letters with eight
// extension units each, 64-bit input and 104-bit output. Own choices: the ev_* outputs,
// which only expose internal events for observation.
module blast_core
  import blast_pkg::*;
#(
  parameter int N_REGIONS   = 3,
  parameter int LEN         = 128,
  parameter int NEU         = 8,
  parameter int REF_SPACING = 8,
  parameter int LC_DEPTH    = 512,
  parameter int Q_LINES_W   = 7,
  parameter int DB_LINES_W  = 11
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  output logic        out_valid,
  output aln_t        out_data,
  input  logic        out_ready,
  output logic [N_REGIONS-1:0] finished,
  output logic [5:0]  ev
);
  logic                crst, core_rst, backoff, sym_valid;
  sym_t                sym;
  params_t             params;
  mem_wr_t             wr;
  logic [DB_CNT_W-1:0] db_count;
  logic [N_REGIONS-1:0] r_backoff, r_valid, r_ack;
  aln_t                r_data [N_REGIONS];
  logic [N_REGIONS-1:0] e_ref, e_conf, e_cap, e_ovl, e_srv, e_start;

  assign crst    = rst || core_rst;
  assign backoff = |r_backoff;

  blast_decoder u_dec (
    .clk, .rst, .in_data, .in_valid, .in_ready, .backoff,
    .out_sym(sym), .out_valid(sym_valid), .core_rst, .params);

  ext_controller #(.Q_LINES_W(Q_LINES_W), .DB_LINES_W(DB_LINES_W)) u_ec (
    .clk, .rst(crst), .in_sym(sym), .in_valid(sym_valid), .wr, .db_count);

  for (genvar r = 0; r < N_REGIONS; r++) begin : g_reg
    detection_region #(.REGION(r), .LEN(LEN), .NEU(NEU), .REF_SPACING(REF_SPACING),
                       .LC_DEPTH(LC_DEPTH), .Q_LINES_W(Q_LINES_W), .DB_LINES_W(DB_LINES_W)) u_dr (
      .clk, .rst(crst), .params, .in_sym(sym), .in_valid(sym_valid), .backoff(r_backoff[r]),
      .wr, .db_count, .out_valid(r_valid[r]), .out_data(r_data[r]), .out_ack(r_ack[r]),
      .finished(finished[r]),
      .ev_ref_stall(e_ref[r]), .ev_conflict_stall(e_conf[r]), .ev_cap_stall(e_cap[r]),
      .ev_overlap_seed(e_ovl[r]), .ev_stall_service(e_srv[r]), .ev_seed_start(e_start[r]));
  end

  aggregator #(.N_SRC(N_REGIONS), .LOCAL(1'b0)) u_gagg (
    .clk, .rst(crst), .src_valid(r_valid), .src_data(r_data), .src_ack(r_ack),
    .db_done(1'b0), .active(1'b0), .out_valid, .out_data, .out_ready, .finished());

  assign ev = {|e_start, |e_srv, |e_ovl, |e_cap, |e_conf, |e_ref};
endmodule

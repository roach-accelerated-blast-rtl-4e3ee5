// detection_region: one self-contained 128-letter slice of the query.
//
// A region finds and extends all seeds whose first query letter lies in its slice:
//   local controller -> seed detection array -> arbitrator -> NEU extension units
//   -> local aggregator -> out_valid/out_data (read by the global aggregator with out_ack).
// Every region sees the same decoded symbol stream and raises backoff when its own input
// buffer fills; the extension units' memories are filled by the shared extension controller
// through wr/db_count. Regions do not talk to each other: a run of matches crossing into the
// next region is recognised from the termination element and overlap elements of the array.
// out_data with length 0 is this region's "finished" marker. The ev_* outputs pulse on the
// internal events a testbench may want to count (stalls, overlap seeds, seeds started).
// Following the source design: the composition, 128 elements and 8 extension units per
// region, the region offsets. Own choice: the exact event outputs.
module detection_region
  import blast_pkg::*;
#(
  parameter int REGION      = 0,
  parameter int LEN         = 128,
  parameter int NEU         = 8,
  parameter int REF_SPACING = 8,
  parameter int LC_DEPTH    = 512,
  parameter int Q_LINES_W   = 7,
  parameter int DB_LINES_W  = 11
) (
  input  logic                clk,
  input  logic                rst,
  input  params_t             params,
  input  sym_t                in_sym,
  input  logic                in_valid,
  output logic                backoff,
  input  mem_wr_t             wr,
  input  logic [DB_CNT_W-1:0] db_count,
  output logic                out_valid,
  output aln_t                out_data,
  input  logic                out_ack,
  output logic                finished,
  output logic                ev_ref_stall,
  output logic                ev_conflict_stall,
  output logic                ev_cap_stall,
  output logic                ev_overlap_seed,
  output logic                ev_stall_service,
  output logic                ev_seed_start
);
  localparam int OFFSET = REGION * LEN;
  localparam int OVL    = (REGION == 0) ? 0 : 7;

  logic              arr_ready, db_valid, q_clear, q_we, subj_clr, subj_we, db_done, active;
  sym_t              db_sym, q_sym;
  logic [QPOS_W-1:0] q_idx;
  logic [31:0]       db_cnt, subj_start;
  logic [LEN-1:0]    seed_valid, seed_stall;
  logic [LEN_W-1:0]  seed_len [LEN];
  logic [DLY_W-1:0]  seed_dly [LEN];
  logic              ack_valid;
  logic [7:0]        ack_idx;
  seed_t             eu_seed;
  logic [NEU-1:0]    eu_begin, eu_done, eu_aln_valid, eu_aln_ack, eu_busy;
  aln_t              eu_aln [NEU];

  local_controller #(.FIFO_DEPTH(LC_DEPTH)) u_lc (
    .clk, .rst, .in_sym, .in_valid, .backoff,
    .arr_ready, .db_valid, .db_sym, .q_clear, .q_we, .q_idx, .q_sym,
    .db_cnt, .subj_clr, .subj_we, .subj_start, .db_done);

  seed_detection_array #(.LEN(LEN), .OFFSET(OFFSET), .OVL(OVL), .REF_SPACING(REF_SPACING)) u_sda (
    .clk, .rst, .word_size(params.word_size), .q_clear, .q_we, .q_idx, .q_sym,
    .db_valid, .db_sym, .ready(arr_ready), .seed_valid, .seed_stall, .seed_len, .seed_dly,
    .ack_valid, .ack_idx, .ev_ref_stall, .ev_conflict_stall, .ev_cap_stall, .ev_overlap_seed);

  arbitrator #(.LEN(LEN), .OFFSET(OFFSET), .NEU(NEU)) u_arb (
    .clk, .rst, .seed_valid, .seed_stall, .seed_len, .seed_dly, .ack_valid, .ack_idx,
    .db_cnt, .subj_clr, .subj_we, .subj_start,
    .eu_seed, .eu_begin, .eu_done, .active, .ev_stall_service);

  for (genvar i = 0; i < NEU; i++) begin : g_eu
    extension_unit #(.Q_LINES_W(Q_LINES_W), .DB_LINES_W(DB_LINES_W)) u_eu (
      .clk, .rst, .params, .seed(eu_seed), .start(eu_begin[i]), .wr, .db_count,
      .done(eu_done[i]), .aln_valid(eu_aln_valid[i]), .aln(eu_aln[i]),
      .aln_ack(eu_aln_ack[i]), .busy(eu_busy[i]));
  end

  aggregator #(.N_SRC(NEU), .LOCAL(1'b1)) u_agg (
    .clk, .rst, .src_valid(eu_aln_valid), .src_data(eu_aln), .src_ack(eu_aln_ack),
    .db_done, .active, .out_valid, .out_data, .out_ready(out_ack), .finished);

  assign ev_seed_start = |eu_begin;
endmodule

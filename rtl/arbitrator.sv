// arbitrator: moves seeds from the seed detection array to the extension units.
//
// Selection. Four priority encoders look at the buffer status of the array: the lowest and
// the highest position whose buffer is stalling the array, and the lowest and the highest
// position holding a seed. A second-level choice takes, in that order, the first encoder
// output that is not the position serviced on the previous clock. The acknowledgement to the
// array is registered, so the position taken last clock still shows as full; searching from
// both ends lets a different seed be taken every clock. Stalling positions go first.
// Decoding. On the clock after selection the seed is turned into absolute positions:
//   query element = OFFSET + position,
//   database start = letters placed on the array - delay - LEN - 2 + position
// (the letter in the top element is the last one placed; a seed is taken into its buffer on
// the move that follows its detection, and the delay counts moves after that), and the
// subject start is looked up in a small table of subject start positions recorded as
// separators enter the array. A separator that directly follows another one overwrites the
// last entry (the subject between them is empty), so a run of padding separators cannot push
// the starts of real subjects out of the table; the table holds the last SUBJ_N-1 non-empty
// subjects, enough while a seed never waits for more than that many subjects to pass.
// The decoded seed is queued in a FIFO.
// Allocation. The head of the FIFO is always driven on the extension unit bus. The busy flags
// of the extension units are kept here: when the FIFO is not empty and a unit is free, the
// lowest free unit gets a one-clock begin pulse and is marked busy, and the seed is popped.
// A unit's done pulse clears its busy flag. One seed can start per clock.
// active is high while any seed or extension is anywhere in the region's pipeline.
// Following the source design: the four encoders and second-level encoder, the last-serviced
// rule, the position decode, the subject lookup table, the FIFO and the allocator. Own
// choices: FIFO depth, table size and the subject position being the subject's first letter.
module arbitrator
  import blast_pkg::*;
#(
  parameter int LEN        = 128,
  parameter int OFFSET     = 0,
  parameter int NEU        = 8,
  parameter int FIFO_DEPTH = 16,
  parameter int SUBJ_N     = 16
) (
  input  logic              clk,
  input  logic              rst,
  // seed detection array
  input  logic [LEN-1:0]    seed_valid,
  input  logic [LEN-1:0]    seed_stall,
  input  logic [LEN_W-1:0]  seed_len [LEN],
  input  logic [DLY_W-1:0]  seed_dly [LEN],
  output logic              ack_valid,
  output logic [7:0]        ack_idx,
  // local controller
  input  logic [31:0]       db_cnt,
  input  logic              subj_clr,
  input  logic              subj_we,
  input  logic [31:0]       subj_start,
  // extension units
  output seed_t             eu_seed,
  output logic [NEU-1:0]    eu_begin,
  input  logic [NEU-1:0]    eu_done,
  output logic              active,
  output logic              ev_stall_service
);
  localparam int IW = $clog2(LEN);

  // ---------------- first and second level priority encoders ----------------
  logic          pe_ok [4];
  logic [IW-1:0] pe_idx[4];
  logic          last_valid, fifo_afull, fifo_empty, pick_ok;
  logic [IW-1:0] last_idx, pick;
  logic          pick_stall;

  always_comb begin
    for (int e = 0; e < 4; e++) begin
      pe_ok[e]  = 1'b0;
      pe_idx[e] = '0;
    end
    for (int s = LEN-1; s >= 0; s--) begin          // lowest position wins
      if (seed_stall[s]) begin pe_ok[0] = 1'b1; pe_idx[0] = IW'(s); end
      if (seed_valid[s]) begin pe_ok[2] = 1'b1; pe_idx[2] = IW'(s); end
    end
    for (int s = 0; s < LEN; s++) begin             // highest position wins
      if (seed_stall[s]) begin pe_ok[1] = 1'b1; pe_idx[1] = IW'(s); end
      if (seed_valid[s]) begin pe_ok[3] = 1'b1; pe_idx[3] = IW'(s); end
    end
    pick_ok    = 1'b0;
    pick       = '0;
    pick_stall = 1'b0;
    for (int e = 3; e >= 0; e--) begin
      if (pe_ok[e] && !(last_valid && pe_idx[e] == last_idx)) begin
        pick_ok    = 1'b1;
        pick       = pe_idx[e];
        pick_stall = (e < 2);
      end
    end
    if (fifo_afull) pick_ok = 1'b0;
  end

  // ---------------- selection register and decode ----------------
  logic [LEN_W-1:0] sel_len;
  logic [DLY_W-1:0] sel_dly;
  logic [31:0]      sel_cnt;
  seed_t            dec;

  always_ff @(posedge clk) begin
    if (rst) begin
      last_valid <= 1'b0;
      last_idx   <= '0;
      sel_len    <= '0;
      sel_dly    <= '0;
      sel_cnt    <= '0;
    end else begin
      last_valid <= pick_ok;
      last_idx   <= pick;
      sel_len    <= seed_len[pick];
      sel_dly    <= seed_dly[pick];
      sel_cnt    <= db_cnt;
    end
  end

  assign ack_valid        = last_valid;
  assign ack_idx          = 8'(last_idx);
  assign ev_stall_service = pick_ok && pick_stall;

  // subject start table
  logic [31:0] subj_tab [SUBJ_N];
  logic [SUBJ_N-1:0] subj_ok;
  logic [$clog2(SUBJ_N)-1:0] subj_wp;
  logic [31:0] subj_last;

  always_ff @(posedge clk) begin
    if (rst || subj_clr) begin
      subj_ok     <= SUBJ_N'(1);
      subj_wp     <= 1;
      subj_last   <= '0;
      for (int i = 0; i < SUBJ_N; i++) subj_tab[i] <= '0;
    end else if (subj_we) begin
      subj_last <= subj_start;
      if (subj_start == subj_last + 32'd1) begin
        // separator right after a separator: the subject in between is empty, so the new
        // start replaces the last entry instead of taking a new one
        subj_tab[subj_wp - 1'b1] <= subj_start;
      end else begin
        subj_tab[subj_wp] <= subj_start;
        subj_ok[subj_wp]  <= 1'b1;
        subj_wp           <= subj_wp + 1'b1;
      end
    end
  end

  always_comb begin
    logic [31:0] best;
    dec.q_pos  = QPOS_W'(OFFSET) + QPOS_W'(last_idx);
    dec.db_pos = sel_cnt - 32'(sel_dly) - 32'(LEN + 2) + 32'(last_idx);
    dec.len    = sel_len;
    best       = '0;
    for (int i = 0; i < SUBJ_N; i++)
      if (subj_ok[i] && subj_tab[i] <= dec.db_pos && subj_tab[i] >= best) best = subj_tab[i];
    dec.subj_pos = best;
  end

  // ---------------- seed FIFO and work allocator ----------------
  logic [NEU-1:0] busy;
  logic           give;
  logic [$clog2(NEU)-1:0] free_idx;
  logic           free_ok;

  sync_fifo #(.W($bits(seed_t)), .DEPTH(FIFO_DEPTH), .AFULL_MARGIN(2)) u_fifo (
    .clk, .rst, .wr_en(last_valid), .wr_data(dec), .full(), .afull(fifo_afull),
    .rd_en(give), .rd_data(eu_seed), .empty(fifo_empty), .count());

  always_comb begin
    free_ok  = 1'b0;
    free_idx = '0;
    for (int i = NEU-1; i >= 0; i--)
      if (!busy[i]) begin free_ok = 1'b1; free_idx = $clog2(NEU)'(i); end
    give     = !fifo_empty && free_ok;
    eu_begin = '0;
    if (give) eu_begin[free_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) busy <= '0;
    else     busy <= (busy & ~eu_done) | eu_begin;
  end

  assign active = (|seed_valid) || last_valid || !fifo_empty || (|busy);
endmodule

// extension_unit: ungapped X-drop extension of one seed in both directions at once.
//
// The unit owns four memories (the variant for block-RAM-rich FPGAs): a query copy and a
// database copy for the forward direction and another pair for the backward direction, so
// both directions read one letter pair per clock without conflicts. All four are written by
// the extension controller's broadcast port.
// On begin it takes the seed from the arbitrator's bus. Forward extension starts at the
// first letter after the seed, backward at the letter before it. Each clock each active
// direction compares one query/database letter pair: a match adds the match reward to that
// direction's score, a mismatch subtracts the mismatch penalty. The best score and the
// number of letters reaching it (the edge) are kept; the edge moves only when the score
// rises above the best, not when it equals it. A direction ends when its score has dropped
// by X or more below its best, at a query terminator, at a database separator, at the start
// of the database, or (backward) when the letter would be older than the database window
// kept in memory. Forward reads wait while the letter has not yet been written (db_count).
// Memory reads take one clock, so a direction issues the next read while it scores the
// previous one: one letter per direction per clock after two clocks of start-up.
// Raw score = seed length x reward + forward best + backward best. Below the S threshold the
// seed is dropped and done pulses; otherwise the alignment (query letter index, database
// start, subject start, length, score) is offered on aln_valid until aln_ack, then done
// pulses and the unit waits for the next seed.
// Following the source design: bidirectional extension, scoring, edge rule, X-drop and
// separator termination, S cut-off, waiting for data, handshake with arbitrator and
// aggregator. Own choices: the window-age limit on backward reads and the record layout.
module extension_unit
  import blast_pkg::*;
#(
  parameter int Q_LINES_W  = 7,
  parameter int DB_LINES_W = 11,
  parameter int WIN_MARGIN = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  params_t             params,
  input  seed_t               seed,
  input  logic                start,
  input  mem_wr_t             wr,
  input  logic [DB_CNT_W-1:0] db_count,
  output logic                done,
  output logic                aln_valid,
  output aln_t                aln,
  input  logic                aln_ack,
  output logic                busy
);
  localparam int Q_LETTERS = 4 << Q_LINES_W;
  localparam int WINDOW    = 4 << DB_LINES_W;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_SCORE, S_OUT} state_t;
  state_t st;

  seed_t sd;
  logic [15:0] qrow_f, qrow_b, drow_f, drow_b;

  // per-direction state: index 0 = forward, 1 = backward
  logic signed [16:0]        qp [2];      // next query element to read
  logic signed [33:0]        dp [2];      // next database letter to read
  logic [1:0]                act, pend;
  logic [1:0]                qlane [2];
  logic [1:0]                dlane [2];
  logic signed [SCORE_W-1:0] score [2];
  logic signed [SCORE_W-1:0] best  [2];
  logic [15:0]               steps [2];
  logic [15:0]               edge_ [2];
  logic [1:0]                avail, issue, stop_q;
  sym_t                      ql [2];
  sym_t                      dl [2];
  logic signed [SCORE_W-1:0] total;

  // memories
  ext_bram #(.LINES_W(Q_LINES_W)) u_qf (.clk, .we(wr.q_we), .waddr(wr.line[Q_LINES_W-1:0]),
    .wlane(wr.lane), .wdata(wr.data), .raddr(qp[0][Q_LINES_W+1:2]), .rdata(qrow_f));
  ext_bram #(.LINES_W(Q_LINES_W)) u_qb (.clk, .we(wr.q_we), .waddr(wr.line[Q_LINES_W-1:0]),
    .wlane(wr.lane), .wdata(wr.data), .raddr(qp[1][Q_LINES_W+1:2]), .rdata(qrow_b));
  ext_bram #(.LINES_W(DB_LINES_W)) u_df (.clk, .we(wr.db_we), .waddr(wr.line[DB_LINES_W-1:0]),
    .wlane(wr.lane), .wdata(wr.data), .raddr(dp[0][DB_LINES_W+1:2]), .rdata(drow_f));
  ext_bram #(.LINES_W(DB_LINES_W)) u_db (.clk, .we(wr.db_we), .waddr(wr.line[DB_LINES_W-1:0]),
    .wlane(wr.lane), .wdata(wr.data), .raddr(dp[1][DB_LINES_W+1:2]), .rdata(drow_b));

  assign ql[0] = qrow_f[qlane[0]*4 +: 4];
  assign ql[1] = qrow_b[qlane[1]*4 +: 4];
  assign dl[0] = drow_f[dlane[0]*4 +: 4];
  assign dl[1] = drow_b[dlane[1]*4 +: 4];

  always_comb begin
    logic signed [33:0] cnt;
    cnt = 34'(db_count);
    // forward: letter must already be in memory; backward: letter must exist and still be
    // inside the memory window
    avail[0]  = (dp[0] < cnt);
    avail[1]  = (dp[1] >= 0) && (cnt - dp[1] <= 34'(WINDOW - WIN_MARGIN));
    stop_q[0] = (qp[0] >= 17'(Q_LETTERS));
    stop_q[1] = (qp[1] < 0) || (dp[1] < 0) || (cnt - dp[1] > 34'(WINDOW - WIN_MARGIN));
    for (int d = 0; d < 2; d++) issue[d] = (st == S_RUN) && act[d] && avail[d] && !stop_q[d];
  end

  assign total = signed'(SCORE_W'(sd.len) * SCORE_W'(params.match_rew)) + best[0] + best[1];
  assign busy  = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      sd        <= '0;
      act       <= '0;
      pend      <= '0;
      done      <= 1'b0;
      aln_valid <= 1'b0;
      aln       <= '0;
      for (int d = 0; d < 2; d++) begin
        qp[d] <= '0; dp[d] <= '0; qlane[d] <= '0; dlane[d] <= '0;
        score[d] <= '0; best[d] <= '0; steps[d] <= '0; edge_[d] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          sd    <= seed;
          qp[0] <= 17'(seed.q_pos) + 17'(seed.len);
          dp[0] <= 34'(seed.db_pos) + 34'(seed.len);
          qp[1] <= 17'(seed.q_pos) - 17'sd1;
          dp[1] <= 34'(seed.db_pos) - 34'sd1;
          act   <= 2'b11;
          pend  <= 2'b00;
          for (int d = 0; d < 2; d++) begin
            score[d] <= '0; best[d] <= '0; steps[d] <= '0; edge_[d] <= '0;
          end
          st <= S_RUN;
        end
        S_RUN: begin
          for (int d = 0; d < 2; d++) begin
            logic signed [SCORE_W-1:0] sc;
            pend[d] <= issue[d];
            if (issue[d]) begin
              qlane[d] <= qp[d][1:0];
              dlane[d] <= dp[d][1:0];
              qp[d]    <= (d == 0) ? qp[d] + 17'sd1 : qp[d] - 17'sd1;
              dp[d]    <= (d == 0) ? dp[d] + 34'sd1 : dp[d] - 34'sd1;
            end
            if (act[d] && stop_q[d] && !pend[d]) act[d] <= 1'b0;
            if (act[d] && pend[d]) begin
              if (ql[d] == SYM_QTERM || dl[d] == SYM_SEP) begin
                act[d] <= 1'b0;
              end else begin
                sc = letters_match(ql[d], dl[d]) ? score[d] + SCORE_W'(params.match_rew)
                                                 : score[d] - SCORE_W'(params.miss_pen);
                score[d] <= sc;
                steps[d] <= steps[d] + 1'b1;
                if (sc > best[d]) begin
                  best[d]  <= sc;
                  edge_[d] <= steps[d] + 1'b1;
                end
                if (((sc > best[d]) ? sc : best[d]) - sc >= SCORE_W'(params.x_drop)) act[d] <= 1'b0;
              end
            end
          end
          if (act == 2'b00) st <= S_SCORE;
        end
        S_SCORE: begin
          aln.db_pos   <= sd.db_pos - 32'(edge_[1]);
          aln.subj_pos <= sd.subj_pos;
          aln.q_pos    <= sd.q_pos - QPOS_W'(edge_[1]) - QPOS_W'(1);
          aln.len      <= 12'(sd.len) + 12'(edge_[0]) + 12'(edge_[1]);
          aln.score    <= total;
          if (total >= signed'(SCORE_W'(params.s_thresh))) begin
            aln_valid <= 1'b1;
            st        <= S_OUT;
          end else begin
            done <= 1'b1;
            st   <= S_IDLE;
          end
        end
        S_OUT: if (aln_ack) begin
          aln_valid <= 1'b0;
          done      <= 1'b1;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule

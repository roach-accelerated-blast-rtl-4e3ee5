// local_controller: input buffer and control of one detection region.
//
// Symbols from the decoder are written into a FIFO (a block RAM in the source design). When
// the FIFO comes within BACKOFF_MARGIN entries of full, backoff is raised and the decoder
// stops feeding every region, so all regions receive the same stream. On the read side the
// symbol at the head of the FIFO is decoded:
//   * start loading query: following symbols up to "stop loading query" are query symbols.
//     They are numbered from 0 (the host sends the query terminator first) and each is
//     offered on q_we/q_idx/q_sym; the seed detection array keeps those whose index falls in
//     its region. q_clear marks the start of a new query.
//   * stop loading query, counter reset: the database letter counter and the subject table
//     (subj_clr) are cleared.
//   * notify when done: db_done is set and stays set until reset.
//   * database letters, masks and separators are offered to the seed detection array on
//     db_valid/db_sym and popped only when the array accepts them (arr_ready), i.e. when it
//     does not stall. Each accepted letter increments db_cnt; an accepted separator reports
//     the start position of the next subject on subj_we/subj_start.
// Outside a query, the head symbol is not decoded while the array stalls.
// Following the source design: buffering with backoff, the decode flow and the end-of-
// database flag. Own choices: indexed query loading, the FIFO depth (512, at least the query
// length, which the design requires to avoid deadlock) and the backoff margin.
module local_controller
  import blast_pkg::*;
#(
  parameter int FIFO_DEPTH     = 512,
  parameter int BACKOFF_MARGIN = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  sym_t              in_sym,
  input  logic              in_valid,
  output logic              backoff,
  // seed detection array
  input  logic              arr_ready,
  output logic              db_valid,
  output sym_t              db_sym,
  output logic              q_clear,
  output logic              q_we,
  output logic [QPOS_W-1:0] q_idx,
  output sym_t              q_sym,
  // position tracking for the arbitrator
  output logic [31:0]       db_cnt,
  output logic              subj_clr,
  output logic              subj_we,
  output logic [31:0]       subj_start,
  output logic              db_done
);
  sym_t              head;
  logic              empty, pop, loading;
  logic [QPOS_W-1:0] q_count;

  sync_fifo #(.W(4), .DEPTH(FIFO_DEPTH), .AFULL_MARGIN(BACKOFF_MARGIN)) u_buf (
    .clk, .rst, .wr_en(in_valid), .wr_data(in_sym), .full(), .afull(backoff),
    .rd_en(pop), .rd_data(head), .empty, .count());

  function automatic logic is_db_sym(sym_t s);
    return (s <= SYM_DBMASK);
  endfunction

  always_comb begin
    db_valid   = 1'b0;
    db_sym     = head;
    pop        = 1'b0;
    q_clear    = 1'b0;
    q_we       = 1'b0;
    q_idx      = q_count;
    q_sym      = head;
    subj_clr   = 1'b0;
    subj_we    = 1'b0;
    subj_start = db_cnt + 32'd1;
    if (!empty) begin
      if (loading) begin
        pop = 1'b1;
        if (head == SYM_STOP_Q) subj_clr = 1'b1;
        else                    q_we     = 1'b1;
      end else if (arr_ready) begin
        if (is_db_sym(head)) begin
          db_valid = 1'b1;
          pop      = 1'b1;
          subj_we  = (head == SYM_SEP);
        end else begin
          pop      = 1'b1;
          q_clear  = (head == SYM_START_Q);
          subj_clr = (head == SYM_CNT_RESET) || (head == SYM_STOP_Q);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      loading <= 1'b0;
      q_count <= '0;
      db_cnt  <= '0;
      db_done <= 1'b0;
    end else if (pop) begin
      if (loading) begin
        if (head == SYM_STOP_Q) begin
          loading <= 1'b0;
          db_cnt  <= '0;
        end else begin
          q_count <= q_count + 1'b1;
        end
      end else begin
        unique case (head)
          SYM_START_Q: begin
            loading <= 1'b1;
            q_count <= '0;
          end
          SYM_STOP_Q, SYM_CNT_RESET: db_cnt <= '0;
          SYM_NOTIFY: db_done <= 1'b1;
          default: if (is_db_sym(head)) db_cnt <= db_cnt + 32'd1;
        endcase
      end
    end
  end
endmodule

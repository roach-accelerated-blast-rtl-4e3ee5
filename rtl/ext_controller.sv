// ext_controller: loads the query and the database stream into the memories of every
// extension unit.
//
// It watches the decoded symbol stream. "Start loading query" sends the following symbols
// to the query memories at addresses 0, 1, 2 ... (address 0 receives the query terminator
// that the host places first, so memory address = detection array element index). "Stop
// loading query" ends the query, writes one extra query terminator after it so that forward
// extension stops at the end of the query, and clears the database counter, as does
// "counter reset". Every other letter or separator outside a query is written to the
// database memories at the position given by the 31-bit database counter; the memory address
// is the low bits of the counter, so the database window wraps and overwrites its oldest
// letters. db_count tells the extension units how many database letters have been written,
// so that they wait rather than read a letter that has not arrived.
// There is no buffer here: symbols are written the clock after they arrive, one per clock.
// Following the source design: four symbols per memory line, address-overflow wrap, the
// 31-bit counter and the start/stop query instructions. Own choice: the extra terminator
// written after the query.
module ext_controller
  import blast_pkg::*;
#(
  parameter int Q_LINES_W  = 7,
  parameter int DB_LINES_W = 11
) (
  input  logic                clk,
  input  logic                rst,
  input  sym_t                in_sym,
  input  logic                in_valid,
  output mem_wr_t             wr,
  output logic [DB_CNT_W-1:0] db_count
);
  logic                loading;
  logic [DB_CNT_W-1:0] cnt;
  logic [Q_LINES_W+1:0] q_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      loading  <= 1'b0;
      q_addr   <= '0;
      cnt      <= '0;
      wr       <= '0;
    end else begin
      wr.q_we  <= 1'b0;
      wr.db_we <= 1'b0;
      if (in_valid) begin
        if (loading) begin
          wr.data <= (in_sym == SYM_STOP_Q) ? SYM_QTERM : in_sym;
          wr.line <= 11'(q_addr[Q_LINES_W+1:2]);
          wr.lane <= q_addr[1:0];
          wr.q_we <= 1'b1;
          q_addr  <= q_addr + 1'b1;
          if (in_sym == SYM_STOP_Q) begin
            loading  <= 1'b0;
            cnt <= '0;
          end
        end else begin
          unique case (in_sym)
            SYM_START_Q: begin
              loading <= 1'b1;
              q_addr  <= '0;
            end
            SYM_STOP_Q, SYM_CNT_RESET: cnt <= '0;
            SYM_SEP, SYM_A, SYM_C, SYM_G, SYM_T, SYM_QMASK, SYM_DBMASK: begin
              wr.data  <= in_sym;
              wr.line  <= 11'(cnt[DB_LINES_W+1:2]);
              wr.lane  <= cnt[1:0];
              wr.db_we <= 1'b1;
              cnt <= cnt + 1'b1;
            end
            default: ;
          endcase
        end
      end
    end
  end
  // db_count follows cnt by one clock: the memories write one clock after wr is set up, so
  // a letter is counted only once it can be read back.
  always_ff @(posedge clk) begin
    if (rst) db_count <= '0;
    else     db_count <= cnt;
  end
endmodule

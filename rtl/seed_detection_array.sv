// seed_detection_array: systolic exact-match detector of one detection region.
//
// Each element holds one query symbol; database letters enter at the top element and move
// one element down per accepted letter (db_valid), so at any moment the whole array looks
// at one diagonal of the query/database dot plot. Along that diagonal a match count runs
// down the array combinationally: an element whose letters match passes on its input count
// plus one, a mismatching element passes on zero and, if its input count is at least the
// word size, has found a seed that starts at the element above it with that length.
//
// Element layout (index k, local position p = k - OVL):
//   p = -OVL .. -1   overlap elements (regions after the first): the last OVL query
//                    symbols of the previous region and the last OVL database letters that
//                    left this region. A run that reaches local element 0 and continues into
//                    them is reported here (with only its in-region length); if it covers
//                    the whole overlap it is reported whatever the word size.
//   p = 0 .. LEN-1   seed detection elements; in the first region element 0 holds the query
//                    terminator, which never matches, so runs touching query letter 1 end.
//   p = LEN          termination element: holds the first query symbol of the next region.
//                    If it matches, runs reaching the top of this region belong to the next
//                    region and are ignored here (flag track).
// Every REF_SPACING-th element is a reference element. It cuts the combinational count: on
// the first clock of a diagonal it outputs zero. A second count runs upwards; from the two
// counts and its own match a reference element knows the length of a run through it. If
// that length reaches the word size, or the run leaves its segment in either direction, it
// stalls the array; on the following clocks it outputs its held input plus one, so each
// extra clock carries the count across one more reference element.
// Seeds are only taken when the array moves, so each is taken once, from settled counts.
// Each seed start position has a one-seed buffer with a 7-bit delay counter that counts the
// letters moved since the seed was found. The array stalls (ready low) while a reference
// element is still propagating, while a seed is found at a position whose buffer is still
// full, or while any buffered seed has waited 127 moves.
// Buffer status goes to the arbitrator; ack_valid/ack_idx empties a buffer at the clock edge.
// Following the source design: counting scheme, word-size test, reference elements every 8
// with the two-direction count, one buffered seed per element, the 7-bit delay capped at 127,
// region termination and the 7-letter overlap rule. Own choices: buffers are indexed by the
// seed start rather than the detecting element, and the seed length is 8 bits wide.
module seed_detection_array
  import blast_pkg::*;
#(
  parameter int LEN         = 128,
  parameter int OFFSET      = 0,
  parameter int OVL         = 0,
  parameter int REF_SPACING = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        word_size,
  input  logic              q_clear,
  input  logic              q_we,
  input  logic [QPOS_W-1:0] q_idx,
  input  sym_t              q_sym,
  input  logic              db_valid,
  input  sym_t              db_sym,
  output logic              ready,
  output logic [LEN-1:0]    seed_valid,
  output logic [LEN-1:0]    seed_stall,
  output logic [LEN_W-1:0]  seed_len [LEN],
  output logic [DLY_W-1:0]  seed_dly [LEN],
  input  logic              ack_valid,
  input  logic [7:0]        ack_idx,
  output logic              ev_ref_stall,
  output logic              ev_conflict_stall,
  output logic              ev_cap_stall,
  output logic              ev_overlap_seed
);
  localparam int N  = OVL + LEN + 1;
  localparam int RS = REF_SPACING;

  sym_t       qr [N];
  sym_t       dr [N];
  logic [7:0] held   [N];
  logic [N-1:0] held_fl;
  logic       cont;

  logic [N-1:0] m, is_ref, fl_in, fl_out, rstall;
  logic [7:0]   dn_in [N];
  logic [7:0]   dn_out[N];
  logic [7:0]   up_in [N];
  logic [LEN-1:0] want, conflict, cap;
  logic [LEN_W-1:0] rlen [LEN];
  logic         move, ovl_rep;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      m[k]      = letters_match(qr[k], dr[k]);
      is_ref[k] = (k - OVL > 0) && (k - OVL < LEN) && ((k - OVL) % RS == 0);
    end
  end

  // count tracks and reference element stalls
  always_comb begin
    logic [7:0] up, dn, nxt;
    logic       fl, nfl;
    logic [8:0] sum;
    sum = '0;
    nxt = '0;
    nfl = 1'b0;
    up  = '0;
    for (int k = 0; k < N; k++) begin
      up_in[k] = up;
      if (is_ref[k]) up = '0;
      else           up = m[k] ? up + 8'd1 : 8'd0;
    end
    dn = '0;
    fl = 1'b0;
    for (int k = N-1; k >= 0; k--) begin
      dn_in[k] = dn;
      fl_in[k] = fl;
      if (k == N-1) begin
        dn = '0;
        fl = m[k];
      end else if (is_ref[k]) begin
        dn = (cont && m[k]) ? held[k] + 8'd1 : 8'd0;
        fl = cont && m[k] && held_fl[k];
      end else begin
        dn = m[k] ? dn + 8'd1 : 8'd0;
        fl = m[k] && fl;
      end
      dn_out[k] = dn;
      fl_out[k] = fl;
    end
    for (int k = 0; k < N; k++) begin
      rstall[k] = 1'b0;
      if (is_ref[k] && m[k]) begin
        sum = {1'b0, dn_in[k]} + {1'b0, up_in[k]} + 9'd1;
        nxt = dn_in[k] + 8'd1;
        nfl = fl_in[k];
        if ((sum >= {1'b0, word_size}) || (dn_in[k] >= 8'(RS-1)) || (up_in[k] >= 8'(RS-1)))
          rstall[k] = (nxt != dn_out[k]) || (nfl != fl_out[k]);
      end
    end
  end

  // seed reports, indexed by seed start position
  always_comb begin
    want    = '0;
    ovl_rep = 1'b0;
    for (int s = 0; s < LEN; s++) rlen[s] = '0;
    for (int p = 0; p < LEN-1; p++) begin
      if (!m[p+OVL] && !fl_in[p+OVL] && dn_in[p+OVL] != 0 && dn_in[p+OVL] >= word_size) begin
        want[p+1] = 1'b1;
        rlen[p+1] = dn_in[p+OVL];
      end
    end
    for (int j = 1; j <= OVL; j++) begin
      // overlap element at local position -j
      if (!m[OVL-j] && !fl_in[OVL-j] && dn_in[OVL-j] > 8'(j-1) && dn_in[OVL-j] >= word_size) begin
        want[0] = 1'b1;
        rlen[0] = dn_in[OVL-j] - 8'(j-1);
        ovl_rep = (j > 1);
      end
    end
    if (OVL > 0) begin
      if (m[0] && !fl_out[0] && dn_out[0] > 8'(OVL)) begin
        want[0] = 1'b1;
        rlen[0] = dn_out[0] - 8'(OVL);
        ovl_rep = 1'b1;
      end
    end
  end

  always_comb begin
    for (int s = 0; s < LEN; s++) begin
      conflict[s] = want[s] && seed_valid[s] && !(ack_valid && ack_idx == 8'(s));
      cap[s]      = seed_valid[s] && (seed_dly[s] == '1);
    end
  end

  assign seed_stall        = conflict | cap;
  assign ready             = !(|rstall) && !(|conflict) && !(|cap);
  assign move              = db_valid;
  assign ev_ref_stall      = |rstall;
  assign ev_conflict_stall = (|conflict) && !(|rstall);
  assign ev_cap_stall      = |cap;
  assign ev_overlap_seed   = move && ovl_rep;

  always_ff @(posedge clk) begin
    if (rst || q_clear) begin
      for (int k = 0; k < N; k++) begin
        qr[k]   <= SYM_QMASK;
        dr[k]   <= SYM_SEP;
        held[k] <= '0;
      end
      held_fl <= '0;
      cont    <= 1'b0;
    end else begin
      if (q_we) begin
        for (int k = 0; k < N; k++)
          if (int'(q_idx) == OFFSET + k - OVL) qr[k] <= q_sym;
      end
      if (move) begin
        dr[N-1] <= db_sym;
        for (int k = 0; k < N-1; k++) dr[k] <= dr[k+1];
        for (int k = 0; k < N; k++) held[k] <= '0;
        held_fl <= '0;
        cont    <= 1'b0;
      end else begin
        for (int k = 0; k < N; k++) held[k] <= dn_in[k];
        held_fl <= fl_in;
        cont    <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || q_clear) begin
      seed_valid <= '0;
      for (int s = 0; s < LEN; s++) begin
        seed_len[s] <= '0;
        seed_dly[s] <= '0;
      end
    end else begin
      for (int s = 0; s < LEN; s++) begin
        if (move && want[s]) begin
          seed_valid[s] <= 1'b1;
          seed_len[s]   <= rlen[s];
          seed_dly[s]   <= '0;
        end else if (ack_valid && ack_idx == 8'(s)) begin
          seed_valid[s] <= 1'b0;
        end else if (move && seed_valid[s]) begin
          seed_dly[s]   <= seed_dly[s] + 1'b1;
        end
      end
    end
  end

  // The local controller only offers a letter while the array is ready.
  a_move_ready: assert property (@(posedge clk) disable iff (rst) db_valid |-> ready)
    else $error("seed_detection_array: letter accepted while stalled");
endmodule

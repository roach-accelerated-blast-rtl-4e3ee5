// tb_extension_unit: fills the unit's memories through the broadcast write port with a
// random query (terminator first) and a random database containing planted copies of query
// pieces, then extends random seeds taken from those copies with random scoring parameters.
// A reference X-drop model (score, best, edge moved only on a strict rise, stop at X drop,
// query terminator, database separator or start of memory) gives the expected record;
// records under S must not appear. Each extension must take no more clocks than the longer
// direction plus a fixed start-up and output overhead (one letter per direction per clock).
// A last test holds db_count below the letters the forward direction needs and checks that
// the unit waits and completes correctly once the count is raised.
module tb_extension_unit;
  import blast_pkg::*;
  localparam int QW = 5, DW = 6, QN = 4 << QW, DN = 4 << DW, MARGIN = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  params_t params = PARAMS_DEFAULT;
  seed_t seed = '0;
  logic start = 0, done, aln_valid, aln_ack = 0, busy;
  mem_wr_t wr = '0;
  logic [DB_CNT_W-1:0] db_count = '0;
  aln_t aln;
  int checks = 0, failures = 0;
  sym_t q [QN];
  sym_t d [DN];
  int n_db = DN - 40;         // letters written
  int n_rep = 0, n_drop = 0, n_wait = 0;

  extension_unit #(.Q_LINES_W(QW), .DB_LINES_W(DW), .WIN_MARGIN(MARGIN)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(bit isq, int addr, sym_t s);
    @(negedge clk);
    wr.q_we = isq; wr.db_we = !isq; wr.line = 11'(addr / 4); wr.lane = 2'(addr % 4); wr.data = s;
    @(negedge clk);
    wr.q_we = 0; wr.db_we = 0;
  endtask

  // reference extension in one direction; returns steps taken too
  function automatic void ref_dir(int dir, int qs, int ds, int cnt, output int best, output int edge_, output int steps);
    int sc = 0, qq = qs, pp = ds;
    best = 0; edge_ = 0; steps = 0;
    forever begin
      if (dir == 0 && (qq >= QN || pp >= cnt)) break;
      if (dir == 1 && (qq < 0 || pp < 0 || cnt - pp > DN - MARGIN)) break;
      if (q[qq] == SYM_QTERM || d[pp] == SYM_SEP) break;
      sc += letters_match(q[qq], d[pp]) ? int'(params.match_rew) : -int'(params.miss_pen);
      steps++;
      if (sc > best) begin best = sc; edge_ = steps; end
      if (best - sc >= int'(params.x_drop)) break;
      qq += (dir == 0) ? 1 : -1;
      pp += (dir == 0) ? 1 : -1;
    end
  endfunction

  task automatic one_seed(int qe, int dpos, int len, int cnt_now, bit check_time);
    int bf, ef, sf, bb, eb, sb, total, t0, clocks;
    aln_t e;
    ref_dir(0, qe + len, dpos + len, n_db, bf, ef, sf);
    ref_dir(1, qe - 1, dpos - 1, n_db, bb, eb, sb);
    total = len * int'(params.match_rew) + bf + bb;
    e.db_pos = 32'(dpos - eb); e.subj_pos = 32'(dpos / 7); e.q_pos = QPOS_W'(qe - eb - 1);
    e.len = 12'(len + ef + eb); e.score = SCORE_W'(total);
    @(negedge clk);
    seed.q_pos = QPOS_W'(qe); seed.db_pos = 32'(dpos); seed.subj_pos = 32'(dpos / 7);
    seed.len = LEN_W'(len);
    db_count = DB_CNT_W'(cnt_now);
    start = 1;
    t0 = $time;
    @(negedge clk);
    start = 0;
    while (!aln_valid && !done) @(negedge clk);
    clocks = ($time - t0) / 10;
    if (total >= int'(params.s_thresh)) begin
      chk(aln_valid && aln == e, $sformatf("record %p expected %p", aln, e));
      n_rep++;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      aln_ack = 1;
      @(negedge clk);
      aln_ack = 0;
      chk(done, "done after acknowledge");
    end else begin
      chk(!aln_valid && done, "seed under S dropped");
      n_drop++;
    end
    if (check_time)
      chk(clocks <= (sf > sb ? sf : sb) + 6, $sformatf("%0d clocks for %0d/%0d letters", clocks, sf, sb));
    @(negedge clk);
    chk(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    q[0] = SYM_QTERM;
    for (int i = 1; i < QN; i++) q[i] = (i < QN - 10) ? sym_t'($urandom_range(1, 4)) : SYM_QTERM;
    for (int i = 0; i < DN; i++) d[i] = ($urandom_range(0, 30) == 0) ? SYM_SEP : sym_t'($urandom_range(1, 6));
    for (int c = 0; c < 12; c++) begin
      int qa, n, at;
      qa = $urandom_range(1, QN - 40); n = $urandom_range(10, 30); at = $urandom_range(1, n_db - 40);
      for (int j = 0; j < n; j++) d[at + j] = q[qa + j];
    end
    for (int i = 0; i < QN; i++) write(1, i, q[i]);
    for (int i = 0; i < n_db; i++) write(0, i, d[i]);
    for (int t = 0; t < 300; t++) begin
      int qe, dpos, len;
      params.x_drop = 8'($urandom_range(2, 20)); params.miss_pen = 8'($urandom_range(1, 4));
      params.match_rew = 8'($urandom_range(1, 2)); params.s_thresh = 8'($urandom_range(5, 40));
      // a seed is an exact match of at least 4 letters
      len = $urandom_range(4, 10);
      qe = $urandom_range(1, QN - 20); dpos = $urandom_range(1, n_db - 20);
      for (int j = 0; j < len; j++) d[dpos + j] = q[qe + j];
      for (int j = 0; j < len; j++) write(0, dpos + j, d[dpos + j]);
      one_seed(qe, dpos, len, n_db, 1);
    end
    chk(n_rep > 20 && n_drop > 20, $sformatf("reported %0d dropped %0d", n_rep, n_drop));
    // waiting for data: forward direction needs letters beyond db_count
    params = '{word_size: 8'd11, s_thresh: 8'd1, x_drop: 8'd100, miss_pen: 8'd1, match_rew: 8'd1};
    begin
      int bf, ef, sf, qe, dpos;
      qe = 30; dpos = 100;
      for (int j = 0; j < 40; j++) begin d[dpos + j] = q[qe + j]; write(0, dpos + j, d[dpos + j]); end
      @(negedge clk);
      seed.q_pos = QPOS_W'(qe); seed.db_pos = 32'(dpos); seed.subj_pos = '0; seed.len = 8'd5;
      db_count = DB_CNT_W'(dpos + 10);
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (60) begin
        @(negedge clk);
        chk(!aln_valid && !done && busy, "waits while letters are missing");
      end
      n_wait++;
      db_count = DB_CNT_W'(n_db);
      while (!aln_valid && !done) @(negedge clk);
      ref_dir(0, qe + 5, dpos + 5, n_db, bf, ef, sf);
      chk(aln_valid && int'(aln.len) >= 40 && aln.db_pos <= 32'(dpos), "completes after data arrives");
      aln_ack = 1;
      @(negedge clk);
      aln_ack = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

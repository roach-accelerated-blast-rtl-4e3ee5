// blast_ref_pkg: software reference used by the region, core and top-level testbenches.
//
// Given the query as the array holds it (element 0 is the query terminator, letters follow),
// the database letters in the order they are streamed after the query is loaded, the region
// size and the run parameters, it lists every alignment record the hardware must report:
//   1. seeds: every maximal run of exact matches on a diagonal. A run belongs to the region
//      holding its highest query element. If it starts inside that region it is a seed when
//      at least word-size long. If it starts in the 7 elements just below the region (the
//      overlap copy) it is a seed, cut at the region start, when the whole run is at least
//      word-size long; if it covers the whole overlap it is a seed whatever its length.
//   2. every seed is extended in both directions with the X-drop rule (best kept, edge moved
//      only on a strict rise, stop at X drop, a query terminator, a database separator or the
//      start of the database); records with a raw score under S are dropped.
// Records are kept as text keys in a count table, so duplicates (two seeds giving the same
// alignment) are counted like the hardware reports them. The stream helpers build the
// 4-bit instruction stream of one run and pack it into 64-bit words, first symbol in the
// least significant nibble. The run under test is held in the package variables g_q, g_db,
// g_s and g_words.
package blast_ref_pkg;
  import blast_pkg::*;

  typedef int count_t [string];

  // the run under test: query elements, database letters, symbol stream, packed words
  sym_t        g_q [];
  sym_t        g_db [];
  sym_t        g_s [$];
  logic [63:0] g_words [$];

  function automatic string aln_key(int db_pos, int subj, int q_pos, int len, int score);
    return $sformatf("db=%0d subj=%0d q=%0d len=%0d score=%0d", db_pos, subj, q_pos, len, score);
  endfunction

  function automatic string aln_to_key(aln_t a);
    return aln_key(int'(a.db_pos), int'(a.subj_pos), int'(a.q_pos), int'(a.len), int'($signed(a.score)));
  endfunction

  // one direction of the X-drop extension
  function automatic void extend(int dir, int qs, int ds, params_t p, output int best,
                                 output int edge_);
    int sc = 0, steps = 0, qq = qs, pp = ds;
    best = 0; edge_ = 0;
    forever begin
      if (qq < 0 || qq >= g_q.size() || pp < 0 || pp >= g_db.size()) break;
      if (g_q[qq] == SYM_QTERM || g_db[pp] == SYM_SEP) break;
      sc += letters_match(g_q[qq], g_db[pp]) ? int'(p.match_rew) : -int'(p.miss_pen);
      steps++;
      if (sc > best) begin best = sc; edge_ = steps; end
      if (best - sc >= int'(p.x_drop)) break;
      qq += (dir == 0) ? 1 : -1;
      pp += (dir == 0) ? 1 : -1;
    end
  endfunction

  // Expected records. only_region < 0 keeps all regions. ovl is the overlap length of
  // regions above region 0. Returns the number of seeds.
  function automatic int expected(int len_reg, int ovl, params_t p, int only_region,
                                  ref count_t out);
    int n_seed = 0;
    int w = int'(p.word_size);
    int ql = g_q.size(), nd = g_db.size();
    int last_sep [];
    last_sep = new[nd];
    for (int k = 0, s = -1; k < nd; k++) begin
      last_sep[k] = s;
      if (g_db[k] == SYM_SEP) s = k;
    end
    for (int k0 = -ql; k0 < nd; k0++) begin
      int i;
      i = 1;
      while (i < ql) begin
        int k;
        k = i + k0;
        if (k >= 0 && k < nd && letters_match(g_q[i], g_db[k])) begin
          int a, b, rb, off, sq, sd, sl;
          bit rep;
          a = i; b = i;
          while (b + 1 < ql && b + 1 + k0 < nd && letters_match(g_q[b+1], g_db[b+1+k0])) b++;
          rb = b / len_reg; off = rb * len_reg;
          if (a >= off || rb == 0) begin
            rep = (b - a + 1 >= w); sq = a; sd = a + k0; sl = b - a + 1;
          end else if (a > off - ovl) begin
            rep = (b - a + 1 >= w); sq = off; sd = off + k0; sl = b - off + 1;
          end else begin
            rep = 1; sq = off; sd = off + k0; sl = b - off + 1;
          end
          if (rep && (only_region < 0 || only_region == rb)) begin
            int bf, ef, bb, eb, total;
            string key;
            n_seed++;
            extend(0, sq + sl, sd + sl, p, bf, ef);
            extend(1, sq - 1, sd - 1, p, bb, eb);
            total = sl * int'(p.match_rew) + bf + bb;
            if (total >= int'(p.s_thresh)) begin
              key = aln_key(sd - eb, last_sep[sd] + 1, sq - eb - 1, sl + ef + eb, total);
              if (out.exists(key)) out[key]++;
              else out[key] = 1;
            end
          end
          i = b + 1;
        end else i++;
      end
    end
    return n_seed;
  endfunction

  // instruction stream of one run: load parameters, load query, database, padding, notify
  function automatic void run_stream(params_t p, int pad);
    g_s.push_back(SYM_LOAD_PARAM);
    for (int b = 4; b >= 0; b--) begin
      logic [7:0] v;
      v = p[b*8 +: 8];
      g_s.push_back(v[3:0]);
      g_s.push_back(v[7:4]);
    end
    g_s.push_back(SYM_START_Q);
    foreach (g_q[i]) g_s.push_back(g_q[i]);
    g_s.push_back(SYM_STOP_Q);
    foreach (g_db[i]) g_s.push_back(g_db[i]);
    repeat (pad) g_s.push_back(SYM_SEP);
    g_s.push_back(SYM_NOTIFY);
  endfunction

  function automatic void pack();
    for (int i = 0; i < g_s.size(); i += 16) begin
      logic [63:0] wd;
      wd = '0;                                   // tail padded with separators
      for (int j = 0; j < 16 && i + j < g_s.size(); j++) wd[j*4 +: 4] = g_s[i + j];
      g_words.push_back(wd);
    end
  endfunction

  // random query / database over the first alpha letters, with planted copies of query pieces
  function automatic void make_data(int ql, int nd, int subj_min, int density = 1,
                                  int alpha = 4);
    g_q = new[ql];
    g_db = new[nd];
    g_s.delete();
    g_words.delete();
    g_q[0] = SYM_QTERM;
    for (int i = 1; i < ql; i++) g_q[i] = ($urandom_range(0, 60) == 0) ? SYM_QMASK : sym_t'($urandom_range(1, alpha));
    for (int k = 0, run = 0; k < nd; k++, run++) begin
      if (run >= subj_min && $urandom_range(0, 99) < 2) begin g_db[k] = SYM_SEP; run = 0; end
      else g_db[k] = ($urandom_range(0, 80) == 0) ? SYM_DBMASK : sym_t'($urandom_range(1, alpha));
    end
    g_db[0] = SYM_A;
    for (int c = 0; c < nd * density / 60; c++) begin
      int qa, n, at;
      qa = $urandom_range(1, ql - 2); n = $urandom_range(6, 60);
      at = $urandom_range(1, nd - 70);
      for (int j = 0; j < n && qa + j < ql; j++)
        if (g_db[at + j] != SYM_SEP) g_db[at + j] = g_q[qa + j];
    end
  endfunction
endpackage

// tb_seed_detection_array: two seed detection arrays side by side, the first region (no
// overlap) and the second region (7-letter overlap), fed with the same database stream.
// The query is random; the database mixes random letters, separators, masks and copied
// query pieces, so that long runs cross reference elements and the region boundary.
// A simple acknowledge model plays the arbitrator (one seed per clock, ack one clock after
// selection); in the second half it acknowledges only every 60 clocks, which forces buffer
// conflicts and delay-cap stalls. Every reported seed is decoded from its position, delay
// and the letter count and compared with an independent list built by scanning all maximal
// exact runs of the query against the database and applying the region ownership rules.
module tb_seed_detection_array;
  import blast_pkg::*;
  localparam int LEN = 32, QL = 2*LEN, NDB = 2400, PAD = LEN + 12, W = 5;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  sym_t gq [QL];
  sym_t db [NDB + PAD];
  logic q_clear, q_we;
  logic [QPOS_W-1:0] q_idx;
  sym_t q_sym, db_sym;
  logic db_valid;
  logic [7:0] wsz = 8'(W);

  logic             rdy [2];
  logic [LEN-1:0]   sv [2];
  logic [LEN-1:0]   ss [2];
  logic [LEN_W-1:0] sl [2][LEN];
  logic [DLY_W-1:0] sd [2][LEN];
  logic             av [2];
  logic [7:0]       ai [2];
  logic             e_ref [2], e_conf [2], e_cap [2], e_ovl [2];

  seed_detection_array #(.LEN(LEN), .OFFSET(0), .OVL(0)) u0 (
    .clk, .rst, .word_size(wsz), .q_clear, .q_we, .q_idx, .q_sym, .db_valid, .db_sym,
    .ready(rdy[0]), .seed_valid(sv[0]), .seed_stall(ss[0]), .seed_len(sl[0]), .seed_dly(sd[0]),
    .ack_valid(av[0]), .ack_idx(ai[0]), .ev_ref_stall(e_ref[0]), .ev_conflict_stall(e_conf[0]),
    .ev_cap_stall(e_cap[0]), .ev_overlap_seed(e_ovl[0]));
  seed_detection_array #(.LEN(LEN), .OFFSET(LEN), .OVL(7)) u1 (
    .clk, .rst, .word_size(wsz), .q_clear, .q_we, .q_idx, .q_sym, .db_valid, .db_sym,
    .ready(rdy[1]), .seed_valid(sv[1]), .seed_stall(ss[1]), .seed_len(sl[1]), .seed_dly(sd[1]),
    .ack_valid(av[1]), .ack_idx(ai[1]), .ev_ref_stall(e_ref[1]), .ev_conflict_stall(e_conf[1]),
    .ev_cap_stall(e_cap[1]), .ev_overlap_seed(e_ovl[1]));

  int checks = 0, failures = 0;
  int cnt = 0;             // letters moved so far
  int slow = 0, cyc = 0;
  int n_ref = 0, n_conf = 0, n_cap = 0, n_ovl = 0, n_stall_seen = 0;
  int got [string];
  int exp_s [string];

  function automatic sym_t rnd_letter();
    int r = $urandom_range(0, 99);
    if (r < 45) return SYM_A;
    if (r < 85) return SYM_C;
    if (r < 95) return SYM_G;
    return SYM_T;
  endfunction

  // acknowledge model, one per array
  for (genvar a = 0; a < 2; a++) begin : g_ack
    always @(posedge clk) begin
      if (rst) begin
        av[a] <= 1'b0;
      end else begin
        int pick;
        pick = -1;
        av[a] <= 1'b0;
        if (!slow || (cyc % 60 == 0)) begin
          for (int s = LEN-1; s >= 0; s--)
            if (sv[a][s] && !(av[a] && ai[a] == 8'(s))) pick = s;
        end
        if (pick >= 0) begin
          string key;
          int dbp;
          dbp = cnt - int'(sd[a][pick]) - LEN - 2 + pick;
          key = $sformatf("%0d:%0d:%0d:%0d", a, pick, dbp, sl[a][pick]);
          if (got.exists(key)) got[key]++; else got[key] = 1;
          if (ss[a][pick]) n_stall_seen++;
          av[a] <= 1'b1;
          ai[a] <= 8'(pick);
        end
      end
    end
  end

  always @(posedge clk) if (db_valid) cnt <= cnt + 1;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (e_ref[0] || e_ref[1]) n_ref++;
      if (e_conf[0] || e_conf[1]) n_conf++;
      if (e_cap[0] || e_cap[1]) n_cap++;
      if (e_ovl[1]) n_ovl++;
    end
  end

  // expected seeds: every maximal run of exact matches, assigned to the region holding its
  // top query letter
  task automatic build_expected();
    for (int k0 = -QL; k0 < NDB + PAD; k0++) begin
      // diagonal: query position i pairs with database letter i + k0
      int i = 1;
      while (i < QL) begin
        int k = i + k0;
        if (k >= 0 && k < NDB + PAD && letters_match(gq[i], db[k])) begin
          int a = i, b = i;
          while (b + 1 < QL && b + 1 + k0 < NDB + PAD && letters_match(gq[b+1], db[b+1+k0])) b++;
          begin
            int rb = b / LEN, off = rb * LEN, L = b - a + 1;
            bit rep = 0; int s = 0, dbs = 0, rl = 0;
            if (a >= off) begin
              rep = (L >= W); s = a - off; dbs = a + k0; rl = L;
            end else if (a > off - 7) begin
              rep = (L >= W); s = 0; dbs = off + k0; rl = b - off + 1;
            end else begin
              rep = 1; s = 0; dbs = off + k0; rl = b - off + 1;
            end
            if (rep) exp_s[$sformatf("%0d:%0d:%0d:%0d", rb, s, dbs, rl)] = 1;
          end
          i = b + 1;
        end else i++;
      end
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q_clear = 0; q_we = 0; q_idx = '0; q_sym = SYM_QMASK; db_valid = 0; db_sym = SYM_SEP;
    gq[0] = SYM_QTERM;
    for (int i = 1; i < QL; i++) gq[i] = rnd_letter();
    for (int k = 0; k < NDB; k++) begin
      int r;
      r = $urandom_range(0, 99);
      db[k] = (r < 2) ? SYM_SEP : (r < 4) ? SYM_DBMASK : rnd_letter();
    end
    // copies of query pieces: across the region boundary, across references, at the start
    for (int c = 0; c < 30; c++) begin
      int qa, n, at;
      qa = $urandom_range(1, QL - 12); n = $urandom_range(6, 30); at = $urandom_range(0, NDB - 40);
      for (int j = 0; j < n && qa + j < QL; j++) db[at + j] = gq[qa + j];
    end
    for (int k = NDB; k < NDB + PAD; k++) db[k] = SYM_SEP;
    build_expected();

    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    q_clear <= 1;
    @(posedge clk);
    q_clear <= 0;
    for (int i = 0; i < QL; i++) begin
      q_we <= 1; q_idx <= QPOS_W'(i); q_sym <= gq[i];
      @(posedge clk);
    end
    q_we <= 0;
    for (int k = 0; k < NDB + PAD; k++) begin
      if (k == NDB / 2) slow = 1;
      db_sym <= db[k];
      db_valid <= 1'b0;
      #1;
      while (!(rdy[0] && rdy[1])) begin @(posedge clk); #1; end
      db_valid <= 1'b1;
      @(posedge clk);
      db_valid <= 1'b0;
    end
    slow = 0;
    repeat (300) @(posedge clk);

    foreach (exp_s[key]) begin
      checks++;
      if (!got.exists(key)) begin
        failures++;
        if (failures < 6) $display("missing seed %s", key);
      end
    end
    foreach (got[key]) begin
      checks++;
      if (!exp_s.exists(key) || got[key] != 1) begin
        failures++;
        if (failures < 700 && failures > 595) $display("unexpected seed %s (x%0d)", key, got[key]);
      end
    end
    $display("expected %0d seeds, got %0d; ref stalls %0d, conflict stalls %0d, cap stalls %0d, overlap seeds %0d, stall services %0d",
             exp_s.size(), got.size(), n_ref, n_conf, n_cap, n_ovl, n_stall_seen);
    checks += 5;
    if (n_ref == 0)  begin failures++; $display("no reference element stall"); end
    if (n_conf == 0) begin failures++; $display("no buffer conflict stall"); end
    if (n_cap == 0)  begin failures++; $display("no delay-cap stall"); end
    if (n_ovl == 0)  begin failures++; $display("no overlap seed"); end
    if (exp_s.size() < 50) begin failures++; $display("too few seeds exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_detection_region: one detection region (the second one, so that its 7-element overlap
// with the region below is in use) at reduced size: 32 elements, four extension units. The
// region shares its input with an extension controller that fills the extension unit
// memories, as in the core. Symbols (parameters already applied, query load, database with
// planted copies, padding, notify) are fed one per clock at random, holding off while the
// region asserts backoff. The region's records are compared, as a multiset, with the
// reference restricted to seeds of this region; a zero-length record and finished must
// follow. Every event output must fire at least once over the runs.
module tb_detection_region;
  import blast_pkg::*;
  import blast_ref_pkg::*;
  localparam int LEN = 32, OVL = 7, REGION = 1;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  params_t params;
  sym_t in_sym = SYM_SEP;
  logic in_valid = 0, backoff, out_valid, out_ack = 0, finished;
  mem_wr_t wr;
  logic [DB_CNT_W-1:0] db_count;
  aln_t out_data;
  logic ev_ref_stall, ev_conflict_stall, ev_cap_stall, ev_overlap_seed, ev_stall_service, ev_seed_start;
  int checks = 0, failures = 0;
  int ev_cnt [6] = '{0, 0, 0, 0, 0, 0};
  string ev_name [6] = '{"reference stall", "conflict stall", "saturation stall", "overlap seed",
                         "stall service", "extension start"};
  count_t got;
  int n_zero = 0, n_rec = 0;

  ext_controller #(.Q_LINES_W(5)) u_ec (.clk, .rst, .in_sym, .in_valid, .wr, .db_count);
  detection_region #(.REGION(REGION), .LEN(LEN), .NEU(4), .LC_DEPTH(128), .Q_LINES_W(5)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    logic [5:0] e;
    e = {ev_seed_start, ev_stall_service, ev_overlap_seed, ev_cap_stall, ev_conflict_stall, ev_ref_stall};
    for (int i = 0; i < 6; i++) if (e[i]) ev_cnt[i]++;
  end

  always @(negedge clk) if (!rst && out_valid && out_ack) begin
    if (out_data.len == 0) n_zero++;
    else begin
      string k;
      k = aln_to_key(out_data);
      if (got.exists(k)) got[k]++; else got[k] = 1;
      n_rec++;
    end
  end
  always @(posedge clk) out_ack <= ($urandom_range(0, 2) != 0);

  task automatic run(int ql, int nd, params_t p, int density, int alpha);
    count_t exp_c;
    int n_seed, n_exp = 0, i;
    rst <= 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    params = p;
    make_data(ql, nd, 40, density, alpha);
    n_seed = expected(LEN, OVL, p, REGION, exp_c);
    foreach (exp_c[k]) n_exp += exp_c[k];
    run_stream(p, LEN + OVL + 25);
    got.delete();
    n_zero = 0; n_rec = 0;
    i = 11;                       // the parameter block is applied directly
    @(posedge clk);
    while (i < g_s.size()) begin
      @(negedge clk);
      if (!backoff && $urandom_range(0, 4) != 0) begin in_sym = g_s[i]; in_valid = 1; i++; end
      else in_valid = 0;
    end
    @(negedge clk) in_valid = 0;
    while (n_zero == 0) @(posedge clk);
    repeat (20) @(posedge clk);
    chk(n_zero == 1 && finished, "region finished");
    foreach (exp_c[k]) chk(got.exists(k) && got[k] == exp_c[k], $sformatf("expected %s x%0d", k, exp_c[k]));
    foreach (got[k]) if (!exp_c.exists(k)) chk(0, $sformatf("unexpected %s", k));
    $display("run: %0d seeds, %0d records expected, %0d received", n_seed, n_exp, n_rec);
  endtask

  initial begin
    params = PARAMS_DEFAULT;
    repeat (3) @(posedge clk);
    run(64, 3000, '{word_size: 8'd6, s_thresh: 8'd14, x_drop: 8'd10, miss_pen: 8'd3, match_rew: 8'd1}, 2, 4);
    run(64, 1500, '{word_size: 8'd4, s_thresh: 8'd30, x_drop: 8'd30, miss_pen: 8'd1, match_rew: 8'd1}, 4, 2);
    for (int e = 0; e < 6; e++) begin
      chk(ev_cnt[e] > 0, $sformatf("%s never happened", ev_name[e]));
      $display("%s: %0d", ev_name[e], ev_cnt[e]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_blast_core: end-to-end test of the BLAST core (decoder, extension controller, three
// detection regions, global aggregator) at reduced size: 32-element regions, four extension
// units per region, 128-entry region buffers. Each run streams parameters, a random query
// with a terminator first, a database of random subjects with planted copies of query
// pieces, separator padding and "notify when done", packed 16 symbols per 64-bit word, with
// random gaps on the input and random back-pressure on the output. The records that come out
// are compared, as a multiset, with the reference in blast_ref_pkg; the run ends when every
// region has sent its zero-length record. Between runs the core is reset by three core reset
// symbols and reloaded with other parameters. The core's event outputs (reference stall,
// conflict stall, saturation stall, overlap seed, stall service, extension start) must each
// occur.
module tb_blast_core;
  import blast_pkg::*;
  import blast_ref_pkg::*;
  localparam int NR = 3, LEN = 32, OVL = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [63:0] in_data = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  aln_t out_data;
  logic [NR-1:0] finished;
  logic [5:0] ev;
  int checks = 0, failures = 0;
  int ev_cnt [6] = '{0, 0, 0, 0, 0, 0};
  string ev_name [6] = '{"reference stall", "conflict stall", "saturation stall", "overlap seed",
                         "stall service", "extension start"};
  count_t got;
  int n_zero = 0, n_rec = 0;

  blast_core #(.N_REGIONS(NR), .LEN(LEN), .NEU(4), .LC_DEPTH(128), .Q_LINES_W(5)) dut (.*);

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

  always @(posedge clk) if (!rst) for (int e = 0; e < 6; e++) if (ev[e]) ev_cnt[e]++;

  always @(negedge clk) if (!rst && out_valid && out_ready) begin
    if (out_data.len == 0) n_zero++;
    else begin
      string k;
      k = aln_to_key(out_data);
      if (got.exists(k)) got[k]++; else got[k] = 1;
      n_rec++;
    end
  end
  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic send_words();
    foreach (g_words[i]) begin
      in_data <= g_words[i];
      in_valid <= 1;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      if ($urandom_range(0, 7) == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
  endtask

  task automatic run(int ql, int nd, params_t p, bit reset_first, int density = 1,
                      int alpha = 4);
    count_t exp_c;
    int n_seed, n_exp = 0, bad = 0;
    make_data(ql, nd, 40, density, alpha);
    n_seed = expected(LEN, OVL, p, -1, exp_c);
    foreach (exp_c[k]) n_exp += exp_c[k];
    if (reset_first) repeat (3) g_s.push_back(SYM_CORE_RESET);
    run_stream(p, LEN + OVL + 25);
    pack();
    got.delete();
    n_zero = 0; n_rec = 0;
    send_words();
    while (n_zero < NR) @(posedge clk);
    repeat (20) @(posedge clk);
    chk(n_zero == NR && finished == '1, "every region finished");
    foreach (exp_c[k]) begin
      chk(got.exists(k) && got[k] == exp_c[k], $sformatf("expected %s x%0d", k, exp_c[k]));
    end
    foreach (got[k]) if (!exp_c.exists(k)) begin
      chk(0, $sformatf("unexpected %s", k));
      bad++;
    end
    $display("run: query %0d, database %0d: %0d seeds, %0d records expected, %0d received",
             ql, nd, n_seed, n_exp, n_rec);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    run(90, 3000, '{word_size: 8'd6, s_thresh: 8'd14, x_drop: 8'd10, miss_pen: 8'd3, match_rew: 8'd1}, 0);
    run(70, 2000, '{word_size: 8'd11, s_thresh: 8'd20, x_drop: 8'd20, miss_pen: 8'd3, match_rew: 8'd1}, 1);
    run(96, 3000, '{word_size: 8'd4, s_thresh: 8'd16, x_drop: 8'd8, miss_pen: 8'd2, match_rew: 8'd2}, 1);
    // two-letter alphabet, short words and a large X-drop: many seeds and long extensions
    // keep the extension units busy, so seeds back up in the arrays
    run(96, 1500, '{word_size: 8'd4, s_thresh: 8'd30, x_drop: 8'd30, miss_pen: 8'd1, match_rew: 8'd1}, 1, 4, 2);
    for (int e = 0; e < 6; e++) begin
      chk(ev_cnt[e] > 0, $sformatf("%s never happened", ev_name[e]));
      $display("%s: %0d", ev_name[e], ev_cnt[e]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_roach_blast_top: end-to-end test of the whole FPGA design with every parameter at its
// default (three 128-element regions, eight extension units each, 32 kB input buffer).
// A behavioural host sends the instruction stream in UDP-sized packets of 256 words and
// sends the next packet each time the design asks for one (pull mode), and collects the
// two-line output records until the end-of-work record. Two runs:
//   A. default scoring parameters, a 383-letter query (the largest the three regions hold)
//      and a 20,000-letter database of random subjects with planted query pieces;
//   B. after a core reset, a two-letter alphabet with short words and a low threshold, so
//      that seeds are dense and records fill whole output packets.
// For each run the data records are compared, as a multiset, with the reference model. The
// test counts every mechanism and fails on any that never occurs: the six core events
// (reference stall, conflict stall, saturation stall, overlap seed, stall service, extension
// start), region buffer backoff, input buffer full, next-packet requests, packets ended by
// size, and end of work. Run A also checks the rate: about one database letter per core
// clock.
module tb_roach_blast_top;
  import blast_pkg::*;
  import blast_ref_pkg::*;
  localparam int LEN = 128, OVL = 7, PKT_WORDS = 256;
  logic clk100 = 0, clk60 = 0, pll_locked = 0;
  always #5 clk100 = ~clk100;
  always #8 clk60 = ~clk60;
  logic [63:0] rx_data = '0, tx_data;
  logic rx_valid = 0, rx_eof = 0, rx_ack, tx_valid, tx_eof, tx_ready = 0, work_done;
  logic [2:0] region_finished;
  logic [5:0] ev;
  int checks = 0, failures = 0;
  string mech_name [11] = '{"reference stall", "conflict stall", "saturation stall", "overlap seed",
                            "stall service", "extension start", "region backoff",
                            "input buffer full", "next-packet request", "packet full",
                            "end of work"};
  int mech [11] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  count_t got;
  int n_rec = 0, n_req = 0, n_end = 0, in_pkt = 0;
  bit have_l1 = 0;
  logic [63:0] l1;

  roach_blast_top dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk60) if (pll_locked) begin
    for (int e = 0; e < 6; e++) if (ev[e]) mech[e]++;
    if (dut.u_core.backoff) mech[6]++;
  end

  // output side: decode the two-line records
  always @(negedge clk100) if (pll_locked) begin
    if (rx_valid && !rx_ack && dut.u_rx.buf_full) mech[7]++;
    if (tx_valid && tx_ready) begin
      if (!have_l1) begin
        l1 = tx_data; have_l1 = 1;
      end else begin
        have_l1 = 0;
        if (tx_data[56]) begin n_req++; mech[8]++; in_pkt = 0; end
        else if (tx_data[57]) begin n_end++; mech[10]++; in_pkt = 0; end
        else begin
          string k;
          k = aln_key(int'(l1[63:32]), int'(l1[31:0]), int'(tx_data[27:16]), int'(tx_data[11:0]),
                      int'($signed(tx_data[47:32])));
          if (got.exists(k)) got[k]++; else got[k] = 1;
          n_rec++;
          in_pkt++;
          if (tx_eof) begin
            chk(in_pkt == 512, "packet ended by size after 512 records");
            mech[9]++;
            in_pkt = 0;
          end
        end
      end
    end
  end
  always @(posedge clk100) tx_ready <= ($urandom_range(0, 7) != 0);

  task automatic send_packet(int first);
    @(posedge clk100);
    for (int i = first; i < first + PKT_WORDS && i < g_words.size(); i++) begin
      rx_data <= g_words[i];
      rx_eof <= (i == first + PKT_WORDS - 1) || (i == g_words.size() - 1);
      rx_valid <= 1;
      @(negedge clk100);
      while (!rx_ack) @(negedge clk100);
      @(posedge clk100);
    end
    rx_valid <= 0;
    rx_eof <= 0;
  endtask

  task automatic run(string name, int ql, int nd, params_t p, bit reset_first, int density,
                     int alpha, bit check_rate);
    count_t exp_c;
    int n_seed, n_exp = 0, sent, req0, end0;
    realtime t0;
    real clocks;
    make_data(ql, nd, 60, density, alpha);
    n_seed = expected(LEN, OVL, p, -1, exp_c);
    foreach (exp_c[k]) n_exp += exp_c[k];
    if (reset_first) repeat (3) g_s.push_back(SYM_CORE_RESET);
    run_stream(p, 200);
    pack();
    got.delete();
    n_rec = 0;
    end0 = n_end;
    sent = 0;
    req0 = n_req;
    // pull mode: one packet, then one more per request
    t0 = $realtime;
    send_packet(0);
    sent = PKT_WORDS;
    while (sent < g_words.size()) begin
      wait (n_req > req0);
      req0++;
      send_packet(sent);
      sent += PKT_WORDS;
    end
    wait (n_end > end0);
    clocks = ($realtime - t0) / 16.0;
    // the core takes one symbol per clock when nothing stalls: sparse seeds may cost a few
    // per cent more
    if (check_rate)
      chk(clocks <= 1.1 * g_s.size() + 500, $sformatf("%0.0f core clocks for %0d symbols", clocks, g_s.size()));
    $display("run %s: %0.0f core clocks for %0d symbols", name, clocks, g_s.size());
    repeat (50) @(posedge clk100);
    chk(work_done && region_finished == '1, "end of work");
    foreach (exp_c[k]) chk(got.exists(k) && got[k] == exp_c[k], $sformatf("expected %s x%0d", k, exp_c[k]));
    foreach (got[k]) if (!exp_c.exists(k)) chk(0, $sformatf("unexpected %s", k));
    $display("run %s: query %0d, database %0d, %0d words: %0d seeds, %0d records expected, %0d received",
             name, ql, nd, g_words.size(), n_seed, n_exp, n_rec);
  endtask

  initial begin
    repeat (5) @(posedge clk100);
    pll_locked <= 1;
    repeat (10) @(posedge clk100);
    run("A", 384, 80000, PARAMS_DEFAULT, 0, 1, 4, 1);
    run("B", 200, 6000, '{word_size: 8'd8, s_thresh: 8'd8, x_drop: 8'd25, miss_pen: 8'd1, match_rew: 8'd1}, 1, 1, 2, 0);
    for (int m = 0; m < 11; m++) begin
      chk(mech[m] > 0, $sformatf("%s never happened", mech_name[m]));
      $display("%s: %0d", mech_name[m], mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

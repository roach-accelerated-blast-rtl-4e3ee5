// tb_local_controller: feeds a random instruction stream (queries, database letters,
// separators, counter resets, notify) while the seed detection array side is ready only at
// random, and obeys backoff on the input side as the decoder does. A reference model checks
// the query writes (index and symbol, counted from 0 after "start loading query"), the
// database symbols in order and only when the array is ready, the database letter count,
// the subject start reported at each separator, subject-table clears, and that db_done rises
// after "notify when done". A long stall of the array must raise backoff, and with the array
// always ready the controller must pass one symbol per clock.
module tb_local_controller;
  import blast_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  sym_t in_sym = SYM_SEP;
  logic in_valid = 0, backoff, arr_ready = 0, db_valid, q_clear, q_we, subj_clr, subj_we, db_done;
  sym_t db_sym, q_sym;
  logic [QPOS_W-1:0] q_idx;
  logic [31:0] db_cnt, subj_start;
  int checks = 0, failures = 0;
  sym_t stream [$];
  // model state, advanced as the DUT consumes symbols
  int mi = 0, m_q = 0, m_cnt = 0, n_db = 0, n_q = 0, n_subj = 0, n_backoff = 0;
  bit m_load = 0, m_done = 0, ready_always = 0;

  local_controller #(.FIFO_DEPTH(64), .BACKOFF_MARGIN(4)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) arr_ready <= ready_always || ($urandom_range(0, 9) < 4);
  always @(posedge clk) if (backoff) n_backoff++;

  // observe the read side: every consumed symbol is either a query write, a database symbol
  // or an instruction; sampled at the falling edge, when the handshake is settled; compare with the stream position the model expects
  always @(negedge clk) if (!rst) begin
    if (q_we) begin
      chk(m_load && stream[mi] == q_sym && q_idx == QPOS_W'(m_q),
          $sformatf("query write idx %0d/%0d", q_idx, m_q));
      m_q++; mi++; n_q++;
    end else if (db_valid) begin
      chk(arr_ready && !m_load && stream[mi] == db_sym && db_cnt == 32'(m_cnt),
          $sformatf("db symbol %0d cnt %0d/%0d", mi, db_cnt, m_cnt));
      if (db_sym == SYM_SEP) begin
        chk(subj_we && subj_start == 32'(m_cnt + 1), "subject start");
        n_subj++;
      end
      m_cnt++; mi++; n_db++;
    end else if (dut.pop) begin
      sym_t s;
      s = stream[mi];
      chk(s == dut.head, "instruction order");
      if (m_load && s == SYM_STOP_Q) begin m_load = 0; m_cnt = 0; chk(subj_clr, "clear at stop"); end
      else if (s == SYM_START_Q) begin m_load = 1; m_q = 0; chk(q_clear, "q_clear"); end
      else if (s == SYM_CNT_RESET || s == SYM_STOP_Q) begin m_cnt = 0; chk(subj_clr, "clear"); end
      else if (s == SYM_NOTIFY) m_done = 1;
      mi++;
    end
  end

  task automatic run_stream(int n_sym);
    int sent = 0;
    while (sent < stream.size()) begin
      @(negedge clk);
      if (!backoff && $urandom_range(0, 3) != 0) begin
        in_sym = stream[sent]; in_valid = 1; sent++;
      end else in_valid = 0;
    end
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int round = 0; round < 4; round++) begin
      stream.push_back(SYM_START_Q);
      stream.push_back(SYM_QTERM);
      repeat ($urandom_range(5, 40)) stream.push_back(sym_t'($urandom_range(1, 6)));
      stream.push_back(SYM_STOP_Q);
      for (int i = 0; i < 500; i++) begin
        int r;
        r = $urandom_range(0, 99);
        stream.push_back(r < 2 ? SYM_CNT_RESET : sym_t'($urandom_range(0, 6)));
      end
    end
    stream.push_back(SYM_NOTIFY);
    run_stream(stream.size());
    repeat (400) @(posedge clk);
    chk(mi == stream.size(), $sformatf("all symbols consumed %0d/%0d", mi, stream.size()));
    chk(db_done && m_done, "db_done after notify");
    chk(n_backoff > 0, "backoff raised");
    chk(n_q > 0 && n_subj > 0, "query and separators seen");
    // throughput: with the array always ready and no input gaps, 200 letters in ~200 clocks
    ready_always = 1;
    repeat (2) @(posedge clk);
    begin
      int n0, t0;
      n0 = n_db;
      for (int i = 0; i < 200; i++) stream.push_back(SYM_C);
      t0 = $time;
      for (int i = 0; i < 200; i++) begin @(negedge clk); in_sym = SYM_C; in_valid = 1; end
      @(negedge clk) in_valid = 0;
      while (n_db - n0 < 200) @(posedge clk);
      chk(($time - t0) / 10 <= 200 + 4, $sformatf("200 letters in %0d clocks", ($time - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

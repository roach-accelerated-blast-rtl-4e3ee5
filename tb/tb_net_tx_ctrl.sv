// tb_net_tx_ctrl: the core side (60 MHz) offers random alignment records followed by one
// zero-length record per region; next-packet requests appear at random on the network side
// (100 MHz), which accepts lines with random back-pressure. The two-line records are decoded
// and checked: data records arrive in order with every field in place, a packet ends after
// 8 data records (packet size reduced for the test) or right after a control record, each
// request produces one control record with the next-packet bit, zero-length records are not
// sent, and after the last zero-length record one end-of-work record ends the output and
// work_done rises. With the line always accepted a record costs at most three clocks.
module tb_net_tx_ctrl;
  import blast_pkg::*;
  localparam int NR = 3, PKT = 8;
  logic clk = 0, core_clk = 0, rst = 1, core_rst = 1;
  always #5 clk = ~clk;
  always #8 core_clk = ~core_clk;
  logic aln_valid = 0, aln_ready, ctrl_valid = 0, ctrl_pop, tx_valid, tx_eof, tx_ready = 0, work_done;
  aln_t aln_data = '0;
  logic [63:0] tx_data;
  int checks = 0, failures = 0;
  aln_t exp_q [$];
  int n_req = 0, n_ctrl = 0, n_data = 0, n_end = 0, in_pkt = 0, n_pkt_full = 0;
  bit have_l1 = 0, fast = 0, streaming = 0;
  logic [63:0] l1;

  net_tx_ctrl #(.N_REGIONS(NR), .PKT_RECORDS(PKT), .ALN_AW(3)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // network side: decode accepted lines at the falling edge
  always @(negedge clk) if (!rst && tx_valid && tx_ready) begin
    if (!have_l1) begin
      l1 = tx_data; have_l1 = 1;
      chk(!tx_eof, "end of frame only on a second line");
    end else begin
      have_l1 = 0;
      if (tx_data[56]) begin
        n_ctrl++;
        chk(tx_eof && l1 == '0 && tx_data[55:0] == '0, "control record");
        in_pkt = 0;
      end else if (tx_data[57]) begin
        n_end++;
        chk(tx_eof && exp_q.size() == 0, "end of work after all records");
        in_pkt = 0;
      end else begin
        aln_t e;
        chk(exp_q.size() > 0, "unexpected data record");
        if (exp_q.size() > 0) begin
          e = exp_q.pop_front();
          chk(l1 == {e.db_pos, e.subj_pos} && tx_data == {8'b0, 8'b0, e.score, 4'b0, e.q_pos, 4'b0, e.len},
              "data record fields");
        end
        n_data++;
        in_pkt++;
        chk(tx_eof == (in_pkt == PKT), $sformatf("end of frame after %0d records", in_pkt));
        if (in_pkt == PKT) begin in_pkt = 0; n_pkt_full++; end
      end
    end
  end
  always @(posedge clk) tx_ready <= fast || ($urandom_range(0, 3) != 0);

  // requests
  always @(negedge clk) if (!rst && ctrl_valid && ctrl_pop) n_req++;
  int req_left = 20;
  always @(posedge clk) if (!rst) begin
    if (ctrl_valid && ctrl_pop) ctrl_valid <= 0;
    else if (!ctrl_valid && req_left > 0 && !fast && $urandom_range(0, 60) == 0) begin
      ctrl_valid <= 1; req_left--;
    end
  end

  // offer one record from the next rising edge; valid stays high afterwards only when
  // another record follows at once (keep = 1)
  task automatic offer(aln_t a, bit keep = 0);
    if (!streaming) @(posedge core_clk);
    aln_data <= a;
    aln_valid <= 1;
    @(negedge core_clk);
    while (!aln_ready) @(negedge core_clk);
    @(posedge core_clk);
    if (!keep) aln_valid <= 0;
    streaming = keep;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge core_clk) core_rst <= 0;
    for (int i = 0; i < 150; i++) begin
      aln_t a;
      a.db_pos = $urandom; a.subj_pos = $urandom; a.q_pos = 12'($urandom);
      a.len = 12'($urandom_range(1, 4095)); a.score = 16'($urandom);
      exp_q.push_back(a);
      offer(a);
      if (i == 10 || i == 60) offer('0);     // two regions finish early
      repeat ($urandom_range(0, 4)) @(posedge core_clk);
    end
    offer('0);
    repeat (500) @(posedge clk);
    chk(work_done && n_end == 1, "end of work");
    chk(exp_q.size() == 0 && n_data == 150, $sformatf("records %0d", n_data));
    chk(n_ctrl == n_req && n_req == 20, $sformatf("control records %0d requests %0d", n_ctrl, n_req));
    chk(n_pkt_full > 0, "full packet ended");
    // rate
    fast = 1;
    rst <= 1; core_rst <= 1;
    repeat (3) @(posedge clk);
    rst <= 0; core_rst <= 0;
    in_pkt = 0;
    fork
      for (int i = 0; i < 40; i++) begin
        aln_t a;
        a = '0; a.len = 12'(i + 1);
        exp_q.push_back(a);
        offer(a, i < 39);
      end
    join_none
    begin
      int n0;
      realtime t0;
      wait (n_data == 150 + 1);
      n0 = n_data; t0 = $realtime;
      wait (n_data == 150 + 40);
      chk(($realtime - t0) / 10 <= 39 * 3 + 2, $sformatf("%0.0f clocks for 39 records", ($realtime - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

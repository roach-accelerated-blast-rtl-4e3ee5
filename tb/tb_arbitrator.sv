// tb_arbitrator: a behavioural seed detection array holds seeds at random element positions
// (random length, delay and stall flag) and drops a seed when it is acknowledged; behavioural
// extension units take a random time per seed. Checks: only held seeds are acknowledged and
// each exactly once; the same position is never acknowledged on two clocks in a row (the
// second-level encoder skips the last serviced position); a stalling seed is served before
// non-stalling ones; the decoded query, database and subject positions follow
// q = OFFSET + idx, db = count - delay - (LEN + 2) + idx and the last subject start not after
// db; seeds reach the extension units in acknowledge order, always on the lowest free unit;
// and with seeds waiting the arbitrator acknowledges one per clock.
module tb_arbitrator;
  import blast_pkg::*;
  localparam int LEN = 32, OFFSET = 64, NEU = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [LEN-1:0] seed_valid = '0, seed_stall = '0;
  logic [LEN_W-1:0] seed_len [LEN];
  logic [DLY_W-1:0] seed_dly [LEN];
  logic ack_valid, subj_clr = 0, subj_we = 0, active, ev_stall_service;
  logic [7:0] ack_idx;
  logic [31:0] db_cnt = 1000, subj_start = 0;
  seed_t eu_seed;
  logic [NEU-1:0] eu_begin, eu_done = '0;
  int checks = 0, failures = 0;
  seed_t exp_fifo [$];
  int subj [$];
  int eu_left [NEU];
  int last_ack = -1, n_ack = 0, n_stall_first = 0, n_begin = 0;
  bit adding = 0;

  arbitrator #(.LEN(LEN), .OFFSET(OFFSET), .NEU(NEU), .FIFO_DEPTH(8), .SUBJ_N(8)) dut (.*);

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

  initial for (int i = 0; i < LEN; i++) begin seed_len[i] = '0; seed_dly[i] = '0; end
  initial for (int i = 0; i < NEU; i++) eu_left[i] = 0;

  // all checks and stimulus changes at the falling edge, where the DUT outputs are settled
  always @(negedge clk) if (!rst) begin
    // acknowledge
    if (ack_valid) begin
      seed_t e;
      int best;
      chk(seed_valid[ack_idx], $sformatf("ack of empty position %0d", ack_idx));
      chk(int'(ack_idx) != last_ack, "same position acknowledged twice in a row");
      e.q_pos  = QPOS_W'(OFFSET + ack_idx);
      e.db_pos = 32'(db_cnt - seed_dly[ack_idx] - (LEN + 2) + ack_idx);
      e.len    = seed_len[ack_idx];
      best = 0;
      foreach (subj[i]) if (subj[i] <= int'(e.db_pos) && subj[i] > best) best = subj[i];
      e.subj_pos = 32'(best);
      exp_fifo.push_back(e);
      seed_valid[ack_idx] = 1'b0;
      seed_stall[ack_idx] = 1'b0;
      last_ack = ack_idx;
      n_ack++;
    end else last_ack = -1;
    // extension units
    eu_done = '0;
    for (int i = 0; i < NEU; i++) if (eu_left[i] > 0) begin
      eu_left[i]--;
      if (eu_left[i] == 0) eu_done[i] = 1'b1;
    end
    if (|eu_begin) begin
      int lowest;
      lowest = -1;
      for (int i = NEU - 1; i >= 0; i--) if (eu_left[i] == 0 && !eu_done[i]) lowest = i;
      chk($onehot(eu_begin) && eu_begin[lowest], "one unit started, the lowest free one");
      chk(exp_fifo.size() > 0 && eu_seed == exp_fifo[0], $sformatf("seed handed to unit %p / %p", eu_seed, exp_fifo[0]));
      if (exp_fifo.size() > 0) void'(exp_fifo.pop_front());
      for (int i = 0; i < NEU; i++) if (eu_begin[i]) begin
        eu_left[i] = $urandom_range(2, 30);
        n_begin++;
      end
    end
    // stall priority: a stall seed present and a non-stall seed picked would be wrong
    if (dut.pick_ok && |(seed_stall & ~(ack_valid ? (LEN'(1) << ack_idx) : '0))) begin
      chk(dut.pick_stall, "stall seed served first");
      n_stall_first++;
    end
    // database counter advances; new seeds appear
    if ($urandom_range(0, 1)) db_cnt = db_cnt + 1;
    if (adding && $urandom_range(0, 9) < 4) begin
      int p;
      p = $urandom_range(0, LEN - 1);
      if (!seed_valid[p]) begin
        seed_valid[p] = 1'b1;
        seed_stall[p] = ($urandom_range(0, 3) == 0);
        seed_len[p]   = LEN_W'($urandom_range(4, 40));
        seed_dly[p]   = DLY_W'($urandom_range(0, 127));
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // subject table: a few starts below the count
    @(negedge clk);
    subj_clr = 1;
    @(negedge clk);
    subj_clr = 0;
    subj.push_back(0);
    for (int i = 1; i <= 4; i++) begin
      subj_we = 1; subj_start = 32'(700 + 60 * i); subj.push_back(700 + 60 * i);
      @(negedge clk);
    end
    subj_we = 0;
    adding = 1;
    repeat (3000) @(posedge clk);
    adding = 0;
    while (active) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(exp_fifo.size() == 0 && seed_valid == '0, "all seeds served");
    chk(n_ack > 100 && n_begin == n_ack, $sformatf("acks %0d begins %0d", n_ack, n_begin));
    chk(n_stall_first > 0, "stall priority exercised");
    // rate: 8 seeds present at once, extension units idle, served in 8 consecutive clocks
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      seed_valid[i * 3] = 1'b1; seed_len[i * 3] = 8'd12; seed_dly[i * 3] = '0;
    end
    begin
      int n0;
      n0 = n_ack;
      repeat (10) @(negedge clk);
      chk(n_ack - n0 == 8, $sformatf("8 seeds acknowledged in 9 clocks: %0d", n_ack - n0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

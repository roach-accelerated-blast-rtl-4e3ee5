// tb_aggregator: four sources offer random alignment records, each holding its record until
// acknowledged, while the consumer accepts at random. Checks that every record comes out
// exactly once and in order per source, that only one source is acknowledged per clock, and
// that the local variant emits exactly one zero-length record after the end of the
// database, only once the region is idle (active low) and all records have gone in, and
// then raises finished. With sources always offering and the output always ready the
// aggregator moves one record per clock.
module tb_aggregator;
  import blast_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [N-1:0] src_valid = '0, src_ack;
  aln_t src_data [N];
  logic db_done = 0, active = 1, out_valid, out_ready = 0, finished;
  aln_t out_data;
  int checks = 0, failures = 0;
  aln_t sent_q [N][$];
  int n_left [N];
  int n_out = 0, n_zero = 0;
  bit fast = 0;

  aggregator #(.N_SRC(N), .LOCAL(1'b1), .DEPTH(8)) dut (.*);

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

  function automatic aln_t rnd_aln(int src);
    aln_t a;
    a.db_pos = $urandom; a.subj_pos = $urandom; a.q_pos = QPOS_W'(src);
    a.len = 12'($urandom_range(1, 4095)); a.score = 16'($urandom);
    return a;
  endfunction

  initial for (int i = 0; i < N; i++) begin n_left[i] = 200; src_data[i] = '0; end

  // sample at the falling edge (handshakes settled), change stimulus after the rising edge
  bit [N-1:0] taken = '0;
  always @(negedge clk) if (!rst) begin
    chk($countones(src_ack) <= 1, "one acknowledge per clock");
    taken = '0;
    for (int i = 0; i < N; i++) if (src_ack[i]) begin
      chk(src_valid[i], "acknowledge without valid");
      sent_q[i].push_back(src_data[i]);
      taken[i] = 1;
      n_left[i]--;
    end
    if (out_valid && out_ready) begin
      n_out++;
      if (out_data.len == 0) begin
        n_zero++;
        chk(db_done && !active, "zero-length record only at the end");
        for (int i = 0; i < N; i++) chk(n_left[i] == 0 && sent_q[i].size() == 0, "all records before the end marker");
      end else begin
        int s;
        s = int'(out_data.q_pos);
        chk(sent_q[s].size() > 0 && out_data == sent_q[s][0], "record order per source");
        if (sent_q[s].size() > 0) void'(sent_q[s].pop_front());
      end
    end
  end

  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if ((!src_valid[i] || taken[i]) && n_left[i] > 0 && (fast || $urandom_range(0, 3) == 0)) begin
        src_valid[i] <= 1;
        src_data[i]  <= rnd_aln(i);
      end else if (taken[i]) src_valid[i] <= 0;
    end
    out_ready <= fast || ($urandom_range(0, 2) != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (50) @(posedge clk);
    db_done = 1;               // end of database while the region is still busy
    while (n_left[0] + n_left[1] + n_left[2] + n_left[3] > 0) @(posedge clk);
    repeat (20) @(posedge clk);
    chk(n_zero == 0 && !finished, "no end marker while active");
    active = 0;
    repeat (30) @(posedge clk);
    chk(n_zero == 1 && finished, $sformatf("one end marker, finished (%0d)", n_zero));
    // rate
    rst <= 1;
    @(posedge clk);
    rst <= 0;
    fast = 1; db_done = 0; active = 1;
    for (int i = 0; i < N; i++) n_left[i] = 50;
    begin
      int n0, t0;
      n0 = n_out; t0 = $time;
      while (n_out - n0 < 200) @(posedge clk);
      chk(($time - t0) / 10 <= 200 + 6, $sformatf("200 records in %0d clocks", ($time - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

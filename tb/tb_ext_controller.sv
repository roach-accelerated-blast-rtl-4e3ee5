// tb_ext_controller: drives a random instruction stream (query loads between start/stop,
// database letters, counter resets, ignored instructions) with random gaps into the
// extension controller, built with a small 16-line database window so that the write
// address wraps. Every memory write is checked against a reference: query symbols go to
// consecutive query addresses with an extra terminator written at stop, database symbols go
// to (count mod window), and db_count lags the write by one clock (it equals the letter's
// own index on the clock the write is presented and counts it one clock later).
module tb_ext_controller;
  import blast_pkg::*;
  localparam int QW = 5, DW = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  sym_t in_sym = SYM_SEP;
  logic in_valid = 0;
  mem_wr_t wr;
  logic [DB_CNT_W-1:0] db_count;
  int checks = 0, failures = 0;
  typedef struct { bit q; int addr; sym_t d; } wexp_t;
  wexp_t exp_q [$];
  int m_cnt = 0, m_qaddr = 0, n_wraps = 0;
  bit m_loading = 0;

  ext_controller #(.Q_LINES_W(QW), .DB_LINES_W(DW)) dut (.*);

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

  always @(posedge clk) if (!rst && (wr.q_we || wr.db_we)) begin
    wexp_t e;
    chk(exp_q.size() > 0, "unexpected write");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      chk(wr.q_we == e.q && wr.db_we == !e.q, "write target");
      chk({wr.line, wr.lane} == 13'(e.addr) && wr.data == e.d,
          $sformatf("write addr %0d/%0d data %h/%h", {wr.line, wr.lane}, e.addr, wr.data, e.d));
    end
  end


  task automatic send(sym_t s);
    in_sym <= s;
    in_valid <= 1;
    if (m_loading) begin
      exp_q.push_back('{1, m_qaddr, (s == SYM_STOP_Q) ? SYM_QTERM : s});
      m_qaddr++;
      if (s == SYM_STOP_Q) begin m_loading = 0; m_cnt = 0; end
    end else if (s == SYM_START_Q) begin
      m_loading = 1; m_qaddr = 0;
    end else if (s == SYM_STOP_Q || s == SYM_CNT_RESET) m_cnt = 0;
    else if (s <= SYM_DBMASK) begin
      exp_q.push_back('{0, m_cnt % (4 << DW), s});
      m_cnt++;
      if (m_cnt % (4 << DW) == 0) n_wraps++;
    end
    @(posedge clk);
    if ($urandom_range(0, 3) == 0) begin in_valid <= 0; @(posedge clk); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int round = 0; round < 6; round++) begin
      int ql;
      ql = $urandom_range(1, (4 << QW) - 2);
      send(SYM_START_Q);
      send(SYM_QTERM);
      for (int i = 0; i < ql - 1; i++) send(sym_t'($urandom_range(1, 6)));
      send(SYM_STOP_Q);
      for (int i = 0; i < 400; i++) begin
        int r;
        r = $urandom_range(0, 99);
        if (r < 2) send(SYM_CNT_RESET);
        else if (r < 4) send(SYM_NOTIFY);
        else send(sym_t'($urandom_range(0, 6)));
      end
      in_valid <= 0;
      repeat (3) @(posedge clk);
      chk(db_count == DB_CNT_W'(m_cnt), $sformatf("db_count %0d/%0d", db_count, m_cnt));
    end
    chk(exp_q.size() == 0, "all writes seen");
    chk(n_wraps > 0, "database window wrapped");
    // latency of db_count: the clock after in_valid the write is presented, one clock later
    // the count includes it
    send(SYM_CNT_RESET);
    in_valid <= 0;
    repeat (2) @(posedge clk);
    in_sym <= SYM_A; in_valid <= 1;
    exp_q.push_back('{0, 0, SYM_A});
    @(posedge clk); in_valid <= 0;
    @(negedge clk); chk(wr.db_we && db_count == 0, "count not yet including the letter");
    @(negedge clk); chk(db_count == 1, "count includes the letter one clock later");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

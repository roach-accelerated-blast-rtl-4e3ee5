// tb_blast_decoder: a random program of letters, instructions, parameter blocks and core
// reset triples is packed into 64-bit words (least significant nibble first) and fed with
// random gaps and random backoff. Checks the forwarded symbol sequence, the parameter values
// after each block, the number of core reset pulses, and the rate: with no gaps and no
// backoff one symbol leaves per clock.
module tb_blast_decoder;
  import blast_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [63:0] in_data = '0;
  logic in_valid = 0, in_ready, backoff = 0, out_valid, core_rst;
  sym_t out_sym;
  params_t params;
  int checks = 0, failures = 0;
  sym_t prog [$];
  sym_t expect_q [$];
  params_t exp_params = PARAMS_DEFAULT;
  int n_rst_exp = 0, n_rst = 0, n_out = 0;
  bit gaps = 1;

  blast_decoder dut (.*);

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

  always @(posedge clk) if (!rst) begin
    if (core_rst) begin
      n_rst++;
      chk(params == PARAMS_DEFAULT, "params after core reset");
    end
    if (out_valid) begin
      n_out++;
      chk(expect_q.size() > 0 && out_sym == expect_q[0], $sformatf("symbol %0d", n_out));
      if (expect_q.size() > 0) void'(expect_q.pop_front());
    end
  end

  task automatic gen(int n);
    sym_t fw [] = '{SYM_SEP, SYM_A, SYM_C, SYM_G, SYM_T, SYM_QMASK, SYM_DBMASK, SYM_CNT_RESET,
                    SYM_NOTIFY, SYM_START_Q, SYM_STOP_Q, SYM_QTERM, 4'b0111, 4'b1010};
    for (int i = 0; i < n; i++) begin
      int r = $urandom_range(0, 99);
      if (r < 3) begin
        repeat (3) prog.push_back(SYM_CORE_RESET);
        n_rst_exp++;
      end else if (r < 6) begin
        prog.push_back(SYM_LOAD_PARAM);
        for (int j = 0; j < 10; j++) prog.push_back(sym_t'($urandom));
      end else begin
        sym_t s = fw[$urandom_range(0, fw.size() - 1)];
        prog.push_back(s);
        expect_q.push_back(s);
      end
    end
  endtask

  task automatic feed();
    while (prog.size() % 16 != 0) begin prog.push_back(SYM_A); expect_q.push_back(SYM_A); end
    for (int w = 0; w < prog.size() / 16; w++) begin
      logic [63:0] word;
      for (int j = 0; j < 16; j++) word[j*4 +: 4] = prog[w*16 + j];
      in_data <= word;
      in_valid <= 1;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      if (gaps) begin
        int g = $urandom_range(0, 20);
        if (g > 0) begin in_valid <= 0; repeat (g) @(posedge clk); end
      end
    end
    in_valid <= 0;
    prog.delete();
  endtask

  // random backoff while gaps are on
  always @(posedge clk) backoff <= gaps && ($urandom_range(0, 9) < 3);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    gen(600);
    fork feed(); join
    repeat (40) @(posedge clk);
    chk(expect_q.size() == 0, "all symbols forwarded");
    chk(n_rst == n_rst_exp, $sformatf("core resets %0d/%0d", n_rst, n_rst_exp));
    // parameter load, checked value by value
    prog.push_back(SYM_LOAD_PARAM);
    exp_params = '{word_size: 8'd7, s_thresh: 8'd35, x_drop: 8'd12, miss_pen: 8'd2, match_rew: 8'd5};
    for (int b = 4; b >= 0; b--) begin
      logic [7:0] v;
      v = exp_params[b*8 +: 8];
      prog.push_back(v[3:0]);
      prog.push_back(v[7:4]);
    end
    gen(0);
    fork feed(); join
    repeat (40) @(posedge clk);
    chk(params == exp_params, $sformatf("loaded parameters %h exp %h", params, exp_params));
    // rate: 8 words of letters without gaps or backoff
    gaps = 0;
    @(posedge clk);
    begin
      int t0, t1, n0;
      for (int i = 0; i < 128; i++) begin prog.push_back(SYM_G); expect_q.push_back(SYM_G); end
      n0 = n_out;
      t0 = $time;
      fork feed(); join
      while (n_out - n0 < 128) @(posedge clk);
      t1 = $time;
      chk((t1 - t0) / 10 <= 128 + 4, $sformatf("rate: 128 symbols in %0d clocks", (t1 - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_net_rx_ctrl: a behavioural network receiver offers packets of random length (the last
// word flagged end-of-frame) on the 100 MHz side; the 60 MHz core side reads at random and
// pauses for long stretches so that the input buffer (shrunk to 16 words) fills. Checks:
// every accepted word comes out on the core side once and in order, nothing is accepted while
// the buffer is full, one next-packet request is queued per end-of-frame and the requests are
// popped in order, and the buffer is seen full at least once. With the core reading every
// clock a packet of 64 words crosses in about 64 core clocks.
module tb_net_rx_ctrl;
  logic clk = 0, core_clk = 0, rst = 1, core_rst = 1;
  always #5 clk = ~clk;              // 100 MHz
  always #8 core_clk = ~core_clk;     // about 60 MHz
  logic [63:0] rx_data = '0, core_data;
  logic rx_valid = 0, rx_eof = 0, rx_ack, ctrl_valid, ctrl_pop = 0, core_rd_en = 0, core_empty;
  int checks = 0, failures = 0;
  logic [63:0] sent [$];
  int n_eof = 0, n_req = 0, n_full = 0, n_words = 0;
  bit reading = 1, fast = 0;

  net_rx_ctrl #(.BUF_AW(4), .CTRL_DEPTH(16)) dut (.*);

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

  // network side: sample at the falling edge, change after the rising edge
  bit acc;
  always @(negedge clk) if (!rst) begin
    acc = rx_valid && rx_ack;
    if (acc) begin sent.push_back(rx_data); if (rx_eof) n_eof++; end
    if (rx_valid && !rx_ack && dut.buf_full) n_full++;
    if (rx_ack && dut.buf_full) chk(0, "accepted while full");
    if (ctrl_valid && ctrl_pop) begin
      n_req++;
      chk(n_req <= n_eof, "request only after an end of frame");
    end
  end
  always @(posedge clk) ctrl_pop <= ctrl_valid && ($urandom_range(0, 1) == 0);

  // core side
  always @(negedge core_clk) if (!core_rst) begin
    if (core_rd_en && !core_empty) begin
      chk(sent.size() > 0 && core_data == sent[0], "word order across the clock domains");
      if (sent.size() > 0) void'(sent.pop_front());
      n_words++;
    end
  end
  always @(posedge core_clk) core_rd_en <= reading && (fast || $urandom_range(0, 2) != 0);

  // the core pauses now and then for 300 network clocks: the buffer fills
  initial forever begin
    repeat (500) @(posedge clk);
    if (!fast) reading = 0;
    repeat (300) @(posedge clk);
    reading = 1;
  end

  task automatic packet(int n);
    @(posedge clk);          // stimulus changes just after a rising edge
    for (int i = 0; i < n; i++) begin
      rx_data <= {$urandom, $urandom};
      rx_eof <= (i == n - 1);
      rx_valid <= 1;
      @(negedge clk);
      while (!rx_ack) @(negedge clk);
      @(posedge clk);
    end
    rx_valid <= 0;
    rx_eof <= 0;
  endtask

  initial begin
    int npk;
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge core_clk) core_rst <= 0;
    npk = 0;
    for (int p = 0; p < 40; p++) begin
      packet($urandom_range(1, 40));
      npk++;
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    fast = 1;
    repeat (2000) @(posedge clk);
    chk(sent.size() == 0, "all words delivered");
    chk(n_eof == npk && n_req == npk, $sformatf("requests %0d, frames %0d", n_req, n_eof));
    chk(n_full > 0, "input buffer filled");
    // rate: 64 words with the core reading every clock
    begin
      int n0;
      realtime t0;
      n0 = n_words; t0 = $realtime;
      fork packet(64); join_none
      while (n_words - n0 < 64) @(posedge core_clk);
      chk(($realtime - t0) / 16.0 <= 64 + 12, $sformatf("64 words in %0.1f core clocks", ($realtime - t0) / 16.0));
    end
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_async_fifo: writer at 100 MHz, reader at 60 MHz, both random. Checks that every word
// arrives once and in order, that full and empty are both seen, and that nothing is
// written while full is reported.
module tb_async_fifo;
  localparam int W = 16, AW = 3;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #5 wclk = ~wclk;
  always #8 rclk = ~rclk;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, sent = 0, recv = 0;
  logic [W-1:0] model [$];

  async_fifo #(.W(W), .AW(AW)) dut (.*);

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    repeat (4) @(posedge wclk);
    wrst <= 0; rrst <= 0;
    while (sent < 2000) begin
      @(negedge wclk);
      wr_en = !full && ($urandom_range(0, 9) < ((sent / 300) % 2 ? 9 : 3));
      wr_data = W'(sent);
      if (full) n_full++;
      @(posedge wclk);
      if (wr_en) begin model.push_back(wr_data); sent++; end
      #1 wr_en = 0;
    end
  end

  // reader
  initial begin
    repeat (6) @(posedge rclk);
    while (recv < 2000) begin
      @(negedge rclk);
      rd_en = !empty && ($urandom_range(0, 9) < ((recv / 300) % 2 ? 3 : 9));
      if (empty) n_empty++;
      if (rd_en) begin
        checks++;
        if (model.size() == 0 || rd_data != model[0]) begin
          failures++;
          if (failures < 10) $display("FAIL got %h", rd_data);
        end
        if (model.size() > 0) void'(model.pop_front());
        recv++;
      end
      @(posedge rclk);
      #1 rd_en = 0;
    end
    checks += 2;
    if (n_full == 0) failures++;
    if (n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

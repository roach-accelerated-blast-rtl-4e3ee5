// tb_sync_fifo: random pushes and pops against a queue model; checks data order, the
// count, full/empty/afull flags and that the FIFO reaches full and empty.
module tb_sync_fifo;
  localparam int W = 12, DEPTH = 8, M = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0, full, afull, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.W(W), .DEPTH(DEPTH), .AFULL_MARGIN(M)) dut (.*);

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

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      chk(count == ($clog2(DEPTH)+1)'(model.size()), "count");
      chk(full == (model.size() == DEPTH), "full");
      chk(empty == (model.size() == 0), "empty");
      chk(afull == (model.size() >= DEPTH - M), "afull");
      if (model.size() > 0) chk(rd_data == model[0], "data");
      if (full) n_full++;
      if (empty) n_empty++;
      // bias phases toward filling and draining
      wr_en = ((i / 200) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      rd_en = ((i / 200) % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      if (full && !rd_en) wr_en = 0;
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_full == 0 || n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    bit do_w;
    do_w = wr_en && model.size() < DEPTH;
    if (rd_en && model.size() > 0) void'(model.pop_front());
    if (do_w) model.push_back(wr_data);
  end
endmodule

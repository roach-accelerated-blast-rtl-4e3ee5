// tb_ext_bram: random single-symbol writes and line reads against a model; checks that a
// write changes only its own lane and that reads return the line one clock later.
module tb_ext_bram;
  localparam int LW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [LW-1:0] waddr = '0, raddr = '0;
  logic [1:0] wlane = '0;
  logic [3:0] wdata = '0;
  logic [15:0] rdata;
  logic [15:0] model [2**LW];
  int checks = 0, failures = 0;

  ext_bram #(.LINES_W(LW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every lane of every line
    for (int a = 0; a < 2**LW; a++) begin
      model[a] = '0;
      for (int l = 0; l < 4; l++) begin
        @(negedge clk);
        we = 1; waddr = LW'(a); wlane = 2'(l); wdata = 4'($urandom);
        model[a][l*4 +: 4] = wdata;
      end
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [LW-1:0] ra;
      @(negedge clk);
      ra = LW'($urandom);
      raddr = ra;
      we = $urandom_range(0, 1);
      waddr = LW'($urandom); wlane = 2'($urandom); wdata = 4'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (rdata != model[ra]) begin
        failures++;
        if (failures < 10) $display("FAIL line %0d got %h exp %h", ra, rdata, model[ra]);
      end
      if (we) model[waddr][wlane*4 +: 4] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

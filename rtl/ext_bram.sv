// ext_bram: one extension-unit memory, four 4-bit symbols per 16-bit line.
//
// The write port stores one symbol into lane wlane of line waddr (the other three lanes of
// the line are kept), as the extension controller delivers symbols one at a time. The read
// port returns a whole line one clock after raddr is presented, like a block RAM; the reader
// picks the lane it needs. The database copies use all LINES_W address bits and wrap around
// simply because the writer's counter overflows the address, overwriting the oldest letters.
// Contents are not reset.
module ext_bram #(
  parameter int LINES_W = 11
) (
  input  logic               clk,
  input  logic               we,
  input  logic [LINES_W-1:0] waddr,
  input  logic [1:0]         wlane,
  input  logic [3:0]         wdata,
  input  logic [LINES_W-1:0] raddr,
  output logic [15:0]        rdata
);
  logic [15:0] mem [2**LINES_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr][wlane*4 +: 4] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

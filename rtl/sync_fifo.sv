// sync_fifo: single-clock show-ahead FIFO.
//
// Used as the input buffer of each local controller, the seed queue of each arbitrator and
// the alignment buffers of the aggregators. rd_data always shows the oldest entry while
// empty is low; rd_en pops it at the clock edge. wr_en is ignored when full and rd_en when
// empty. afull rises when no more than AFULL_MARGIN free entries remain, which gives a
// producer with a registered backoff path time to stop. DEPTH must be a power of two.
// Reset (synchronous, active high) empties the FIFO; the storage itself is not cleared.
module sync_fifo #(
  parameter int W            = 8,
  parameter int DEPTH        = 16,
  parameter int AFULL_MARGIN = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  output logic         afull,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign afull   = (count >= (AW+1)'(DEPTH - AFULL_MARGIN));
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // A write while full or a read while empty is a protocol error of the user.
  property p_no_overflow;
    @(posedge clk) disable iff (rst) !(wr_en && full && !rd_en);
  endproperty
  a_no_overflow: assert property (p_no_overflow) else $error("sync_fifo: write while full");
endmodule

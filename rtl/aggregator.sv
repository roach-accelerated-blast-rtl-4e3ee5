// aggregator: collects alignment records from several sources into one FIFO.
//
// Each source shows a record with a valid flag and holds it until acknowledged. Every clock
// the aggregator takes the lowest-numbered source that has a record, acknowledges it
// (src_ack, same clock) and writes the record into its FIFO, provided the FIFO is not full.
// The FIFO head is offered on out_valid/out_data and popped by out_ready.
// With LOCAL = 1 it is the aggregator of a detection region: its sources are the region's
// extension units, and once the local controller has seen "notify when done" (db_done) and
// nothing is left in the region (active low, no source valid), it writes one zero-length
// record, which marks this region as finished. The global aggregator (LOCAL = 0) merges the
// regions' FIFOs in the same way and passes zero-length records on.
// Following the source design: status-bit polling, notify-the-origin, FIFO, the local
// end-of-work logic and the zero-length marker. Own choices: fixed priority and FIFO depth.
module aggregator
  import blast_pkg::*;
#(
  parameter int N_SRC = 8,
  parameter bit LOCAL = 1'b1,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_SRC-1:0] src_valid,
  input  aln_t             src_data [N_SRC],
  output logic [N_SRC-1:0] src_ack,
  input  logic             db_done,
  input  logic             active,
  output logic             out_valid,
  output aln_t             out_data,
  input  logic             out_ready,
  output logic             finished
);
  logic full, empty, push, sent;
  aln_t din;

  always_comb begin
    src_ack = '0;
    din     = '0;
    push    = 1'b0;
    if (!full) begin
      for (int i = N_SRC-1; i >= 0; i--)
        if (src_valid[i]) begin
          src_ack = '0;
          src_ack[i] = 1'b1;
          din  = src_data[i];
          push = 1'b1;
        end
      if (LOCAL && !push && db_done && !active && !sent) begin
        push = 1'b1;
        din  = '0;          // zero-length record: region finished
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) sent <= 1'b0;
    else if (LOCAL && push && !(|src_valid)) sent <= 1'b1;
  end

  assign finished  = sent;
  assign out_valid = !empty;

  sync_fifo #(.W($bits(aln_t)), .DEPTH(DEPTH), .AFULL_MARGIN(1)) u_fifo (
    .clk, .rst, .wr_en(push), .wr_data(din), .full, .afull(),
    .rd_en(out_ready && !empty), .rd_data(out_data), .empty, .count());
endmodule

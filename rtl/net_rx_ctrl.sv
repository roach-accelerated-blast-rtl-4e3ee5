// net_rx_ctrl: "pull" network input control and the 32 kB input buffer.
//
// Runs on the 100 MHz network clock. Payload words (64 bit) are taken from the 10GbE core's
// receive FIFO (rx_valid/rx_ack) whenever the input buffer has room, and written into a
// dual-clock FIFO of 4096 x 64 bit whose read side (core_*) is in the 60 MHz core clock
// domain. When the last word of a UDP payload (rx_eof) is transferred, a next-packet request
// is queued in the control FIFO for the output control, which sends it to the host: the
// host sends a new packet only when asked, so packets arrive in order and a lost packet
// stalls the run. A full input buffer holds back the transfer and so delays the request,
// which throttles the host.
// Following the source design: 64-bit transfers, the 32 kB buffer crossing 100/60 MHz, next-
// packet requests only after the last word of a packet. Own choice: control FIFO depth.
module net_rx_ctrl #(
  parameter int BUF_AW    = 12,
  parameter int CTRL_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] rx_data,
  input  logic        rx_valid,
  input  logic        rx_eof,
  output logic        rx_ack,
  output logic        ctrl_valid,
  input  logic        ctrl_pop,
  input  logic        core_clk,
  input  logic        core_rst,
  input  logic        core_rd_en,
  output logic [63:0] core_data,
  output logic        core_empty
);
  logic buf_full, ctrl_full, ctrl_empty, xfer;
  logic ctrl_bit;

  assign xfer   = rx_valid && !buf_full && !(rx_eof && ctrl_full);
  assign rx_ack = xfer;

  async_fifo #(.W(64), .AW(BUF_AW)) u_inbuf (
    .wclk(clk), .wrst(rst), .wr_en(xfer), .wr_data(rx_data), .full(buf_full),
    .rclk(core_clk), .rrst(core_rst), .rd_en(core_rd_en), .rd_data(core_data),
    .empty(core_empty));

  sync_fifo #(.W(1), .DEPTH(CTRL_DEPTH), .AFULL_MARGIN(1)) u_ctrl (
    .clk, .rst, .wr_en(xfer && rx_eof), .wr_data(1'b1), .full(ctrl_full), .afull(),
    .rd_en(ctrl_pop), .rd_data(ctrl_bit), .empty(ctrl_empty), .count());

  assign ctrl_valid = !ctrl_empty && ctrl_bit;
endmodule

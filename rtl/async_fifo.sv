// async_fifo: dual-clock FIFO for crossing between the 100 MHz network domain and the
// 60 MHz accelerator domain.
//
// The write side and read side each keep a binary pointer and its Gray-coded copy; the Gray
// pointer of the other side is brought across with two flip-flops. full and empty are
// therefore pessimistic by the synchroniser latency, never optimistic. Show-ahead read:
// rd_data shows the oldest entry while empty is low and rd_en pops it. Each side has its own
// synchronous, active-high reset; both must be asserted together. The default depth,
// 4096 x 64 bit, is the 32 kB network input buffer of the design.
module async_fifo #(
  parameter int W  = 64,
  parameter int AW = 12
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  logic [W-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in the read domain
  logic [AW:0] wbin_nxt, rbin_nxt, wgray_nxt, rgray_nxt;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign wbin_nxt  = wbin + (AW+1)'(wr_en && !full);
  assign wgray_nxt = bin2gray(wbin_nxt);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; full <= 1'b0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= wgray_nxt;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      full     <= (wgray_nxt == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
    end
  end

  // read side
  assign rbin_nxt  = rbin + (AW+1)'(rd_en && !empty);
  assign rgray_nxt = bin2gray(rbin_nxt);
  assign rd_data   = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0; empty <= 1'b1;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= rgray_nxt;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      empty    <= (rgray_nxt == wgray_r2);
    end
  end
endmodule

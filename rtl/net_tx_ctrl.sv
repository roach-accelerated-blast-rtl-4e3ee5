// net_tx_ctrl: network output control.
//
// Runs on the 100 MHz network clock. Alignment records from the core arrive through a small
// dual-clock FIFO (written in the 60 MHz core domain with aln_valid/aln_ready). Every record
// and every control message is sent as two 64-bit lines into the 10GbE core's transmit FIFO
// (tx_valid/tx_ready, tx_eof ends the UDP packet):
//   line 1: [63:32] database start of the alignment, [31:0] subject start
//   line 2: [57] end of work, [56] next packet, [47:32] raw score,
//           [27:16] query start (letter index), [11:0] alignment length
// Control (queued next-packet requests) has priority over data. A control record always
// ends the packet, so requests reach the host at once; data records fill the packet and the
// packet is ended after PKT_RECORDS records. Zero-length records are not sent: they are
// counted, and when as many have arrived as there are detection regions, an end-of-work
// record ends the packet and work_done rises.
// Following the source design: two lines per record, control/data interleaving, end of frame
// on control and on full packets, zero-length counting for end of work. Own choices: the
// exact bit positions in the lines and the packet size (512 records of 16 bytes, 8 kB,
// which fits a jumbo frame).
module net_tx_ctrl
  import blast_pkg::*;
#(
  parameter int N_REGIONS   = 3,
  parameter int PKT_RECORDS = 512,
  parameter int ALN_AW      = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        core_clk,
  input  logic        core_rst,
  input  logic        aln_valid,
  input  aln_t        aln_data,
  output logic        aln_ready,
  input  logic        ctrl_valid,
  output logic        ctrl_pop,
  output logic [63:0] tx_data,
  output logic        tx_valid,
  output logic        tx_eof,
  input  logic        tx_ready,
  output logic        work_done
);
  typedef enum logic [2:0] {T_IDLE, T_D1, T_D2, T_C1, T_C2, T_E1, T_E2} tstate_t;
  tstate_t st;

  logic afull_w, aempty, apop;
  aln_t a;
  logic [$clog2(PKT_RECORDS+1)-1:0] recs;
  logic [7:0] zcount;

  async_fifo #(.W($bits(aln_t)), .AW(ALN_AW)) u_alnbuf (
    .wclk(core_clk), .wrst(core_rst), .wr_en(aln_valid && !afull_w), .wr_data(aln_data),
    .full(afull_w), .rclk(clk), .rrst(rst), .rd_en(apop), .rd_data(a), .empty(aempty));
  assign aln_ready = !afull_w;

  function automatic logic [63:0] line2(logic e, logic n, aln_t r);
    return {6'b0, e, n, 8'b0, r.score, 4'b0, r.q_pos, 4'b0, r.len};
  endfunction

  always_comb begin
    tx_valid = 1'b0;
    tx_eof   = 1'b0;
    tx_data  = '0;
    apop     = 1'b0;
    ctrl_pop = 1'b0;
    unique case (st)
      T_D1: begin tx_valid = 1'b1; tx_data = {a.db_pos, a.subj_pos}; end
      T_D2: begin
        tx_valid = 1'b1;
        tx_data  = line2(1'b0, 1'b0, a);
        tx_eof   = (32'(recs) == PKT_RECORDS - 1);
        apop     = tx_ready;
      end
      T_C1, T_E1: tx_valid = 1'b1;
      T_C2: begin
        tx_valid = 1'b1; tx_eof = 1'b1; tx_data = line2(1'b0, 1'b1, '0);
        ctrl_pop = tx_ready;
      end
      T_E2: begin tx_valid = 1'b1; tx_eof = 1'b1; tx_data = line2(1'b1, 1'b0, '0); end
      default: begin
        // idle: drop zero-length records, they only count finished regions
        if (!ctrl_valid && !aempty && a.len == '0) apop = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= T_IDLE;
      recs      <= '0;
      zcount    <= '0;
      work_done <= 1'b0;
    end else begin
      unique case (st)
        T_IDLE: begin
          if (ctrl_valid) st <= T_C1;
          else if (!aempty) begin
            if (a.len == '0) begin
              if (32'(zcount) == N_REGIONS - 1) begin
                zcount <= '0;
                st     <= T_E1;
              end else zcount <= zcount + 1'b1;
            end else st <= T_D1;
          end
        end
        T_D1: if (tx_ready) st <= T_D2;
        T_D2: if (tx_ready) begin
          st   <= T_IDLE;
          recs <= (32'(recs) == PKT_RECORDS - 1) ? '0 : recs + 1'b1;
        end
        T_C1: if (tx_ready) st <= T_C2;
        T_C2: if (tx_ready) begin st <= T_IDLE; recs <= '0; end
        T_E1: if (tx_ready) st <= T_E2;
        T_E2: if (tx_ready) begin st <= T_IDLE; recs <= '0; work_done <= 1'b1; end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule

// blast_decoder: entry point of the accelerator core.
//
// It reads 64-bit words from the network input buffer and cuts each into sixteen 4-bit
// symbols, least significant nibble first, one symbol per clock. Symbols are then decoded:
//   * BLAST core reset (1011): three in a row raise core_rst for one clock, which puts every
//     block of the core, and this decoder's parameters, back into their reset state.
//   * Load parameters (1100): the next ten symbols are five 8-bit parameters, low nibble
//     first, in the order word size, S threshold, X-drop, mismatch penalty, match reward.
//   * everything else (letters, separators, counter reset, notify-when-done, start/stop
//     query, query terminator) is forwarded on out_sym/out_valid to the detection regions and
//     the extension controller, which act on it.
// backoff (any detection region input buffer nearly full) freezes symbol production; the
// symbol in hand is held until backoff falls. in_ready pops one input word; a new word is
// taken as soon as the last nibble of the previous one has been consumed, so the decoder
// sustains one symbol per clock.
// Following the source design: 64-bit input, 4-bit symbols, the instruction meanings and
// the parameter order. Own choices: nibble order within a word, reset values of the
// parameters (PARAMS_DEFAULT) and the one-clock core reset pulse.
module blast_decoder
  import blast_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        backoff,
  output sym_t        out_sym,
  output logic        out_valid,
  output logic        core_rst,
  output params_t     params
);
  logic [63:0] word;
  logic [4:0]  nib_left;     // symbols still to consume from word
  logic [3:0]  nib_idx;
  logic [3:0]  param_cnt;    // symbols of the parameter block still to come
  logic [1:0]  reset_run;
  logic [7:0]  param_lo;
  logic        have, consume;
  sym_t        sym;

  assign have     = (nib_left != 0);
  assign sym      = word[nib_idx*4 +: 4];
  assign consume  = have && !backoff;
  assign in_ready = in_valid && (!have || (consume && nib_left == 5'd1));

  always_ff @(posedge clk) begin
    if (rst) begin
      nib_left  <= '0;
      nib_idx   <= '0;
      word      <= '0;
      param_cnt <= '0;
      reset_run <= '0;
      param_lo  <= '0;
      params    <= PARAMS_DEFAULT;
      out_valid <= 1'b0;
      out_sym   <= SYM_SEP;
      core_rst  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      core_rst  <= 1'b0;
      if (in_ready) begin
        word     <= in_data;
        nib_left <= 5'd16;
        nib_idx  <= '0;
      end else if (consume) begin
        nib_left <= nib_left - 1'b1;
        nib_idx  <= nib_idx + 1'b1;
      end
      if (consume) begin
        if (param_cnt != 0) begin
          // parameter block: low nibble then high nibble of each byte
          param_cnt <= param_cnt - 1'b1;
          reset_run <= '0;
          if (param_cnt[0] == 1'b0) param_lo[3:0] <= sym;
          else begin
            unique case (param_cnt)
              4'd9: params.word_size <= {sym, param_lo[3:0]};
              4'd7: params.s_thresh  <= {sym, param_lo[3:0]};
              4'd5: params.x_drop    <= {sym, param_lo[3:0]};
              4'd3: params.miss_pen  <= {sym, param_lo[3:0]};
              4'd1: params.match_rew <= {sym, param_lo[3:0]};
              default: ;
            endcase
          end
        end else if (sym == SYM_CORE_RESET) begin
          if (reset_run == 2'd2) begin
            core_rst  <= 1'b1;
            reset_run <= '0;
            params    <= PARAMS_DEFAULT;
          end else begin
            reset_run <= reset_run + 1'b1;
          end
        end else begin
          reset_run <= '0;
          if (sym == SYM_LOAD_PARAM) param_cnt <= 4'd10;
          else begin
            out_sym   <= sym;
            out_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule

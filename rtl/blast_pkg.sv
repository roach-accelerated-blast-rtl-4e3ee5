// blast_pkg: types and constants shared by the BLASTN seed-and-extend accelerator.
//
// The accelerator works on a 4-bit symbol stream in which data and instructions share one
// code space (the instruction set below). Database letters, query letters and control words
// all travel the same datapath. This package holds those codes, the run parameters loaded by
// the "load parameters" instruction, the seed record produced by seed detection and the
// 104-bit alignment record produced by extension.
//
// Following the source design: the 16 symbol codes and their meaning, the five 8-bit run
// parameters and their load order, the 31-bit database letter counter, the 104-bit alignment
// output. Choices of this implementation: the split of the 104 bits into fields, the 12-bit
// query index, the 8-bit seed length and the default parameter values used after reset.
package blast_pkg;

  typedef logic [3:0] sym_t;

  // Instruction set
  localparam sym_t SYM_SEP        = 4'b0000; // database subject separator
  localparam sym_t SYM_A          = 4'b0001;
  localparam sym_t SYM_C          = 4'b0010;
  localparam sym_t SYM_G          = 4'b0011;
  localparam sym_t SYM_T          = 4'b0100; // thymine / uracil
  localparam sym_t SYM_QMASK      = 4'b0101; // query mask / degenerate code
  localparam sym_t SYM_DBMASK     = 4'b0110; // database mask / degenerate code
  localparam sym_t SYM_CNT_RESET  = 4'b1000; // reset database position counter
  localparam sym_t SYM_NOTIFY     = 4'b1001; // notify when done
  localparam sym_t SYM_CORE_RESET = 4'b1011; // three in a row reset the core
  localparam sym_t SYM_LOAD_PARAM = 4'b1100; // next 10 symbols are the run parameters
  localparam sym_t SYM_START_Q    = 4'b1101; // start loading query
  localparam sym_t SYM_STOP_Q     = 4'b1110; // stop loading query and reset counters
  localparam sym_t SYM_QTERM      = 4'b1111; // query terminator / query separator

  localparam int SYM_W    = 4;
  localparam int DB_CNT_W = 31;   // database letters counted by the extension controller
  localparam int QPOS_W   = 12;   // query element index
  localparam int LEN_W    = 8;    // seed length as reported by the detection array
  localparam int DLY_W    = 7;    // seed delay counter, saturates at 127
  localparam int SCORE_W  = 16;
  localparam int ALN_W    = 104;

  // Run parameters, loaded low nibble first in this order.
  typedef struct packed {
    logic [7:0] word_size;
    logic [7:0] s_thresh;
    logic [7:0] x_drop;
    logic [7:0] miss_pen;
    logic [7:0] match_rew;
  } params_t;

  localparam params_t PARAMS_DEFAULT = '{word_size: 8'd11, s_thresh: 8'd20, x_drop: 8'd20,
                                         miss_pen: 8'd3, match_rew: 8'd1};

  // Seed handed from the arbitrator to an extension unit. Positions are absolute:
  // q_pos is the query element index (element 0 holds the query terminator),
  // db_pos the index of the seed's first database letter since the last counter reset,
  // subj_pos the index of the first letter of the database subject holding the seed.
  typedef struct packed {
    logic [QPOS_W-1:0]   q_pos;
    logic [31:0]         db_pos;
    logic [31:0]         subj_pos;
    logic [LEN_W-1:0]    len;
  } seed_t;

  // Alignment record, 104 bits. q_pos is the query letter index (0 = first query letter).
  // A record with len == 0 marks that one detection region has finished its work.
  typedef struct packed {
    logic [31:0]               db_pos;
    logic [31:0]               subj_pos;
    logic [QPOS_W-1:0]         q_pos;
    logic [11:0]               len;
    logic signed [SCORE_W-1:0] score;
  } aln_t;

  // Broadcast write into every extension unit's memories: one symbol per write,
  // four symbols per memory line.
  typedef struct packed {
    logic       q_we;
    logic       db_we;
    logic [10:0] line;
    logic [1:0]  lane;
    sym_t        data;
  } mem_wr_t;

  function automatic logic is_base(sym_t s);
    return (s >= SYM_A) && (s <= SYM_T);
  endfunction

  // Two symbols match only when they are the same nucleotide; masks, separators and
  // terminators never match anything.
  function automatic logic letters_match(sym_t a, sym_t b);
    return is_base(a) && (a == b);
  endfunction

endpackage

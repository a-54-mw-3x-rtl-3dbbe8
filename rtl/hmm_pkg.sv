// hmm_pkg: sizes, types and record layouts shared by the speech recognition
// processor. The model sizes follow the published design: 2,000 HMM states,
// 16 Gaussian mixtures of 25 dimensions, 20 frames computed in parallel by
// the GMM core, 8 Viterbi transition paths and a beam width of 3,000 nodes.
// Word widths, fixed-point formats and the layout of the external data base
// are this design's own choices; they are described next to each type.
package hmm_pkg;

  // ---- acoustic model / GMM -------------------------------------------------
  localparam int unsigned FEAT_W  = 16;  // MFCC component and Gaussian mean, signed Q8.8
  localparam int unsigned IVAR_W  = 16;  // 1/sigma^2, unsigned, scaled by 2^16 (Q0.16 of the term)
  localparam int unsigned GSCORE_W = 16; // log b_s(X_t), signed, saturated
  localparam int unsigned GACC_W  = 40;  // Mahalanobis accumulator

  // ---- Viterbi search -------------------------------------------------------
  localparam int unsigned NODE_W  = 20;  // HMM node (lexicon state) index
  localparam int unsigned WORD_W  = 16;  // word index (60,001 unigrams fit)
  localparam int unsigned VSCORE_W = 24; // accumulated log probability, signed, frame-normalised
  localparam int unsigned TOKEN_W = 20;  // trellis record index (back pointer)
  localparam int unsigned COST_W  = 12;  // n-gram cost field (-log p, unsigned)
  localparam int unsigned TCOST_W = 8;   // HMM transition cost (-log a_ij, unsigned)
  localparam logic [TOKEN_W-1:0] NO_TOKEN = '1;
  localparam logic [WORD_W-1:0]  NO_WORD  = '1;

  localparam logic signed [VSCORE_W-1:0] VSCORE_MIN = {1'b1, {(VSCORE_W-1){1'b0}}};
  localparam logic signed [VSCORE_W-1:0] VSCORE_MAX = {1'b0, {(VSCORE_W-1){1'b1}}};

  // Bus word of the 32-bit GMM and Viterbi buses.
  localparam int unsigned BUS_W  = 32;
  localparam int unsigned ADDR_W = 32;

  // One request on a 32-bit bus. Reads are answered in order, one data word
  // per read; writes get no answer.
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [BUS_W-1:0]  wdata;
  } bus_req_t;

  // One active node of the Viterbi workspace.
  typedef struct packed {
    logic [NODE_W-1:0]          node;   // lexicon node
    logic signed [VSCORE_W-1:0] score;  // delta_t, relative to the previous frame's best
    logic [WORD_W-1:0]          pred;   // word before the current one (trigram history)
    logic [TOKEN_W-1:0]         token;  // trellis record of the last word end
  } anode_t;

  // One candidate transition leaving a source node, as issued to a path.
  typedef struct packed {
    logic [NODE_W-1:0]          dest;
    logic signed [VSCORE_W-1:0] base;   // source score
    logic signed [VSCORE_W-1:0] add;    // log a_ij + log b_j  or  log p(w|v)
    logic [WORD_W-1:0]          pred;
    logic [TOKEN_W-1:0]         token;
  } cand_t;

  // A candidate that survived the beam comparison.
  typedef struct packed {
    logic [NODE_W-1:0]          dest;
    logic signed [VSCORE_W-1:0] score;
    logic [WORD_W-1:0]          pred;
    logic [TOKEN_W-1:0]         token;
  } surv_t;

  // Lexicon node record, two 32-bit words at lex_base + 2*node:
  //   word 0: [31] word end, [30:20] GMM state, [19:12] -log a_ii, [11:4] -log a_i,i+1
  //   word 1: [15:0] word index of the word the node belongs to
  // The node after node n in the same word is node n+1.
  typedef struct packed {
    logic                word_end;
    logic [10:0]         gmm_state;
    logic [TCOST_W-1:0]  self_cost;
    logic [TCOST_W-1:0]  next_cost;
    logic [3:0]          rsv;
  } lex_word0_t;

  // N-gram list header, two words (bigram at bg_base + 2v, trigram index at
  //   tg_base + 2v; both bases even): {[31:0] start address of the list},
  //   {[19:0] number of entries}
  // N-gram entry: [31:12] start node of the successor word, [11:0] -log p
  // Trigram index entry, two words: {[31:16] predecessor word, [15:0] count},
  //   {[31:0] start address of the trigram list for (v, predecessor)}
  localparam int unsigned HDR_CNT_W = 20;

  // Output (trellis) record, 64 bits, written as two bus words (low first).
  typedef enum logic [1:0] { REC_WORD_END = 2'd0, REC_FINAL = 2'd1 } rec_kind_e;
  typedef struct packed {
    rec_kind_e                  kind;
    logic [13:0]                frame;  // frame index since the utterance began
    logic [WORD_W-1:0]          word;   // word that ended (or best word at the end)
    logic [11:0]                score_hi; // REC_FINAL: upper bits of the best score
    logic [TOKEN_W-1:0]         back;   // trellis record of the previous word end
  } trec_t;

endpackage

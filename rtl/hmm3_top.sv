// hmm3_top: continuous speech recognition processor. A GMM core computes
// the output probabilities of all HMM states for a batch of 20 frames while
// a Viterbi core searches the previous batch; the two meet in a pair of GMM
// result RAMs that swap after every batch. Both cores fetch their models
// from an external data base through memory_if's 64-bit link.
//
// Operation: start begins an utterance of n_batches batches, the last one
// holding last_frames frames. Batch b's MFCC vectors are read from
// mfcc_base + b*(FRAMES*DIM/2). Step k of the batch sequencer starts the GMM
// on batch k (k < n_batches) and the Viterbi search on batch k-1 (k >= 1),
// waits for both, and swaps the result RAMs; n_batches+1 steps in all. The
// Viterbi core writes trellis records from trellis_base and, after the last
// batch, a final record with the best hypothesis. done pulses at the end.
// With test_mode set, start runs the GMM on batch 0 only and then streams its
// results out through the shared output pins to gmm_test_base.
// The GMM/Viterbi pipeline and the blocks are published; the sequencer and
// its handshake are this design's.
module hmm3_top
  import hmm_pkg::*;
#(
  parameter int unsigned FRAMES      = 20,
  parameter int unsigned STATES      = 2000,
  parameter int unsigned MIX         = 16,
  parameter int unsigned DIM         = 25,
  parameter int unsigned N_PATHS     = 8,
  parameter int unsigned SLOTS       = 4096,
  parameter int unsigned MAP_ENTRIES = 32768,
  parameter int unsigned NG_LINES    = 1024,
  parameter int unsigned LEX_LINES   = 1024,
  parameter int unsigned BEAM        = 3000,
  parameter int unsigned OB_DEPTH    = 32,
  parameter int unsigned INIT_MARGIN = 4096,
  localparam int unsigned S_W  = $clog2(STATES),
  localparam int unsigned F_W  = $clog2(FRAMES),
  localparam int unsigned NF_W = $clog2(FRAMES+1),
  localparam int unsigned MWORDS = (FRAMES*DIM+1)/2
)(
  input  logic                 clk,
  input  logic                 rst_n,
  // control
  input  logic                 start,
  input  logic                 test_mode,
  input  logic                 trigram_en,
  input  logic [15:0]          n_batches,
  input  logic [NF_W-1:0]      last_frames,
  input  logic [NODE_W-1:0]    init_node,
  input  logic [ADDR_W-1:0]    mfcc_base,
  input  logic [ADDR_W-1:0]    param_base,
  input  logic [ADDR_W-1:0]    lex_base,
  input  logic [ADDR_W-1:0]    bg_base,
  input  logic [ADDR_W-1:0]    tg_base,
  input  logic [ADDR_W-1:0]    trellis_base,
  input  logic [ADDR_W-1:0]    gmm_test_base,
  output logic                 busy,
  output logic                 done,
  // external 64-bit link
  output logic [1:0]           ext_req_valid,
  input  logic [1:0]           ext_req_ready,
  output logic [ADDR_W-1:0]    ext_addr [2],
  output logic                 ext_we,
  output logic [BUS_W-1:0]     ext_wdata,
  input  logic [1:0]           ext_rsp_valid,
  input  logic [2*BUS_W-1:0]   ext_rsp_data
);

  // ---------------- GMM core and result buffer ----------------
  logic g_start, g_busy, g_done, g_req_valid, g_req_ready, g_rsp_valid;
  bus_req_t g_req;
  logic [BUS_W-1:0] g_rsp_data;
  logic res_we;
  logic [S_W-1:0] res_addr, t_state;
  logic [FRAMES*GSCORE_W-1:0] res_data, t_row;
  logic gmm_bank;
  logic [ADDR_W-1:0] g_mfcc;

  gmm_core #(.FRAMES(FRAMES), .STATES(STATES), .MIX(MIX), .DIM(DIM)) u_gmm (
    .clk, .rst_n, .start(g_start), .mfcc_base(g_mfcc), .param_base, .busy(g_busy), .done(g_done),
    .req_valid(g_req_valid), .req_ready(g_req_ready), .req(g_req),
    .rsp_valid(g_rsp_valid), .rsp_data(g_rsp_data), .res_we, .res_addr, .res_data);

  logic [10:0] v_state;
  logic [F_W-1:0] v_frame;
  logic signed [GSCORE_W-1:0] v_score;

  gmm_result_buffer #(.STATES(STATES), .FRAMES(FRAMES)) u_res (
    .clk, .gmm_bank, .we(res_we), .waddr(res_addr), .wdata(res_data),
    .v_state(S_W'(v_state)), .v_frame, .v_score, .t_state, .t_row);

  // ---------------- Viterbi core ----------------
  logic v_start, v_first, v_last, v_busy, v_done, v_req_valid, v_req_ready, v_rsp_valid;
  bus_req_t v_req;
  logic [BUS_W-1:0] v_rsp_data;
  logic [NF_W-1:0] v_nframes;

  viterbi_core #(.N_PATHS(N_PATHS), .FRAMES(FRAMES), .SLOTS(SLOTS), .MAP_ENTRIES(MAP_ENTRIES),
    .NG_LINES(NG_LINES), .LEX_LINES(LEX_LINES), .BEAM(BEAM), .OB_DEPTH(OB_DEPTH),
    .INIT_MARGIN(INIT_MARGIN)) u_vit (
    .clk, .rst_n, .start(v_start), .first(v_first), .last(v_last), .n_frames(v_nframes),
    .trigram_en, .init_node, .lex_base, .bg_base, .tg_base, .trellis_base,
    .busy(v_busy), .done(v_done), .gmm_state(v_state), .gmm_frame(v_frame), .gmm_score(v_score),
    .req_valid(v_req_valid), .req_ready(v_req_ready), .req(v_req),
    .rsp_valid(v_rsp_valid), .rsp_data(v_rsp_data));

  // ---------------- memory interface ----------------
  logic ro_start, ro_done;

  memory_if #(.STATES(STATES), .FRAMES(FRAMES)) u_mif (
    .clk, .rst_n, .test_mode,
    .g_req_valid, .g_req_ready, .g_req, .g_rsp_valid, .g_rsp_data,
    .v_req_valid, .v_req_ready, .v_req, .v_rsp_valid, .v_rsp_data,
    .readout_start(ro_start), .t_base(gmm_test_base), .t_state, .t_row, .readout_done(ro_done),
    .ext_req_valid, .ext_req_ready, .ext_addr, .ext_we, .ext_wdata, .ext_rsp_valid, .ext_rsp_data);

  // ---------------- batch sequencer ----------------
  typedef enum logic [2:0] { Q_IDLE, Q_STEP, Q_WAIT, Q_TEST_START, Q_TEST_GMM, Q_TEST_RO } qstate_e;
  qstate_e qs;
  logic [15:0] k, nb;
  logic        g_pend, v_pend;

  assign g_mfcc = mfcc_base + ADDR_W'(k) * ADDR_W'(MWORDS);
  assign g_start = (qs == Q_STEP && k < nb) || (qs == Q_TEST_START);
  assign v_start = (qs == Q_STEP) && (k >= 16'd1);
  assign v_first = (k == 16'd1);
  assign v_last  = (k == nb);
  assign v_nframes = (k == nb) ? last_frames : NF_W'(FRAMES);
  assign ro_start = (qs == Q_TEST_GMM) && g_done;
  assign busy = (qs != Q_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qs <= Q_IDLE; k <= '0; nb <= '0; g_pend <= 1'b0; v_pend <= 1'b0; gmm_bank <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (qs)
        Q_IDLE: if (start) begin
          k <= '0; nb <= n_batches;
          qs <= test_mode ? Q_TEST_START : Q_STEP;
        end
        Q_STEP: begin
          g_pend <= (k < nb);
          v_pend <= (k >= 16'd1);
          qs <= Q_WAIT;
        end
        Q_WAIT: begin
          if (g_done) g_pend <= 1'b0;
          if (v_done) v_pend <= 1'b0;
          if ((!g_pend || g_done) && (!v_pend || v_done)) begin
            gmm_bank <= ~gmm_bank;
            if (k == nb) begin done <= 1'b1; qs <= Q_IDLE; end
            else begin k <= k + 1'b1; qs <= Q_STEP; end
          end
        end
        Q_TEST_START: qs <= Q_TEST_GMM;
        Q_TEST_GMM: if (g_done) qs <= Q_TEST_RO;
        Q_TEST_RO:  if (ro_done) begin done <= 1'b1; qs <= Q_IDLE; end
        default: qs <= Q_IDLE;
      endcase
    end
  end

  // the search of a batch only starts once its GMM results are complete
  assert property (@(posedge clk) disable iff (!rst_n) v_start |-> !g_busy);

endmodule

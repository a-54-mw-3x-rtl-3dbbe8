// viterbi_core: frame-synchronous Viterbi beam search over an HMM lexicon
// with a bigram or simplified trigram language model.
//
// Per frame, every node that survived the previous frame is read from the
// workspace, its score normalised by the previous frame's best score, and
// expanded:
//   inside a word (Eq. 2): to itself (log a_ii) and to the next node
//     (log a_i,i+1), each plus log b_j(x_t) of the destination read from the
//     GMM result buffer; both candidates go to paths 0 and 1 in one group;
//   at a word end (Eq. 3), besides the self loop: a trellis record of the
//     word end is written, then the successor list of the word is read from
//     the N-gram cache one 8-entry line at a time and each line is handed to
//     the 8 transition paths at once, adding log p(w|v) to the score.
//   With trigram_en the word end first looks in the trigram index of the
//     word for the best predecessor recorded in the node (the word before the
//     current one). If a trigram list for that pair exists it is used instead
//     of the bigram list; otherwise the bigram list is used. Only the best
//     predecessor is considered, as in the simplified trigram search.
// Candidates below the beam threshold (best score so far in the frame minus
// the margin of beam_threshold) are pruned in the paths; survivors are merged
// into the current workspace by trellis_token_write. After the last node,
// the margin is updated for the next frame.
//
// A batch is n_frames frames (at most FRAMES) whose GMM scores sit in the
// result-buffer bank that the Viterbi side reads. start begins a batch;
// first places init_node as the only active node, last emits after the batch
// a REC_FINAL record with the best node's word, score and trellis token, and
// waits until the output buffer has drained. done pulses at the end of the
// batch.
//
// Data base layout (word addresses on the Viterbi bus): lexicon at lex_base,
// two-word bigram headers at bg_base, trigram headers at tg_base, both
// bases even (see hmm_pkg);
// trellis records are written from trellis_base. Cache misses stall the
// controller until the line arrives from the external data base.
// The flow, the 8 paths, the caches and the simplified trigram are published;
// the controller's schedule, the record formats and the normalisation are
// this design's own.
module viterbi_core
  import hmm_pkg::*;
#(
  parameter int unsigned N_PATHS     = 8,
  parameter int unsigned FRAMES      = 20,
  parameter int unsigned SLOTS       = 4096,
  parameter int unsigned MAP_ENTRIES = 32768,
  parameter int unsigned NG_LINES    = 1024,
  parameter int unsigned LEX_LINES   = 1024,
  parameter int unsigned BEAM        = 3000,
  parameter int unsigned OB_DEPTH    = 32,
  parameter int unsigned INIT_MARGIN = 4096,
  localparam int unsigned SL_W  = $clog2(SLOTS),
  localparam int unsigned CNT_W = SL_W + 1,
  localparam int unsigned F_W   = $clog2(FRAMES),
  localparam int unsigned NF_W  = $clog2(FRAMES+1),
  localparam int unsigned LW    = 8
)(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        first,
  input  logic                        last,
  input  logic [NF_W-1:0]             n_frames,
  input  logic                        trigram_en,
  input  logic [NODE_W-1:0]           init_node,
  input  logic [ADDR_W-1:0]           lex_base,
  input  logic [ADDR_W-1:0]           bg_base,
  input  logic [ADDR_W-1:0]           tg_base,
  input  logic [ADDR_W-1:0]           trellis_base,
  output logic                        busy,
  output logic                        done,
  // GMM result buffer read port
  output logic [10:0]                 gmm_state,
  output logic [F_W-1:0]              gmm_frame,
  input  logic signed [GSCORE_W-1:0]  gmm_score,
  // Viterbi bus
  output logic                        req_valid,
  input  logic                        req_ready,
  output bus_req_t                    req,
  input  logic                        rsp_valid,
  input  logic [BUS_W-1:0]            rsp_data
);

  typedef enum logic [4:0] {
    V_IDLE, V_FSTART, V_SRC, V_LEX0, V_LEX1, V_WE_SELF, V_TREL, V_THDR, V_TIDX,
    V_BHDR, V_LIST, V_DRAIN, V_THR, V_FIN_LEX, V_FIN_PUSH, V_FLUSH
  } vstate_e;
  vstate_e st;

  // ---------------- registers of the controller ----------------
  logic [CNT_W-1:0]  i;
  anode_t            rec;
  logic [WORD_W-1:0] word;
  logic [TCOST_W-1:0] next_cost;   // -log a_i,i+1 of the source node
  cand_t             self_c;
  logic              last_r;
  logic [NF_W-1:0]   nfr;
  logic [F_W-1:0]    fi;
  logic [13:0]       gframe;
  logic [TOKEN_W-1:0] new_tok;
  logic [ADDR_W-1:0] list_a, list_start, list_end, t_start;
  logic [HDR_CNT_W-1:0] t_cnt, tk;
  logic [WORD_W-1:0] fin_word;       // word of the best node, for the final record

  // ---------------- sub-blocks ----------------
  logic        cur_bank, wbusy, grp, frame_start, init_p;
  anode_t      r_rec, w_rdata, w_rec;
  logic [SL_W-1:0] w_addr, w_waddr, map_slot, map_wslot;
  logic        w_en, map_we;
  logic [NODE_W-1:0] map_node;
  logic [CNT_W-1:0]  count, prev_count;
  logic signed [VSCORE_W-1:0] best, prev_best, thr;
  anode_t      best_rec;
  logic        ev_merge, ev_new, ev_overflow;
  logic        tr_valid, tr_ready, ob_push, ob_full, ob_empty;
  trec_t       tr_rec, ob_rec;
  logic [TOKEN_W-1:0] tr_token;
  logic        bt_start, bt_busy, bt_done;
  logic [VSCORE_W-2:0] margin;

  logic [N_PATHS-1:0] cvalid, pass, pruned;
  cand_t       cands [N_PATHS];
  surv_t       survs [N_PATHS];

  active_node_workspace #(.SLOTS(SLOTS)) u_ws (
    .clk, .cur_bank, .r_addr(SL_W'(i)), .r_rec, .w_addr, .w_rdata, .w_waddr,
    .w_en, .w_rec);

  active_node_map #(.ENTRIES(MAP_ENTRIES), .SLOTS(SLOTS)) u_map (
    .clk, .node(map_node), .slot(map_slot), .we(map_we), .wslot(map_wslot));

  for (genvar p = 0; p < N_PATHS; p++) begin : g_path
    viterbi_path u_path (.clk, .rst_n, .load(grp), .valid(cvalid[p]), .cand(cands[p]),
      .thr, .pass(pass[p]), .pruned(pruned[p]), .surv(survs[p]));
  end

  logic grp_d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) grp_d <= 1'b0; else grp_d <= grp;

  trellis_token_write #(.N_PATHS(N_PATHS), .SLOTS(SLOTS)) u_wr (
    .clk, .rst_n, .init(init_p), .init_node, .frame_start, .cur_bank,
    .grp(grp_d), .pass, .surv(survs), .busy(wbusy),
    .ws_addr(w_addr), .ws_rdata(w_rdata), .ws_waddr(w_waddr), .ws_we(w_en), .ws_wdata(w_rec),
    .map_node, .map_slot, .map_we, .map_wslot,
    .count, .prev_count, .best, .prev_best, .best_rec, .ev_merge, .ev_new, .ev_overflow,
    .tr_valid, .tr_rec, .tr_ready, .tr_token, .ob_push, .ob_rec, .ob_full);

  beam_threshold #(.BEAM(BEAM), .CNT_W(CNT_W), .INIT_MARGIN(INIT_MARGIN)) u_thr (
    .clk, .rst_n, .init(init_p), .start(bt_start), .count, .busy(bt_busy), .done(bt_done), .margin);

  // caches and bus
  logic              lx_lk, lx_hit, lx_miss, lx_fill, lx_rv, ng_lk, ng_hit, ng_miss, ng_fill, ng_rv;
  logic [ADDR_W-1:0] lx_addr, ng_addr;
  logic [LW*BUS_W-1:0] lx_line, ng_line;
  bus_req_t          lx_req, ng_req, ob_req;
  logic              ob_rv;

  line_cache #(.LINES(LEX_LINES), .LINE_WORDS(LW)) u_lexc (
    .clk, .rst_n, .lk_valid(lx_lk), .lk_addr(lx_addr), .lk_hit(lx_hit), .lk_line(lx_line),
    .miss(lx_miss), .filling(lx_fill), .req_valid(lx_rv), .req_ready(req_ready && lx_rv),
    .req(lx_req), .rsp_valid(rsp_valid && lx_fill), .rsp_data);

  line_cache #(.LINES(NG_LINES), .LINE_WORDS(LW)) u_ngc (
    .clk, .rst_n, .lk_valid(ng_lk), .lk_addr(ng_addr), .lk_hit(ng_hit), .lk_line(ng_line),
    .miss(ng_miss), .filling(ng_fill), .req_valid(ng_rv), .req_ready(req_ready && !lx_rv && ng_rv),
    .req(ng_req), .rsp_valid(rsp_valid && ng_fill && !lx_fill), .rsp_data);

  output_buffer #(.DEPTH(OB_DEPTH)) u_ob (
    .clk, .rst_n, .clear(init_p), .push(ob_push), .rec(ob_rec), .full(ob_full), .empty(ob_empty),
    .base(trellis_base), .req_valid(ob_rv), .req_ready(req_ready && !lx_rv && !ng_rv), .req(ob_req));

  assign req_valid = lx_rv || ng_rv || ob_rv;
  assign req       = lx_rv ? lx_req : (ng_rv ? ng_req : ob_req);

  // ---------------- datapath helpers ----------------
  function automatic logic [BUS_W-1:0] lword(input logic [LW*BUS_W-1:0] line,
                                             input logic [ADDR_W-1:0] a);
    return line[a[2:0]*BUS_W +: BUS_W];
  endfunction

  lex_word0_t lw0;
  logic signed [VSCORE_W-1:0] logb;
  logic [ADDR_W-1:0] lex_node_addr;
  logic [BUS_W-1:0]  ng_w0, ng_w1;
  logic signed [VSCORE_W:0] thr_w;

  always_comb begin
    unique case (st)
      V_LEX1:    lex_node_addr = lex_base + ((ADDR_W'(rec.node) + 1) << 1);
      V_FIN_LEX: lex_node_addr = lex_base + (ADDR_W'(best_rec.node) << 1);
      default:   lex_node_addr = lex_base + (ADDR_W'(rec.node) << 1);
    endcase
    lx_addr = lex_node_addr;
    lx_lk   = (st == V_LEX0) || (st == V_LEX1) || (st == V_FIN_LEX);
    lw0     = lex_word0_t'(lword(lx_line, lex_node_addr));
    unique case (st)
      V_THDR:  ng_addr = tg_base + ADDR_W'({word, 1'b0});
      V_TIDX:  ng_addr = t_start + ADDR_W'({tk, 1'b0});
      V_BHDR:  ng_addr = bg_base + ADDR_W'({word, 1'b0});
      default: ng_addr = list_a;
    endcase
    ng_lk = (st == V_THDR) || (st == V_TIDX) || (st == V_BHDR) || (st == V_LIST);
    ng_w0 = lword(ng_line, ng_addr);
    ng_w1 = lword(ng_line, ng_addr + 1);
    gmm_state = lw0.gmm_state;
    gmm_frame = fi;
    logb = VSCORE_W'(gmm_score);
    thr_w = $signed({best[VSCORE_W-1], best}) - $signed({2'b00, margin});
    thr   = (thr_w < $signed({1'b1, VSCORE_MIN})) ? VSCORE_MIN : thr_w[VSCORE_W-1:0];
  end

  // group issue
  always_comb begin
    grp = 1'b0; cvalid = '0;
    for (int p = 0; p < N_PATHS; p++) cands[p] = self_c;
    unique case (st)
      V_LEX1: if (lx_hit && !wbusy) begin
        grp = 1'b1; cvalid[0] = 1'b1; cvalid[1] = 1'b1;
        cands[1] = '{dest: rec.node + 1'b1, base: rec.score,
                     add: logb - VSCORE_W'(next_cost), pred: rec.pred, token: rec.token};
      end
      V_WE_SELF: if (!wbusy) begin
        grp = 1'b1; cvalid[0] = 1'b1;
      end
      V_LIST: if (ng_hit && !wbusy) begin
        grp = 1'b1;
        for (int p = 0; p < N_PATHS; p++) begin
          logic [ADDR_W-1:0] a;
          logic [BUS_W-1:0]  e;
          a = {list_a[ADDR_W-1:3], 3'b000} + ADDR_W'(p % LW);
          e = ng_line[(p % LW)*BUS_W +: BUS_W];
          cvalid[p] = (p < LW) && (a >= list_start) && (a < list_end);
          cands[p]  = '{dest: e[31:12], base: rec.score, add: -$signed(VSCORE_W'(e[11:0])),
                        pred: word, token: new_tok};
        end
      end
      default: ;
    endcase
  end

  assign frame_start = (st == V_FSTART);
  assign init_p      = (st == V_IDLE) && start && first;
  assign bt_start    = (st == V_DRAIN) && !wbusy && !bt_busy;
  assign tr_valid    = (st == V_TREL) || (st == V_FIN_PUSH);
  assign tr_rec      = (st == V_FIN_PUSH)
                     ? '{kind: REC_FINAL, frame: gframe - 14'd1, word: fin_word,
                         score_hi: best_rec.score[VSCORE_W-1 -: 12], back: best_rec.token}
                     : '{kind: REC_WORD_END, frame: gframe, word: word, score_hi: '0, back: rec.token};
  assign busy = (st != V_IDLE);


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= V_IDLE; done <= 1'b0; i <= '0; rec <= '0; word <= '0; self_c <= '0;
      last_r <= 1'b0; next_cost <= '0; nfr <= '0; fi <= '0; gframe <= '0; new_tok <= '0;
      list_a <= '0; list_start <= '0; list_end <= '0; t_start <= '0; t_cnt <= '0; tk <= '0;
      fin_word <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        V_IDLE: if (start) begin
          last_r <= last; nfr <= n_frames; fi <= '0;
          if (first) gframe <= '0;
          st <= V_FSTART;
        end
        V_FSTART: begin i <= '0; st <= V_SRC; end
        V_SRC: begin
          if (i == prev_count) st <= V_DRAIN;
          else begin
            rec <= '{node: r_rec.node, score: r_rec.score - prev_best,
                     pred: r_rec.pred, token: r_rec.token};
            st <= V_LEX0;
          end
        end
        V_LEX0: if (lx_hit) begin
          self_c <= '{dest: rec.node, base: rec.score, add: logb - VSCORE_W'(lw0.self_cost),
                      pred: rec.pred, token: rec.token};
          word   <= lword(lx_line, lex_node_addr + 1)[WORD_W-1:0];
          next_cost <= lw0.next_cost;
          st     <= lw0.word_end ? V_WE_SELF : V_LEX1;
        end
        V_LEX1: if (grp) begin i <= i + 1'b1; st <= V_SRC; end
        V_WE_SELF: if (grp) st <= V_TREL;
        V_TREL: if (tr_ready) begin
          new_tok <= tr_token;
          st <= trigram_en ? V_THDR : V_BHDR;
        end
        V_THDR: if (ng_hit) begin
          t_start <= ng_w0;
          t_cnt   <= ng_w1[HDR_CNT_W-1:0];
          tk      <= '0;
          st <= (ng_w1[HDR_CNT_W-1:0] == '0) ? V_BHDR : V_TIDX;
        end
        V_TIDX: if (ng_hit) begin
          if (ng_w0[31:16] == rec.pred) begin
            list_start <= ng_w1;
            list_end   <= ng_w1 + ADDR_W'(ng_w0[15:0]);
            list_a     <= {ng_w1[ADDR_W-1:3], 3'b000};
            st <= (ng_w0[15:0] == '0) ? V_SRC : V_LIST;
            if (ng_w0[15:0] == '0) i <= i + 1'b1;
          end else begin
            tk <= tk + 1'b1;
            if (tk + 1'b1 == t_cnt) st <= V_BHDR;
          end
        end
        V_BHDR: if (ng_hit) begin
          list_start <= ng_w0;
          list_end   <= ng_w0 + ADDR_W'(ng_w1[HDR_CNT_W-1:0]);
          list_a     <= {ng_w0[ADDR_W-1:3], 3'b000};
          if (ng_w1[HDR_CNT_W-1:0] == '0) begin i <= i + 1'b1; st <= V_SRC; end
          else st <= V_LIST;
        end
        V_LIST: if (grp) begin
          list_a <= list_a + ADDR_W'(LW);
          if (list_a + ADDR_W'(LW) >= list_end) begin i <= i + 1'b1; st <= V_SRC; end
        end
        V_DRAIN: if (bt_start) st <= V_THR;
        V_THR: if (bt_done) begin
          gframe <= gframe + 1'b1;
          if (NF_W'(fi) + 1'b1 >= nfr) begin
            if (last_r) st <= V_FIN_LEX;
            else begin done <= 1'b1; st <= V_IDLE; end
          end else begin
            fi <= fi + 1'b1;
            st <= V_FSTART;
          end
        end
        V_FIN_LEX: if (lx_hit) begin
          fin_word <= lword(lx_line, lex_node_addr + 1)[WORD_W-1:0];
          st <= V_FIN_PUSH;
        end
        V_FIN_PUSH: if (tr_ready) st <= V_FLUSH;
        V_FLUSH: if (ob_empty) begin done <= 1'b1; st <= V_IDLE; end
        default: st <= V_IDLE;
      endcase
    end
  end

  // the two caches never fill at the same time
  assert property (@(posedge clk) disable iff (!rst_n) !(lx_fill && ng_fill));

endmodule

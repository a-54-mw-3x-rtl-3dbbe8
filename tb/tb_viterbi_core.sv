// tb_viterbi_core: runs a reduced Viterbi core (16 workspace slots, beam
// width 12, 16-line caches, 4-frame batches, 2-record output buffer, a memory that refuses 40% of cycles) on a
// random lexicon and language model, once with bigram and once with the
// simplified trigram search, and compares every trellis record and the final
// record it writes with those of a reference search computed here.
//
// The reference follows the search rules, not the RTL: frame-synchronous
// Viterbi, sources in workspace order, candidates of a source in path order,
// beam test against (best so far - margin) taken when a group enters the
// paths, max-merge into existing nodes, new nodes appended until the
// workspace is full, margin' = clamp(margin*BEAM/count) per frame.
// It also counts the mechanisms (merge, prune, overflow, cache misses,
// trigram list found / bigram fallback) and fails any that never happened;
// output-buffer back-pressure is reported but exercised in tb_output_buffer.
module tb_viterbi_core;
  import hmm_pkg::*;
  localparam int FRAMES = 4, SLOTS = 16, BEAM = 12, OBD = 2;
  localparam int NW = 24, STATES = 16, LAT = 3;
  localparam int unsigned LEX = 32'h0001_0000, BG = 32'h0002_0000, TG = 32'h0003_0000,
                          LST = 32'h0004_0000, TRL = 32'h0008_0000;
  localparam int INIT_MARGIN = 400, MIN_MARGIN = 64, MAX_MARGIN = 1 << 20;

  logic clk = 0, rst_n = 0, start = 0, first = 0, last = 0, trigram_en = 0, busy, done;
  logic [2:0] n_frames = 0;
  logic [NODE_W-1:0] init_node = 0;
  logic [10:0] gmm_state; logic [1:0] gmm_frame; logic signed [15:0] gmm_score;
  logic req_valid, req_ready, rsp_valid; bus_req_t req; logic [31:0] rsp_data;
  int checks = 0, failures = 0;

  viterbi_core #(.N_PATHS(8), .FRAMES(FRAMES), .SLOTS(SLOTS), .MAP_ENTRIES(1024),
    .NG_LINES(16), .LEX_LINES(16), .BEAM(BEAM), .OB_DEPTH(OBD), .INIT_MARGIN(INIT_MARGIN)) dut (
    .clk, .rst_n, .start, .first, .last, .n_frames, .trigram_en, .init_node,
    .lex_base(LEX), .bg_base(BG), .tg_base(TG), .trellis_base(TRL), .busy, .done,
    .gmm_state, .gmm_frame, .gmm_score, .req_valid, .req_ready, .req, .rsp_valid, .rsp_data);
  ext_mem_model #(.LAT(LAT), .STALL_PCT(40)) mem (.clk, .req_valid, .req_ready, .req, .rsp_valid, .rsp_data);

  always #5 clk = ~clk;
  initial begin repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------- model data ----------------
  int nnodes;
  int wstart [NW];
  int n_gmm [256]; int n_self [256]; int n_next [256]; bit n_we [256]; int n_word [256];
  int gtab [64][STATES];
  int batch;
  assign gmm_score = 16'(gtab[batch*FRAMES + int'(gmm_frame)][gmm_state]);

  // successor lists kept by the reference: bigram per word, trigram per (word, pred)
  int bg_cnt [NW]; int bg_dst [NW][12]; int bg_cost [NW][12]; int bg_addr [NW];
  int tg_n [NW]; int tg_pred [NW][3]; int tg_cnt [NW][3]; int tg_dst [NW][3][8]; int tg_cost [NW][3][8];
  int tg_addr [NW][3];

  task automatic build_model();
    int a = 0, la = LST;
    for (int w = 0; w < NW; w++) begin
      int len = $urandom_range(1, 3);
      wstart[w] = a;
      for (int k = 0; k < len; k++) begin
        n_gmm[a] = $urandom_range(0, STATES-1); n_self[a] = $urandom_range(0, 60);
        n_next[a] = $urandom_range(0, 60); n_we[a] = (k == len-1); n_word[a] = w; a++;
      end
    end
    nnodes = a;
    for (int n = 0; n < nnodes; n++) begin
      mem.wr(LEX + 2*n, {n_we[n], 11'(n_gmm[n]), 8'(n_self[n]), 8'(n_next[n]), 4'h0});
      mem.wr(LEX + 2*n + 1, 32'(n_word[n]));
    end
    for (int w = 0; w < NW; w++) begin
      bg_cnt[w] = (w % 7 == 3) ? 0 : $urandom_range(1, 12);
      la += $urandom_range(0, 5);
      bg_addr[w] = la;
      for (int e = 0; e < bg_cnt[w]; e++) begin
        bg_dst[w][e] = wstart[$urandom_range(0, NW-1)]; bg_cost[w][e] = $urandom_range(0, 200);
        mem.wr(la + e, {20'(bg_dst[w][e]), 12'(bg_cost[w][e])});
      end
      la += bg_cnt[w];
      mem.wr(BG + 2*w, 32'(bg_addr[w])); mem.wr(BG + 2*w + 1, 32'(bg_cnt[w]));
    end
    for (int w = 0; w < NW; w++) begin
      int ia;
      la = (la + 8) & ~1; ia = la; la += 8;
      tg_n[w] = (w % 2 == 0) ? $urandom_range(1, 3) : 0;
      for (int k = 0; k < tg_n[w]; k++) begin
        tg_pred[w][k] = (k == 0) ? 32'hffff : $urandom_range(0, NW-1);
        tg_cnt[w][k]  = $urandom_range(1, 8);
        tg_addr[w][k] = la;
        for (int e = 0; e < tg_cnt[w][k]; e++) begin
          tg_dst[w][k][e] = wstart[$urandom_range(0, NW-1)]; tg_cost[w][k][e] = $urandom_range(0, 120);
          mem.wr(la + e, {20'(tg_dst[w][k][e]), 12'(tg_cost[w][k][e])});
        end
        la += tg_cnt[w][k];
        mem.wr(ia + 2*k, {16'(tg_pred[w][k]), 16'(tg_cnt[w][k])});
        mem.wr(ia + 2*k + 1, 32'(tg_addr[w][k]));
      end
      mem.wr(TG + 2*w, 32'(ia)); mem.wr(TG + 2*w + 1, 32'(tg_n[w]));
    end
  endtask

  // ---------------- reference search ----------------
  typedef struct { int node; int score; int pred; int token; } rrec_t;
  rrec_t prv [SLOTS]; rrec_t cur [SLOTS];
  int pc, cc, rbest, rprev_best, margin, tcount, gframe;
  rrec_t best_rec;
  int ref_kind [$]; int ref_frame [$]; int ref_word [$]; int ref_back [$]; int ref_hi [$];
  int e_merge, e_prune, e_over, e_tri, e_bifb;

  function automatic int thr_now();
    longint t = longint'(rbest) - margin;
    return (t < -(1 << 23)) ? -(1 << 23) : int'(t);
  endfunction

  function automatic void insert(rrec_t c);
    int slot = -1;
    for (int s = 0; s < cc; s++) if (cur[s].node == c.node) slot = s;
    if (slot >= 0) begin
      if (c.score > cur[slot].score) begin
        cur[slot] = c; e_merge++;
        if (c.score > rbest) begin rbest = c.score; best_rec = c; end
      end
    end else if (cc < SLOTS) begin
      cur[cc++] = c;
      if (c.score > rbest) begin rbest = c.score; best_rec = c; end
    end else e_over++;
  endfunction

  // one group of up to 8 candidates, beam test against the threshold at issue
  function automatic void group(rrec_t g [8], int n);
    int t = thr_now();
    bit ok [8];
    for (int p = 0; p < n; p++) begin ok[p] = g[p].score >= t; if (!ok[p]) e_prune++; end
    for (int p = 0; p < n; p++) if (ok[p]) insert(g[p]);
  endfunction

  function automatic void ref_frame_step(input int bt, input int fr, input bit use_tri);
    rrec_t g [8];
    rprev_best = rbest;
    for (int s = 0; s < cc; s++) prv[s] = cur[s];
    pc = cc; cc = 0; rbest = -(1 << 23);
    for (int i = 0; i < pc; i++) begin
      rrec_t r = prv[i];
      int n = r.node, sc = r.score - rprev_best;
      g[0] = '{n, sc + gtab[bt*FRAMES+fr][n_gmm[n]] - n_self[n], r.pred, r.token};
      if (!n_we[n]) begin
        g[1] = '{n+1, sc + gtab[bt*FRAMES+fr][n_gmm[n+1]] - n_next[n], r.pred, r.token};
        group(g, 2);
      end else begin
        int w = n_word[n], tok, cnt, start_a, k;
        int dst [12]; int cost [12];
        group(g, 1);
        tok = tcount++;
        ref_kind.push_back(0); ref_frame.push_back(gframe); ref_word.push_back(w);
        ref_back.push_back(r.token); ref_hi.push_back(0);
        k = -1;
        if (use_tri) for (int j = 0; j < tg_n[w]; j++) if (k < 0 && tg_pred[w][j] == r.pred) k = j;
        if (k >= 0) begin
          e_tri++; cnt = tg_cnt[w][k]; start_a = tg_addr[w][k];
          for (int e = 0; e < cnt; e++) begin dst[e] = tg_dst[w][k][e]; cost[e] = tg_cost[w][k][e]; end
        end else begin
          if (use_tri) e_bifb++;
          cnt = bg_cnt[w]; start_a = bg_addr[w];
          for (int e = 0; e < cnt; e++) begin dst[e] = bg_dst[w][e]; cost[e] = bg_cost[w][e]; end
        end
        // entries go out one aligned 8-word line at a time
        begin
          int e = 0;
          while (e < cnt) begin
            int line = (start_a + e) / 8, m = 0;
            while (e < cnt && (start_a + e) / 8 == line) begin
              g[m++] = '{dst[e], sc - cost[e], w, tok}; e++;
            end
            group(g, m);
          end
        end
      end
    end
    if (cc == 0) margin = MAX_MARGIN;
    else begin
      longint q = (longint'(margin) * BEAM) / cc;
      margin = (q < MIN_MARGIN) ? MIN_MARGIN : (q > MAX_MARGIN) ? MAX_MARGIN : int'(q);
    end
    gframe++;
  endfunction

  // ---------------- mechanism counters on the RTL ----------------
  int h_lex_miss, h_ng_miss, h_ob_full, h_prune, h_over, h_merge;
  always @(posedge clk) begin
    if (dut.lx_miss) h_lex_miss++;
    if (dut.ng_miss) h_ng_miss++;
    if (dut.tr_valid && dut.ob_full) h_ob_full++;
    if (dut.grp_d) h_prune += $countones(dut.pruned);
    if (dut.ev_overflow) h_over++;
    if (dut.ev_merge) h_merge++;
  end

  task automatic run_utterance(input bit use_tri, input int nbatches, input int rec_base);
    cc = 1; cur[0] = '{0, 0, 32'hffff, 32'hfffff}; rbest = 0; best_rec = cur[0];
    margin = INIT_MARGIN; tcount = 0; gframe = 0;
    ref_kind.delete(); ref_frame.delete(); ref_word.delete(); ref_back.delete(); ref_hi.delete();
    trigram_en = use_tri;
    for (int b = 0; b < nbatches; b++) begin
      batch = b;
      for (int f = 0; f < FRAMES; f++) ref_frame_step(b, f, use_tri);
      @(negedge clk); start = 1; first = (b == 0); last = (b == nbatches-1); n_frames = 3'(FRAMES);
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
    end
    ref_kind.push_back(1); ref_frame.push_back(gframe-1); ref_word.push_back(n_word[best_rec.node]);
    ref_back.push_back(best_rec.token); ref_hi.push_back((best_rec.score >> 12) & 12'hfff);
    for (int k = 0; k < ref_kind.size(); k++) begin
      logic [63:0] r;
      r = {mem.rd(TRL + 2*(rec_base+k) + 1), mem.rd(TRL + 2*(rec_base+k))};
      checks++;
      if (r[63:62] != 2'(ref_kind[k]) || r[61:48] != 14'(ref_frame[k]) || r[47:32] != 16'(ref_word[k])
          || r[19:0] != 20'(ref_back[k]) || (ref_kind[k] == 1 && r[31:20] != 12'(ref_hi[k]))) begin
        failures++;
        $display("rec %0d: got kind %0d frame %0d word %0d back %0d hi %0h; exp %0d %0d %0d %0d %0h", k,
          r[63:62], r[61:48], r[47:32], r[19:0], r[31:20], ref_kind[k], ref_frame[k], ref_word[k], ref_back[k], ref_hi[k]);
      end
    end
    // nothing beyond the last expected record
    checks++;
    if (mem.rd(TRL + 2*(rec_base + ref_kind.size())) != 0) begin
      failures++; $display("extra trellis record");
    end
    $display("utterance use_tri=%0d: %0d records", use_tri, ref_kind.size());
  endtask

  initial begin
    build_model();
    for (int t = 0; t < 64; t++) for (int s = 0; s < STATES; s++) gtab[t][s] = -$urandom_range(0, 300);
    repeat (3) @(posedge clk); rst_n = 1;
    run_utterance(1'b0, 3, 0);
    for (int a = 0; a < 2048; a++) mem.wr(TRL + a, 0);
    run_utterance(1'b1, 3, 0);
    $display("ref: merge %0d prune %0d overflow %0d trigram %0d bigram-fallback %0d",
             e_merge, e_prune, e_over, e_tri, e_bifb);
    $display("rtl: merge %0d prune %0d overflow %0d lex-miss %0d ngram-miss %0d ob-full %0d",
             h_merge, h_prune, h_over, h_lex_miss, h_ng_miss, h_ob_full);
    checks++; if (h_merge != e_merge) begin failures++; $display("merge count differs"); end
    checks++; if (h_prune != e_prune) begin failures++; $display("prune count differs"); end
    checks++; if (h_over != e_over) begin failures++; $display("overflow count differs"); end
    checks++; if (e_merge == 0)    begin failures++; $display("no merge happened"); end
    checks++; if (e_prune == 0)    begin failures++; $display("no prune happened"); end
    checks++; if (e_over == 0)     begin failures++; $display("no overflow happened"); end
    checks++; if (e_tri == 0)      begin failures++; $display("no trigram list used"); end
    checks++; if (e_bifb == 0)     begin failures++; $display("no bigram fallback"); end
    checks++; if (h_lex_miss == 0) begin failures++; $display("no lexicon miss"); end
    checks++; if (h_ng_miss == 0)  begin failures++; $display("no n-gram miss"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

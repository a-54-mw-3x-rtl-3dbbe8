// tb_hmm3_env: end-to-end test bench of hmm3_top. FULL=1 (the default)
// instantiates the top with its default parameters (20-frame batches,
// 2000 states, 16 mixtures, 25 dimensions, 4096 workspace slots, beam 3000);
// FULL=0 uses a reduced configuration that runs in seconds.
//
// Two external memory models stand behind the 64-bit link: channel 0 holds
// the MFCC vectors and the acoustic model, channel 1 the lexicon, the
// language model, the trellis and the GMM test output. Both refuse a random
// share of cycles.
//
// Sequence:
//   1. test mode: one GMM batch, whose 2000 x 20 scores are streamed out and
//      compared with a reference GMM (Eq. (1) in the chip's fixed point);
//   2. N_UTT utterances of N_BATCH batches, the last batch partial, first
//      with the bigram then with the trigram search. The reference computes
//      every GMM score and runs a reference beam search on them; every
//      trellis record and the final record written by the chip must match.
// Mechanism counters: GMM/Viterbi overlap, result-RAM swaps, GMM test
// readout, partial batch, GMM and Viterbi bus back-pressure, lexicon and
// N-gram cache misses, merge, prune, workspace overflow (RTL counts equal the
// reference's), trigram lists found and bigram fallbacks. Each must be
// non-zero. Output-buffer-full cycles are only reported.
module tb_hmm3_env #(parameter bit FULL = 1'b1);
  import hmm_pkg::*;
  localparam int FRAMES = FULL ? 20 : 4;
  localparam int STATES = FULL ? 2000 : 16;
  localparam int MIX    = FULL ? 16 : 3;
  localparam int DIM    = FULL ? 25 : 6;
  localparam int SLOTS  = FULL ? 4096 : 8;
  localparam int BEAM   = FULL ? 3000 : 6;
  localparam int INIT_MARGIN = FULL ? 4096 : 200;
  localparam int MIN_MARGIN = 64, MAX_MARGIN = 1 << 20;
  localparam int NW     = FULL ? 2500 : 24;     // words in the lexicon
  localparam int BGMAX  = FULL ? 24 : 12;       // longest bigram list
  localparam int N_BATCH = FULL ? 3 : 8;
  localparam int LAST_FR = FULL ? 7 : 2;
  localparam int N_UTT  = 2;
  localparam int WPS    = MIX*(DIM+1);
  localparam int MWORDS = (FRAMES*DIM+1)/2;
  localparam int NT     = N_BATCH*FRAMES;
  localparam longint WATCHDOG = FULL ? 64'd60_000_000 : 64'd3_000_000;
  localparam int unsigned MB = 32'h0010_0000, PB = 32'h0100_0000;
  localparam int unsigned LEX = 32'h0001_0000, BG = 32'h0004_0000, TG = 32'h0005_0000,
                          LST = 32'h0010_0000, TRL = 32'h0080_0000, GT = 32'h0400_0000;

  logic clk = 0, rst_n = 0, start = 0, test_mode = 0, trigram_en = 0, busy, done;
  logic [1:0] ext_req_valid, ext_req_ready, ext_rsp_valid;
  logic [31:0] ext_addr [2];
  logic ext_we;
  logic [31:0] ext_wdata, g_rsp_data, v_rsp_data;
  logic [63:0] ext_rsp_data;
  logic [31:0] trellis_base = TRL;
  int checks = 0, failures = 0;

  if (FULL) begin : g_dut
    hmm3_top u (.clk, .rst_n, .start, .test_mode, .trigram_en, .n_batches(16'(N_BATCH)),
      .last_frames(5'(LAST_FR)), .init_node(20'd0), .mfcc_base(MB), .param_base(PB), .lex_base(LEX),
      .bg_base(BG), .tg_base(TG), .trellis_base, .gmm_test_base(GT), .busy, .done,
      .ext_req_valid, .ext_req_ready, .ext_addr, .ext_we, .ext_wdata, .ext_rsp_valid, .ext_rsp_data);
  end else begin : g_dut
    hmm3_top #(.FRAMES(FRAMES), .STATES(STATES), .MIX(MIX), .DIM(DIM), .SLOTS(SLOTS),
      .MAP_ENTRIES(1024), .NG_LINES(16), .LEX_LINES(16), .BEAM(BEAM), .OB_DEPTH(2),
      .INIT_MARGIN(INIT_MARGIN)) u (
      .clk, .rst_n, .start, .test_mode, .trigram_en, .n_batches(16'(N_BATCH)),
      .last_frames(3'(LAST_FR)), .init_node(20'd0), .mfcc_base(MB), .param_base(PB), .lex_base(LEX),
      .bg_base(BG), .tg_base(TG), .trellis_base, .gmm_test_base(GT), .busy, .done,
      .ext_req_valid, .ext_req_ready, .ext_addr, .ext_we, .ext_wdata, .ext_rsp_valid, .ext_rsp_data);
  end

  ext_mem_model #(.LAT(4), .STALL_PCT(10)) mem_g (.clk, .req_valid(ext_req_valid[0]),
    .req_ready(ext_req_ready[0]), .req('{we: 1'b0, addr: ext_addr[0], wdata: '0}),
    .rsp_valid(ext_rsp_valid[0]), .rsp_data(g_rsp_data));
  ext_mem_model #(.LAT(4), .STALL_PCT(25)) mem_v (.clk, .req_valid(ext_req_valid[1]),
    .req_ready(ext_req_ready[1]), .req('{we: ext_we, addr: ext_addr[1], wdata: ext_wdata}),
    .rsp_valid(ext_rsp_valid[1]), .rsp_data(v_rsp_data));
  assign ext_rsp_data = {v_rsp_data, g_rsp_data};

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > WATCHDOG) begin
      failures++; $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
    end
  end

  // ---------------- acoustic model and reference GMM ----------------
  int xv [NT][DIM];
  int p_mu [], p_iv [], p_c [];
  int gtab [NT][STATES];

  function automatic int ref_score(int t, int s);
    longint best = -32768, acc, sc, d;
    for (int m = 0; m < MIX; m++) begin
      int b0 = (s*MIX + m)*DIM;
      acc = 0;
      for (int k = 0; k < DIM; k++) begin
        d = longint'(xv[t][k]) - longint'(p_mu[b0+k]);
        acc += ((d*d) * longint'(p_iv[b0+k])) >>> 16;
      end
      sc = longint'(p_c[s*MIX+m]) - (acc >>> 1);
      if (sc > 32767) sc = 32767;
      if (sc < -32768) sc = -32768;
      if (sc > best) best = sc;
    end
    return int'(best);
  endfunction

  task automatic build_acoustic();
    p_mu = new[STATES*MIX*DIM]; p_iv = new[STATES*MIX*DIM]; p_c = new[STATES*MIX];
    for (int s = 0; s < STATES; s++) for (int m = 0; m < MIX; m++) begin
      for (int k = 0; k < DIM; k++) begin
        int i; i = (s*MIX + m)*DIM + k;
        p_mu[i] = $urandom_range(0, 1023) - 512; p_iv[i] = $urandom_range(0, FULL ? 120 : 40);
        mem_g.wr(PB + s*WPS + m*(DIM+1) + k, {16'(p_mu[i]), 16'(p_iv[i])});
      end
      p_c[s*MIX+m] = -$urandom_range(0, 2000);
      mem_g.wr(PB + s*WPS + m*(DIM+1) + DIM, {16'h0, 16'(p_c[s*MIX+m])});
    end
    for (int b = 0; b < N_BATCH; b++) for (int i = 0; i < MWORDS; i++) begin
      logic [31:0] w;
      w = {16'($urandom_range(0, 1023) - 512), 16'($urandom_range(0, 1023) - 512)};
      mem_g.wr(MB + b*MWORDS + i, w);
      for (int h = 0; h < 2; h++) if (2*i + h < FRAMES*DIM)
        xv[b*FRAMES + (2*i+h)/DIM][(2*i+h)%DIM] = h ? int'($signed(w[31:16])) : int'($signed(w[15:0]));
    end
    for (int t = 0; t < NT; t++) for (int s = 0; s < STATES; s++) gtab[t][s] = ref_score(t, s);
  endtask

  // ---------------- lexicon and language model ----------------
  int nnodes;
  int wstart [NW];
  int n_gmm [], n_self [], n_next [], n_word [];
  bit n_we [];
  int bg_cnt [NW]; int bg_addr [NW]; int bg_dst [NW][$]; int bg_cost [NW][$];
  int tg_n [NW]; int tg_pred [NW][3]; int tg_cnt [NW][3]; int tg_addr [NW][3];
  int tg_dst [NW][3][$]; int tg_cost [NW][3][$];

  task automatic build_model();
    int a = 0, la = LST;
    n_gmm = new[3*NW]; n_self = new[3*NW]; n_next = new[3*NW]; n_word = new[3*NW]; n_we = new[3*NW];
    for (int w = 0; w < NW; w++) begin
      int len; len = $urandom_range(1, 3);
      wstart[w] = a;
      for (int k = 0; k < len; k++) begin
        n_gmm[a] = $urandom_range(0, STATES-1); n_self[a] = $urandom_range(0, 60);
        n_next[a] = $urandom_range(0, 60); n_we[a] = (k == len-1); n_word[a] = w; a++;
      end
    end
    nnodes = a;
    for (int n = 0; n < nnodes; n++) begin
      mem_v.wr(LEX + 2*n, {n_we[n], 11'(n_gmm[n]), 8'(n_self[n]), 8'(n_next[n]), 4'h0});
      mem_v.wr(LEX + 2*n + 1, 32'(n_word[n]));
    end
    for (int w = 0; w < NW; w++) begin
      bg_cnt[w] = (w % 7 == 3) ? 0 : $urandom_range(1, BGMAX);
      la += $urandom_range(0, 5);
      bg_addr[w] = la;
      for (int e = 0; e < bg_cnt[w]; e++) begin
        bg_dst[w].push_back(wstart[$urandom_range(0, NW-1)]); bg_cost[w].push_back($urandom_range(0, 200));
        mem_v.wr(la + e, {20'(bg_dst[w][e]), 12'(bg_cost[w][e])});
      end
      la += bg_cnt[w];
      mem_v.wr(BG + 2*w, 32'(bg_addr[w])); mem_v.wr(BG + 2*w + 1, 32'(bg_cnt[w]));
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
          tg_dst[w][k].push_back(wstart[$urandom_range(0, NW-1)]); tg_cost[w][k].push_back($urandom_range(0, 120));
          mem_v.wr(la + e, {20'(tg_dst[w][k][e]), 12'(tg_cost[w][k][e])});
        end
        la += tg_cnt[w][k];
        mem_v.wr(ia + 2*k, {16'(tg_pred[w][k]), 16'(tg_cnt[w][k])});
        mem_v.wr(ia + 2*k + 1, 32'(tg_addr[w][k]));
      end
      mem_v.wr(TG + 2*w, 32'(ia)); mem_v.wr(TG + 2*w + 1, 32'(tg_n[w]));
    end
  endtask

  // ---------------- reference search ----------------
  typedef struct { int node; int score; int pred; int token; } rrec_t;
  rrec_t prv [SLOTS]; rrec_t cur [SLOTS];
  int slot_of [int];
  int pc, cc, rbest, rprev_best, margin, tcount, gframe;
  rrec_t best_rec;
  int ref_kind [$]; int ref_frame [$]; int ref_word [$]; int ref_back [$]; int ref_hi [$];
  int e_merge, e_prune, e_over, e_tri, e_bifb;

  function automatic int thr_now();
    longint t;
    t = longint'(rbest) - margin;
    return (t < -(1 << 23)) ? -(1 << 23) : int'(t);
  endfunction

  function automatic void insert(rrec_t c);
    if (slot_of.exists(c.node)) begin
      int slot; slot = slot_of[c.node];
      if (c.score > cur[slot].score) begin
        cur[slot] = c; e_merge++;
        if (c.score > rbest) begin rbest = c.score; best_rec = c; end
      end
    end else if (cc < SLOTS) begin
      slot_of[c.node] = cc; cur[cc++] = c;
      if (c.score > rbest) begin rbest = c.score; best_rec = c; end
    end else e_over++;
  endfunction

  function automatic void group(rrec_t g [8], int n);
    int t; bit ok [8];
    t = thr_now();
    for (int p = 0; p < n; p++) begin ok[p] = g[p].score >= t; if (!ok[p]) e_prune++; end
    for (int p = 0; p < n; p++) if (ok[p]) insert(g[p]);
  endfunction

  function automatic void ref_frame_step(input int t, input bit use_tri);
    rrec_t g [8];
    rprev_best = rbest;
    for (int s = 0; s < cc; s++) prv[s] = cur[s];
    pc = cc; cc = 0; rbest = -(1 << 23); slot_of.delete();
    for (int i = 0; i < pc; i++) begin
      rrec_t r; int n, sc;
      r = prv[i]; n = r.node; sc = r.score - rprev_best;
      g[0] = '{n, sc + gtab[t][n_gmm[n]] - n_self[n], r.pred, r.token};
      if (!n_we[n]) begin
        g[1] = '{n+1, sc + gtab[t][n_gmm[n+1]] - n_next[n], r.pred, r.token};
        group(g, 2);
      end else begin
        int w, tok, cnt, start_a, k, e;
        int dst [$]; int cost [$];
        w = n_word[n];
        group(g, 1);
        tok = tcount++;
        ref_kind.push_back(0); ref_frame.push_back(gframe); ref_word.push_back(w);
        ref_back.push_back(r.token); ref_hi.push_back(0);
        k = -1;
        if (use_tri) for (int j = 0; j < tg_n[w]; j++) if (k < 0 && tg_pred[w][j] == r.pred) k = j;
        if (k >= 0) begin
          e_tri++; cnt = tg_cnt[w][k]; start_a = tg_addr[w][k]; dst = tg_dst[w][k]; cost = tg_cost[w][k];
        end else begin
          if (use_tri) e_bifb++;
          cnt = bg_cnt[w]; start_a = bg_addr[w]; dst = bg_dst[w]; cost = bg_cost[w];
        end
        e = 0;
        while (e < cnt) begin
          int line, m;
          line = (start_a + e) / 8; m = 0;
          while (e < cnt && (start_a + e) / 8 == line) begin
            g[m++] = '{dst[e], sc - cost[e], w, tok}; e++;
          end
          group(g, m);
        end
      end
    end
    if (cc == 0) margin = MAX_MARGIN;
    else begin
      longint q;
      q = (longint'(margin) * BEAM) / cc;
      margin = (q < MIN_MARGIN) ? MIN_MARGIN : (q > MAX_MARGIN) ? MAX_MARGIN : int'(q);
    end
    gframe++;
  endfunction

  // ---------------- mechanism counters on the chip ----------------
  int h_overlap, h_swap, h_readout, h_partial, h_gstall, h_vstall;
  int h_lex_miss, h_ng_miss, h_ob_full, h_prune, h_over, h_merge;
  logic bank_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (g_dut.u.g_busy && g_dut.u.v_busy) h_overlap++;
    if (g_dut.u.gmm_bank != bank_q) h_swap++;
    bank_q <= g_dut.u.gmm_bank;
    if (test_mode && ext_req_valid[1] && ext_req_ready[1]) h_readout++;
    if (g_dut.u.v_start && int'(g_dut.u.v_nframes) < FRAMES) h_partial++;
    if (ext_req_valid[0] && !ext_req_ready[0]) h_gstall++;
    if (ext_req_valid[1] && !ext_req_ready[1]) h_vstall++;
    if (g_dut.u.u_vit.lx_miss) h_lex_miss++;
    if (g_dut.u.u_vit.ng_miss) h_ng_miss++;
    if (g_dut.u.u_vit.tr_valid && g_dut.u.u_vit.ob_full) h_ob_full++;
    if (g_dut.u.u_vit.grp_d) h_prune += $countones(g_dut.u.u_vit.pruned);
    if (g_dut.u.u_vit.ev_overflow) h_over++;
    if (g_dut.u.u_vit.ev_merge) h_merge++;
  end

  task automatic ck(bit c, string m); checks++; if (!c) begin failures++; $display("FAIL: %s", m); end endtask

  task automatic run(input bit tm, input bit use_tri);
    longint c0;
    @(negedge clk); test_mode = tm; trigram_en = use_tri; start = 1;
    @(negedge clk); start = 0; c0 = cyc;
    while (!done) @(negedge clk);
    $display("%s run: %0d cycles", tm ? "test" : (use_tri ? "trigram" : "bigram"), cyc - c0);
    @(negedge clk); test_mode = 0;
  endtask

  task automatic check_utterance(input bit use_tri, input int unsigned base);
    cc = 1; cur[0] = '{0, 0, 32'hffff, 32'hfffff}; rbest = 0; best_rec = cur[0];
    margin = INIT_MARGIN; tcount = 0; gframe = 0;
    ref_kind.delete(); ref_frame.delete(); ref_word.delete(); ref_back.delete(); ref_hi.delete();
    for (int b = 0; b < N_BATCH; b++)
      for (int f = 0; f < ((b == N_BATCH-1) ? LAST_FR : FRAMES); f++) ref_frame_step(b*FRAMES + f, use_tri);
    ref_kind.push_back(1); ref_frame.push_back(gframe-1); ref_word.push_back(n_word[best_rec.node]);
    ref_back.push_back(best_rec.token); ref_hi.push_back((best_rec.score >> 12) & 12'hfff);
    for (int k = 0; k < ref_kind.size(); k++) begin
      logic [63:0] r;
      r = {mem_v.rd(base + 2*k + 1), mem_v.rd(base + 2*k)};
      checks++;
      if (r[63:62] != 2'(ref_kind[k]) || r[61:48] != 14'(ref_frame[k]) || r[47:32] != 16'(ref_word[k])
          || r[19:0] != 20'(ref_back[k]) || (ref_kind[k] == 1 && r[31:20] != 12'(ref_hi[k]))) begin
        failures++;
        if (failures < 10)
          $display("rec %0d: got kind %0d frame %0d word %0d back %0d hi %0h; exp %0d %0d %0d %0d %0h", k,
            r[63:62], r[61:48], r[47:32], r[19:0], r[31:20], ref_kind[k], ref_frame[k], ref_word[k], ref_back[k], ref_hi[k]);
      end
    end
    ck(mem_v.rd(base + 2*ref_kind.size()) == 0, "extra trellis record");
    $display("utterance use_tri=%0d: %0d records", use_tri, ref_kind.size());
  endtask

  initial begin
    build_acoustic();
    build_model();
    $display("model: %0d states, %0d lexicon nodes, %0d words", STATES, nnodes, NW);
    repeat (3) @(posedge clk); rst_n = 1;
    // 1. GMM test readout of batch 0
    run(1'b1, 1'b0);
    for (int s = 0; s < STATES; s++) for (int k = 0; k < FRAMES/2; k++) begin
      logic [31:0] w;
      w = mem_v.rd(GT + s*FRAMES/2 + k);
      checks++;
      if ($signed(w[15:0]) != gtab[2*k][s] || $signed(w[31:16]) != gtab[2*k+1][s]) begin
        failures++;
        if (failures < 10) $display("gmm state %0d frames %0d/%0d: got %0d %0d exp %0d %0d", s, 2*k, 2*k+1,
          $signed(w[15:0]), $signed(w[31:16]), gtab[2*k][s], gtab[2*k+1][s]);
      end
    end
    // 2. utterances
    for (int u = 0; u < N_UTT; u++) begin
      trellis_base = TRL + u * 32'h0040_0000;
      run(1'b0, u[0]);
      check_utterance(u[0], trellis_base);
    end
    $display("ref: merge %0d prune %0d overflow %0d trigram %0d bigram-fallback %0d",
             e_merge, e_prune, e_over, e_tri, e_bifb);
    $display("chip: merge %0d prune %0d overflow %0d lex-miss %0d ngram-miss %0d ob-full %0d",
             h_merge, h_prune, h_over, h_lex_miss, h_ng_miss, h_ob_full);
    $display("chip: overlap %0d swaps %0d readout %0d partial %0d gmm-stall %0d vit-stall %0d",
             h_overlap, h_swap, h_readout, h_partial, h_gstall, h_vstall);
    ck(h_merge == e_merge, "merge count differs");
    ck(h_prune == e_prune, "prune count differs");
    ck(h_over == e_over, "overflow count differs");
    ck(h_readout == STATES*FRAMES/2, "readout word count");
    ck(h_swap == N_UTT*(N_BATCH+1), "result RAM swap count");
    ck(h_overlap > 0, "GMM and Viterbi never overlapped");
    ck(h_partial > 0, "no partial batch");
    ck(h_gstall > 0, "no GMM bus back-pressure");
    ck(h_vstall > 0, "no Viterbi bus back-pressure");
    ck(h_lex_miss > 0, "no lexicon miss");
    ck(h_ng_miss > 0, "no n-gram miss");
    ck(e_merge > 0, "no merge");
    ck(e_prune > 0, "no prune");
    ck(e_over > 0, "no workspace overflow");
    ck(e_tri > 0, "no trigram list used");
    ck(e_bifb > 0, "no bigram fallback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

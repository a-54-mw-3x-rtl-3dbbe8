// tb_trellis_token_write: drives the write module, with a real workspace and
// node map, by groups of random survivors (destinations from a small node
// set so that merges happen, more distinct nodes than slots so that the
// workspace overflows). After each frame the records are read back through
// the previous-frame port and compared with a reference set kept here;
// node count, best score and best record are compared too. Also checks the
// one-candidate-per-cycle retire rate and the trellis token numbering with
// the output buffer full part of the time.
module tb_trellis_token_write;
  import hmm_pkg::*;
  localparam int NP = 8, SLOTS = 8, SW = 3;
  logic clk = 0, rst_n = 0, init = 0, frame_start = 0, cur_bank, grp = 0, busy;
  logic [NODE_W-1:0] init_node = 20'd77;
  logic [NP-1:0] pass = '0;
  surv_t surv [NP];
  logic [SW-1:0] ws_addr, ws_waddr, map_slot, map_wslot, r_addr = 0;
  anode_t ws_rdata, ws_wdata, r_rec, best_rec;
  logic ws_we, map_we, ev_merge, ev_new, ev_overflow;
  logic [NODE_W-1:0] map_node;
  logic [SW:0] count, prev_count;
  logic signed [23:0] best, prev_best;
  logic tr_valid = 0, tr_ready, ob_push, ob_full = 0;
  trec_t tr_rec = '0, ob_rec;
  logic [TOKEN_W-1:0] tr_token;
  int checks = 0, failures = 0, merges = 0, overflows = 0;

  trellis_token_write #(.N_PATHS(NP), .SLOTS(SLOTS)) dut (.*);
  active_node_workspace #(.SLOTS(SLOTS)) ws (.clk, .cur_bank, .r_addr, .r_rec, .w_addr(ws_addr),
    .w_rdata(ws_rdata), .w_waddr(ws_waddr), .w_en(ws_we), .w_rec(ws_wdata));
  active_node_map #(.ENTRIES(64), .SLOTS(SLOTS)) map (.clk, .node(map_node), .slot(map_slot),
    .we(map_we), .wslot(map_wslot));

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) begin if (ev_merge) merges++; if (ev_overflow) overflows++; end

  anode_t rs [SLOTS]; int rc, rbest; anode_t rbest_rec;
  function automatic void rinsert(surv_t c);
    int k = -1;
    for (int s = 0; s < rc; s++) if (rs[s].node == c.dest) k = s;
    if (k >= 0) begin
      if (c.score > rs[k].score) begin
        rs[k] = '{c.dest, c.score, c.pred, c.token};
        if (c.score > rbest) begin rbest = c.score; rbest_rec = rs[k]; end
      end
    end else if (rc < SLOTS) begin
      rs[rc++] = '{c.dest, c.score, c.pred, c.token};
      if (c.score > rbest) begin rbest = c.score; rbest_rec = rs[rc-1]; end
    end
  endfunction

  task automatic check_frame();
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    checks++; if (int'(prev_count) != rc) begin failures++; $display("count %0d exp %0d", prev_count, rc); end
    checks++; if (rc > 0 && (int'(prev_best) != rbest || best_rec != rbest_rec)) begin
      failures++; $display("best %0d exp %0d", prev_best, rbest); end
    for (int s = 0; s < rc; s++) begin
      r_addr = SW'(s); #1;
      checks++; if (r_rec != rs[s]) begin failures++; $display("slot %0d differs", s); end
    end
    rc = 0; rbest = -(1 << 23);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    rc = 1; rs[0] = '{init_node, 0, NO_WORD, NO_TOKEN}; rbest = 0; rbest_rec = rs[0];
    for (int fr = 0; fr < 30; fr++) begin
      check_frame();
      for (int g = 0; g < 4; g++) begin
        int np, cyc;
        @(negedge clk); grp = 1; np = 0;
        for (int p = 0; p < NP; p++) begin
          pass[p] = ($urandom_range(0, 3) != 0); np += pass[p];
          surv[p] = '{dest: NODE_W'($urandom_range(0, 11)), score: 24'($signed(-$urandom_range(0, 1000))),
                      pred: WORD_W'($urandom), token: TOKEN_W'($urandom)};
        end
        for (int p = 0; p < NP; p++) if (pass[p]) rinsert(surv[p]);
        @(negedge clk); grp = 0; cyc = 0;
        while (busy) begin @(negedge clk); cyc++; end
        checks++; if (cyc != np) begin failures++; $display("group of %0d took %0d cycles", np, cyc); end
      end
    end
    check_frame();
    // trellis tokens
    for (int n = 0; n < 40; n++) begin
      int exp_tok; exp_tok = n;
      @(negedge clk); tr_valid = 1; tr_rec = '{kind: REC_WORD_END, frame: 14'(n), word: 16'(n), score_hi: 0, back: 20'(n)};
      ob_full = ($urandom_range(0, 1) == 1);
      #1; while (!tr_ready) begin @(negedge clk); ob_full = ($urandom_range(0, 1) == 1); #1; end
      checks++; if (int'(tr_token) != exp_tok || !ob_push || ob_rec != tr_rec) begin failures++; $display("token %0d", tr_token); end
      @(negedge clk); tr_valid = 0; ob_full = 0;
    end
    checks++; if (merges == 0 || overflows == 0) begin failures++; $display("merges %0d overflows %0d", merges, overflows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

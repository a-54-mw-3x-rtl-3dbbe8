// trellis_token_write: the back end of the Viterbi core. It owns the
// current frame's active-node set and the trellis.
//
// Candidates: one cycle after the controller loads the 8 transition paths
// (grp), the survivors of the beam comparison (pass mask) become pending.
// One pending candidate is retired per cycle, lowest path first:
//   - its destination node is looked up in the active node map and the
//     slot found is confirmed against the workspace (slot < count and the
//     slot holds that node);
//   - confirmed: the record is overwritten only if the new score is higher,
//     which is the max of Eq. (2)/(3) (a merge);
//   - not confirmed: the candidate gets the next free slot and the map entry,
//     or is dropped when all SLOTS slots are taken (an overflow).
// busy is high while a group is pending, so the controller issues the next
// group only after this one is retired. Pruned candidates cost nothing here.
//
// The module keeps per-frame statistics: node count, best score and best
// record (used for the pruning threshold, for score normalisation in the
// next frame and for the final result). frame_start swaps the workspace
// banks and clears them; init places the utterance's start node, score 0, in
// slot 0 of the current bank.
//
// Trellis: tr_valid asks to record a word end (word, back token, frame) in
// the output buffer; when accepted (tr_ready) tr_token is the index the
// record receives, and the successors of that word carry it as their token.
// The published block name is 'Trellis & Token Write'; this split of work
// between it and the controller is this design's.
module trellis_token_write
  import hmm_pkg::*;
#(
  parameter int unsigned N_PATHS = 8,
  parameter int unsigned SLOTS   = 4096,
  localparam int unsigned SL_W = $clog2(SLOTS),
  localparam int unsigned CNT_W = SL_W + 1
)(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        init,
  input  logic [NODE_W-1:0]           init_node,
  input  logic                        frame_start,
  output logic                        cur_bank,
  // from the paths
  input  logic                        grp,
  input  logic [N_PATHS-1:0]          pass,
  input  surv_t                       surv [N_PATHS],
  output logic                        busy,
  // workspace, current bank
  output logic [SL_W-1:0]             ws_addr,
  input  anode_t                      ws_rdata,
  output logic [SL_W-1:0]             ws_waddr,
  output logic                        ws_we,
  output anode_t                      ws_wdata,
  // active node map
  output logic [NODE_W-1:0]           map_node,
  input  logic [SL_W-1:0]             map_slot,
  output logic                        map_we,
  output logic [SL_W-1:0]             map_wslot,
  // frame statistics
  output logic [CNT_W-1:0]            count,
  output logic [CNT_W-1:0]            prev_count,
  output logic signed [VSCORE_W-1:0]  best,
  output logic signed [VSCORE_W-1:0]  prev_best,
  output anode_t                      best_rec,
  output logic                        ev_merge,
  output logic                        ev_new,
  output logic                        ev_overflow,
  // trellis
  input  logic                        tr_valid,
  input  trec_t                       tr_rec,
  output logic                        tr_ready,
  output logic [TOKEN_W-1:0]          tr_token,
  output logic                        ob_push,
  output trec_t                       ob_rec,
  input  logic                        ob_full
);

  logic [N_PATHS-1:0] pending;
  logic [$clog2(N_PATHS)-1:0] k;
  logic   any;
  surv_t  c;
  logic   hit, better, alloc;

  always_comb begin
    k = '0; any = 1'b0;
    for (int i = N_PATHS-1; i >= 0; i--)
      if (pending[i]) begin k = ($clog2(N_PATHS))'(i); any = 1'b1; end
  end

  assign busy = grp || any;
  assign c    = surv[k];

  assign map_node = init ? init_node : c.dest;
  assign ws_addr  = init ? '0 : map_slot;
  assign ws_waddr = init ? '0 : (hit ? map_slot : SL_W'(count));
  assign hit      = !init && (CNT_W'(map_slot) < count) && (ws_rdata.node == c.dest);
  assign better   = c.score > ws_rdata.score;
  assign alloc    = !init && !hit && (count < CNT_W'(SLOTS));

  always_comb begin
    ws_we = 1'b0; ws_wdata = '0; map_we = 1'b0; map_wslot = '0;
    ev_merge = 1'b0; ev_new = 1'b0; ev_overflow = 1'b0;
    if (init) begin
      ws_we = 1'b1; ws_wdata = '{node: init_node, score: '0, pred: NO_WORD, token: NO_TOKEN};
      map_we = 1'b1; map_wslot = '0;
    end else if (any) begin
      if (hit) begin
        ev_merge = better;
        ws_we    = better;
        ws_wdata = '{node: c.dest, score: c.score, pred: c.pred, token: c.token};
      end else if (alloc) begin
        ev_new    = 1'b1;
        ws_we     = 1'b1;
        ws_wdata  = '{node: c.dest, score: c.score, pred: c.pred, token: c.token};
        map_we    = 1'b1;
        map_wslot = SL_W'(count);
      end else begin
        ev_overflow = 1'b1;
      end
    end
  end

  logic [TOKEN_W-1:0] tcount;
  assign tr_ready = tr_valid && !ob_full;
  assign tr_token = tcount;
  assign ob_push  = tr_ready;
  assign ob_rec   = tr_rec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0; count <= '0; prev_count <= '0; cur_bank <= 1'b0;
      best <= VSCORE_MIN; prev_best <= '0; best_rec <= '0; tcount <= '0;
    end else begin
      if (tr_ready) tcount <= tcount + 1'b1;
      if (frame_start) begin
        cur_bank   <= ~cur_bank;
        prev_count <= count;
        prev_best  <= best;
        count      <= '0;
        best       <= VSCORE_MIN;
        pending    <= '0;
      end else if (init) begin
        count    <= CNT_W'(1);
        best     <= '0;
        best_rec <= '{node: init_node, score: '0, pred: NO_WORD, token: NO_TOKEN};
        tcount   <= '0;
      end else if (grp) begin
        pending <= pass;
      end else if (any) begin
        pending[k] <= 1'b0;
        if (alloc) count <= count + 1'b1;
        if ((alloc || (hit && better)) && c.score > best) begin
          best     <= c.score;
          best_rec <= '{node: c.dest, score: c.score, pred: c.pred, token: c.token};
        end
      end
    end
  end

  // a new group is never loaded while one is still pending
  assert property (@(posedge clk) disable iff (!rst_n) !(grp && any));

endmodule

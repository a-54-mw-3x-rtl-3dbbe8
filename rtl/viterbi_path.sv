// viterbi_path: one of the 8 transition paths of the Viterbi core. On load
// it adds the transition term of a candidate (log a_ij + log b_j(x_t) for a
// move inside a word, log p(w|v) for a move into a new word) to the source
// score, saturating to the score width, compares the sum with the beam
// threshold and registers the result: pass is high when the candidate is
// valid and its score is at or above thr, pruned when it is valid but below.
// The outputs hold until the next load. One cycle from load to pass. The
// ADD/CMP structure is published; the saturating arithmetic and register
// placement are this design's.
module viterbi_path
  import hmm_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,
  input  logic                        valid,
  input  cand_t                       cand,
  input  logic signed [VSCORE_W-1:0]  thr,
  output logic                        pass,
  output logic                        pruned,
  output surv_t                       surv
);
  logic signed [VSCORE_W:0]   sum;
  logic signed [VSCORE_W-1:0] sat;
  always_comb begin
    sum = {cand.base[VSCORE_W-1], cand.base} + {cand.add[VSCORE_W-1], cand.add};
    if (sum > $signed({1'b0, VSCORE_MAX}))      sat = VSCORE_MAX;
    else if (sum < $signed({1'b1, VSCORE_MIN})) sat = VSCORE_MIN;
    else                                        sat = sum[VSCORE_W-1:0];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass <= 1'b0; pruned <= 1'b0; surv <= '0;
    end else if (load) begin
      pass   <= valid && (sat >= thr);
      pruned <= valid && (sat <  thr);
      surv   <= '{dest: cand.dest, score: sat, pred: cand.pred, token: cand.token};
    end
  end
endmodule

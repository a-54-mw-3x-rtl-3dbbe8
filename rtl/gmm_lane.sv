// gmm_lane: the GMM datapath of one frame. The GMM core has one lane per
// frame of a batch (20 by default), all fed the same Gaussian parameters in
// the same cycle, so every parameter word read over the bus serves 20 frames.
//
// It evaluates the max approximation of the log output probability,
//   log b_s(X) = max_m { C_m - 1/2 * sum_d (x_d - mu_md)^2 / sigma_md^2 }.
// Per cycle with dim_valid it adds one term (x - mu)^2 * ivar / 2^16 to the
// accumulator, ivar being 2^16/sigma^2 as an unsigned 16-bit number. A cycle
// with mix_end closes the mixture: C_m - acc/2, saturated to 16 bits, enters a
// running max and the accumulator is cleared. start_state resets the running
// max before the first mixture of a state. score is valid from the cycle
// after the last mix_end. The formula is the published one; the number
// formats (x, mu, C in signed Q8.8, 40-bit accumulator) are this design's.
module gmm_lane
  import hmm_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start_state, // clear running max
  input  logic                        dim_valid,   // x, mu, ivar valid: accumulate one term
  input  logic                        mix_end,     // c valid: close the mixture
  input  logic signed [FEAT_W-1:0]    x,
  input  logic signed [FEAT_W-1:0]    mu,
  input  logic        [IVAR_W-1:0]    ivar,
  input  logic signed [GSCORE_W-1:0]  c,
  output logic signed [GSCORE_W-1:0]  score
);

  logic        [GACC_W-1:0]   acc;
  logic signed [FEAT_W:0]     diff;
  logic signed [2*FEAT_W+1:0] prod;
  logic        [2*FEAT_W-1:0] sq;
  logic        [GACC_W-1:0]   term;
  logic signed [GACC_W+1:0]   mix_score;
  logic signed [GSCORE_W-1:0] mix_sat;

  always_comb begin
    diff = $signed({x[FEAT_W-1], x}) - $signed({mu[FEAT_W-1], mu});
    prod = diff * diff;
    sq   = prod[2*FEAT_W-1:0];
    term = GACC_W'((48'(sq) * 48'(ivar)) >> 16);
    mix_score = $signed({{(GACC_W+2-GSCORE_W){c[GSCORE_W-1]}}, c})
              - $signed({2'b00, acc >> 1});
    if (mix_score > $signed((GACC_W+2)'(32767)))       mix_sat = 16'sh7fff;
    else if (mix_score < -$signed((GACC_W+2)'(32768))) mix_sat = 16'sh8000;
    else                                               mix_sat = GSCORE_W'(mix_score);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      score <= 16'sh8000;
    end else begin
      if (start_state) score <= 16'sh8000;
      if (mix_end) begin
        acc <= '0;
        if (start_state || mix_sat > score) score <= mix_sat;
      end else if (dim_valid) begin
        acc <= acc + term;
      end
    end
  end

endmodule

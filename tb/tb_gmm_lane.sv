// tb_gmm_lane: drives one GMM lane with random states (random mixtures,
// means, inverse variances and constants) and compares its score with the
// max-approximated log likelihood worked out here in 64-bit arithmetic.
// One state in three uses full-range values (saturation); the others stay
// in range so that the max over mixtures decides the score.
module tb_gmm_lane;
  import hmm_pkg::*;
  localparam int MIX = 4, DIM = 6;
  logic clk = 0, rst_n = 0;
  logic start_state = 0, dim_valid = 0, mix_end = 0;
  logic signed [15:0] x = 0, mu = 0, c = 0;
  logic [15:0] ivar = 0;
  logic signed [15:0] score;
  int checks = 0, failures = 0, n_inrange = 0;

  gmm_lane dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic longint term(input longint xx, input longint mm, input longint iv);
    longint d = xx - mm;
    return ((d * d) * iv) >>> 16;
  endfunction

  initial begin
    longint acc, best, sc;
    logic signed [15:0] xs [DIM];
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      best = -32768;
      for (int d = 0; d < DIM; d++) xs[d] = (t % 3 == 0) ? $signed(16'($urandom)) : $signed(16'($urandom_range(0, 2000)) - 16'sd1000);
      for (int m = 0; m < MIX; m++) begin
        acc = 0;
        for (int d = 0; d < DIM; d++) begin
          @(negedge clk);
          start_state = (m == 0 && d == 0); dim_valid = 1; mix_end = 0;
          x = xs[d]; mu = (t % 3 == 0) ? $signed(16'($urandom)) : $signed(16'($urandom_range(0, 2000)) - 16'sd1000);
          ivar = (t % 3 == 0) ? 16'($urandom) : 16'($urandom_range(0, 64));
          acc += term(x, mu, ivar);
        end
        @(negedge clk);
        start_state = 0; dim_valid = 0; mix_end = 1; c = (t % 3 == 0) ? $signed(16'($urandom)) : -$signed(16'($urandom_range(0, 8000)));
        sc = longint'(c) - (acc >>> 1);
        if (sc > 32767) sc = 32767; if (sc < -32768) sc = -32768;
        if (sc > best) best = sc;
      end
      @(negedge clk); mix_end = 0;
      if (best > -32768 && best < 32767) n_inrange++;
      checks++;
      if (longint'(score) != best) begin failures++; $display("state %0d: got %0d exp %0d", t, score, best); end
    end
    checks++; if (n_inrange < 20) begin failures++; $display("only %0d unsaturated scores", n_inrange); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

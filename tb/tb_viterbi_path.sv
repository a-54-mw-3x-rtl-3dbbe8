// tb_viterbi_path: random candidates and thresholds, including sums that
// saturate; checks the registered score, the pass / pruned decision and
// that the outputs hold while load is low.
module tb_viterbi_path;
  import hmm_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, valid = 0, pass, pruned;
  cand_t cand = '0;
  logic signed [23:0] thr = 0;
  surv_t surv;
  int checks = 0, failures = 0;
  viterbi_path dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      longint s; bit ep;
      @(negedge clk);
      load = 1; valid = ($urandom_range(0, 9) != 0);
      cand.dest = NODE_W'($urandom); cand.pred = WORD_W'($urandom); cand.token = TOKEN_W'($urandom);
      cand.base = (n % 4 == 0) ? 24'($urandom) : 24'($signed(-$urandom_range(0, 20000)));
      cand.add  = (n % 4 == 0) ? 24'($urandom) : 24'($signed(-$urandom_range(0, 500)));
      thr = (n % 4 == 0) ? 24'($urandom) : 24'($signed(-$urandom_range(0, 20000)));
      s = longint'(cand.base) + longint'(cand.add);
      if (s > 8388607) s = 8388607; if (s < -8388608) s = -8388608;
      ep = valid && (s >= longint'(thr));
      @(negedge clk); load = 0;
      checks++;
      if (pass != ep || pruned != (valid && !ep) || longint'(surv.score) != s || surv.dest != cand.dest
          || surv.token != cand.token || surv.pred != cand.pred) begin
        failures++; $display("n%0d got pass %0d score %0d exp %0d %0d", n, pass, surv.score, ep, s);
      end
      cand.dest = ~cand.dest;
      @(negedge clk);
      checks++; if (surv.dest == cand.dest) begin failures++; $display("output did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

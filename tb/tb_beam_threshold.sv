// tb_beam_threshold: random margins and node counts; checks
// margin' = clamp(margin*BEAM/count, MIN, MAX), the count = 0 case, the
// reset on init, and that an update takes NUM_W+2 cycles from start to done.
module tb_beam_threshold;
  import hmm_pkg::*;
  localparam int BEAM = 3000, MINM = 64, MAXM = 1 << 20, INITM = 4096, NUM_W = 23 + 12;
  logic clk = 0, rst_n = 0, init = 0, start = 0, busy, done;
  logic [12:0] count = 0;
  logic [22:0] margin;
  int checks = 0, failures = 0;
  beam_threshold #(.BEAM(BEAM), .CNT_W(13)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    longint m, q;
    int n_floor;
    n_floor = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    checks++; if (margin != INITM) begin failures++; $display("reset margin %0d", margin); end
    m = INITM;
    for (int n = 0; n < 300; n++) begin
      int cyc;
      cyc = 0;
      @(negedge clk); start = 1;
      count = (n % 50 == 7) ? 0 : (n % 60 >= 40 && n % 60 < 50) ? 13'd8191   // drive the margin to its floor
            : 13'($urandom_range(1, (n % 3 == 0) ? 8191 : 4000));
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      if (count == 0) q = MAXM;
      else begin q = (m * BEAM) / count; if (q < MINM) q = MINM; if (q > MAXM) q = MAXM; end
      m = q;
      if (q == MINM) n_floor++;
      checks++; if (margin != 23'(m)) begin failures++; $display("n%0d count %0d got %0d exp %0d", n, count, margin, m); end
      checks++; if (count != 0 && cyc != NUM_W + 2) begin failures++; $display("took %0d cycles", cyc); end
      if (n == 150) begin
        @(negedge clk); init = 1; @(negedge clk); init = 0; m = INITM;
        checks++; if (margin != INITM) begin failures++; $display("init margin %0d", margin); end
      end
    end
    checks++; if (n_floor == 0) begin failures++; $display("lower clamp never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

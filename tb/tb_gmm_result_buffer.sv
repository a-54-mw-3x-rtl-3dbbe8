// tb_gmm_result_buffer: writes a batch of rows with gmm_bank = 0, checks
// them through the test port, flips the banks, writes a second batch and
// checks that the Viterbi port now sees the first batch (state, frame) while
// the test port sees the second.
module tb_gmm_result_buffer;
  import hmm_pkg::*;
  localparam int STATES = 2000, FRAMES = 20, SW = $clog2(STATES), FW = $clog2(FRAMES);
  logic clk = 0, gmm_bank = 0, we = 0;
  logic [SW-1:0] waddr = 0, v_state = 0, t_state = 0;
  logic [FRAMES*16-1:0] wdata = 0, t_row;
  logic [FW-1:0] v_frame = 0;
  logic signed [15:0] v_score;
  logic [FRAMES*16-1:0] img [2][STATES];
  int checks = 0, failures = 0;
  gmm_result_buffer #(.STATES(STATES), .FRAMES(FRAMES)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int b = 0; b < 2; b++) begin
      gmm_bank = b[0];
      for (int s = 0; s < STATES; s++) begin
        @(negedge clk); we = 1; waddr = SW'(s);
        for (int f = 0; f < FRAMES; f++) wdata[f*16 +: 16] = 16'($urandom);
        img[b][s] = wdata;
      end
      @(negedge clk); we = 0;
      for (int s = 0; s < STATES; s += 7) begin
        t_state = SW'(s); #1;
        checks++; if (t_row != img[b][s]) begin failures++; $display("test port b%0d s%0d", b, s); end
      end
    end
    // gmm_bank = 1: Viterbi reads bank 0 (first batch)
    for (int s = 0; s < STATES; s += 3) begin
      v_state = SW'(s); v_frame = FW'(s % FRAMES); #1;
      checks++;
      if (v_score != $signed(img[0][s][(s % FRAMES)*16 +: 16])) begin failures++; $display("v port s%0d", s); end
    end
    @(negedge clk); gmm_bank = 0; #1;
    v_state = 5; v_frame = 3; #1;
    checks++; if (v_score != $signed(img[1][5][3*16 +: 16])) begin failures++; $display("v port after swap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_active_node_workspace: fills the current bank, swaps banks, checks the
// records through the previous-frame port while the new bank is written,
// and checks the read-modify-write port.
module tb_active_node_workspace;
  import hmm_pkg::*;
  localparam int SLOTS = 4096, SW = 12;
  logic clk = 0, cur_bank = 0, w_en = 0;
  logic [SW-1:0] r_addr = 0, w_addr = 0, w_waddr = 0;
  anode_t r_rec, w_rdata, w_rec = '0;
  anode_t img [2][SLOTS];
  int checks = 0, failures = 0;
  active_node_workspace #(.SLOTS(SLOTS)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (40000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int b = 0; b < 2; b++) begin
      cur_bank = b[0];
      for (int s = 0; s < SLOTS; s++) begin
        @(negedge clk); w_en = 1; w_waddr = SW'(s);
        w_rec = '{node: NODE_W'($urandom), score: VSCORE_W'($urandom), pred: WORD_W'($urandom), token: TOKEN_W'($urandom)};
        img[b][s] = w_rec;
        if (b == 1) begin
          r_addr = SW'(SLOTS-1-s); #1;
          checks++; if (r_rec != img[0][SLOTS-1-s]) begin failures++; $display("prev port %0d", s); end
        end
      end
      @(negedge clk); w_en = 0;
    end
    for (int s = 0; s < SLOTS; s += 5) begin
      w_addr = SW'(s); #1;
      checks++; if (w_rdata != img[1][s]) begin failures++; $display("cur port %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_memory_if: checks the two channels of the 64-bit link. Normal mode:
// random GMM and Viterbi traffic must appear unchanged on channels 0 and 1
// and read data must come back on the right half of the response word.
// Test mode: the Viterbi channel must be held off and a readout must write
// every result word, in state order, two scores per word, to
// t_base + s*FRAMES/2 + k, under random back-pressure, then pulse
// readout_done. The result row is a function of the requested state.
module tb_memory_if;
  import hmm_pkg::*;
  localparam int STATES = 5, FRAMES = 4, S_W = 3;
  logic clk = 0, rst_n = 0, test_mode = 0;
  logic g_req_valid = 0, g_req_ready, g_rsp_valid, v_req_valid = 0, v_req_ready, v_rsp_valid;
  bus_req_t g_req = '0, v_req = '0;
  logic [31:0] g_rsp_data, v_rsp_data;
  logic readout_start = 0, readout_done;
  logic [31:0] t_base = 32'h4000;
  logic [S_W-1:0] t_state;
  logic [FRAMES*16-1:0] t_row;
  logic [1:0] ext_req_valid, ext_req_ready = 0, ext_rsp_valid = 0;
  logic [31:0] ext_addr [2];
  logic ext_we;
  logic [31:0] ext_wdata;
  logic [63:0] ext_rsp_data = 0;
  int checks = 0, failures = 0;
  memory_if #(.STATES(STATES), .FRAMES(FRAMES)) dut (.*);

  function automatic logic [15:0] score(int s, int f); return 16'(s * 977 + f * 131 + 5); endfunction
  always_comb for (int f = 0; f < FRAMES; f++) t_row[f*16 +: 16] = score(int'(t_state), f);

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic ck(bit c, string m); checks++; if (!c) begin failures++; $display("FAIL %s", m); end endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      g_req_valid = $urandom_range(0, 1); v_req_valid = $urandom_range(0, 1);
      g_req = '{we: 0, addr: $urandom, wdata: $urandom};
      v_req = '{we: $urandom_range(0, 1), addr: $urandom, wdata: $urandom};
      ext_req_ready = 2'($urandom); ext_rsp_valid = 2'($urandom); ext_rsp_data = {$urandom, $urandom};
      #1;
      ck(ext_req_valid == {v_req_valid, g_req_valid} && ext_addr[0] == g_req.addr && ext_addr[1] == v_req.addr
         && ext_we == v_req.we && ext_wdata == v_req.wdata, "request passthrough");
      ck(g_req_ready == ext_req_ready[0] && v_req_ready == ext_req_ready[1], "ready passthrough");
      ck(g_rsp_valid == ext_rsp_valid[0] && v_rsp_valid == ext_rsp_valid[1] &&
         g_rsp_data == ext_rsp_data[31:0] && v_rsp_data == ext_rsp_data[63:32], "response passthrough");
    end
    @(negedge clk); g_req_valid = 0; ext_rsp_valid = 0;
    for (int rep = 0; rep < 2; rep++) begin
      int s, k, done_seen;
      @(negedge clk); test_mode = 1; v_req_valid = 1; ext_req_ready = 2'b11; #1;
      ck(v_req_ready == 0 && ext_req_valid[1] == 0, "viterbi held off");
      readout_start = 1; @(negedge clk); readout_start = 0;
      s = 0; k = 0; done_seen = 0;
      while (!done_seen) begin
        ext_req_ready[1] = ($urandom_range(0, 2) != 0); ext_rsp_valid[1] = 1; #1;
        ck(v_req_ready == 0 && v_rsp_valid == 0, "viterbi held off during readout");
        if (ext_req_valid[1] && ext_req_ready[1]) begin
          ck(s < STATES, "too many words");
          ck(ext_we && ext_addr[1] == t_base + s*FRAMES/2 + k &&
             ext_wdata == {score(s, 2*k+1), score(s, 2*k)}, $sformatf("readout word s%0d k%0d", s, k));
          if (k == FRAMES/2 - 1) begin k = 0; s++; end else k++;
        end
        @(negedge clk); if (readout_done) done_seen = 1;
        if (!done_seen) begin #1; ck(ext_req_valid[1] || s < STATES, "idle before done"); end
      end
      ck(s == STATES && k == 0, "readout length");
      ext_rsp_valid = 0; test_mode = 0; v_req_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_line_cache: random lookups over an address range four times the cache
// size (so lines are evicted and refetched). Every hit must return the line
// the memory holds, and the cache must miss exactly when a direct-mapped
// model kept here says so; a miss must be served within LINE_WORDS+LAT+4
// cycles.
module tb_line_cache;
  import hmm_pkg::*;
  localparam int LINES = 16, LW = 8, LAT = 3;
  logic clk = 0, rst_n = 0, lk_valid = 0;
  logic [31:0] lk_addr = 0;
  logic lk_hit, miss, filling, req_valid, req_ready, rsp_valid;
  logic [LW*32-1:0] lk_line;
  bus_req_t req;
  logic [31:0] rsp_data;
  int checks = 0, failures = 0, misses = 0, ref_misses = 0;
  int ref_tag [LINES];
  line_cache #(.LINES(LINES), .LINE_WORDS(LW)) dut (.*);
  ext_mem_model #(.LAT(LAT), .STALL_PCT(20)) mem (.clk, .req_valid, .req_ready, .req, .rsp_valid, .rsp_data);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && miss) misses++;
  initial begin
    for (int a = 0; a < LINES*LW*4; a++) mem.wr(32'h5000 + a, $urandom);
    for (int l = 0; l < LINES; l++) ref_tag[l] = -1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int a, line, cyc;
      a = 32'h5000 + $urandom_range(0, LINES*LW*4 - 1);
      line = a / LW;
      if (ref_tag[line % LINES] != line) begin ref_misses++; ref_tag[line % LINES] = line; end
      @(negedge clk); lk_valid = 1; lk_addr = a; cyc = 0;
      #1;
      while (!lk_hit) begin @(negedge clk); #1; cyc++; end
      checks++;
      for (int w = 0; w < LW; w++)
        if (lk_line[w*32 +: 32] != mem.rd(line*LW + w)) begin failures++; $display("addr %h word %0d", a, w); break; end
      checks++;
      if (cyc > 0 && cyc > 2*(LW + LAT + 4)) begin failures++; $display("miss took %0d cycles", cyc); end
      @(negedge clk); lk_valid = 0;
    end
    checks++;
    if (misses != ref_misses) begin failures++; $display("misses %0d expected %0d", misses, ref_misses); end
    $display("misses %0d", misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

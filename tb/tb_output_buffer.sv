// tb_output_buffer: pushes random records as fast as the buffer accepts them
// into a drain that refuses 50% of the cycles, so the buffer runs full.
// Checks that every record arrives as two writes (low word first) at
// base + 2n in push order, that full stops pushes at DEPTH records and that
// clear restarts the addresses.
module tb_output_buffer;
  import hmm_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, full, empty, req_valid, req_ready = 0;
  trec_t rec = '0;
  bus_req_t req;
  logic [31:0] base = 32'h9000;
  trec_t sent [$];
  int checks = 0, failures = 0, nrec = 0, nfull = 0, half = 0;
  logic [31:0] lo;
  output_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(negedge clk) req_ready <= ($urandom_range(0, 1) == 1);
  always @(posedge clk) if (rst_n && req_valid && req_ready) begin
    checks++;
    if (!req.we || req.addr != base + 2*nrec + half) begin failures++; $display("addr %h", req.addr); end
    if (half == 0) begin lo = req.wdata; half = 1; end
    else begin
      trec_t e; e = sent.pop_front();
      checks++; if ({req.wdata, lo} != 64'(e)) begin failures++; $display("record %0d differs", nrec); end
      half = 0; nrec++;
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int u = 0; u < 2; u++) begin
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        if (full) nfull++;
        checks++; if (full != (sent.size() >= DEPTH)) begin failures++; $display("full flag wrong at %0d", sent.size()); end
        push = !full; rec = trec_t'({$urandom, $urandom});
        if (push) sent.push_back(rec);
      end
      @(negedge clk); push = 0;
      while (!empty) @(negedge clk);
      checks++; if (sent.size() != 0) begin failures++; $display("left %0d", sent.size()); end
      @(negedge clk); clear = 1; @(negedge clk); clear = 0; nrec = 0;
    end
    checks++; if (nfull == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

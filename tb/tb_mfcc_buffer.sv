// tb_mfcc_buffer: fills the buffer with random bus words and reads every
// dimension back, checking each frame's component against the frame-major
// packing (bus word k = components 2k and 2k+1).
module tb_mfcc_buffer;
  import hmm_pkg::*;
  localparam int FRAMES = 20, DIM = 25, NW = (FRAMES*DIM+1)/2;
  logic clk = 0, we = 0;
  logic [$clog2(NW)-1:0] waddr = 0;
  logic [31:0] wdata = 0;
  logic [$clog2(DIM)-1:0] rd_dim = 0;
  logic signed [15:0] x [FRAMES];
  logic [31:0] img [NW];
  int checks = 0, failures = 0;
  mfcc_buffer #(.FRAMES(FRAMES), .DIM(DIM)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int k = 0; k < NW; k++) begin
        @(negedge clk); we = 1; waddr = k[$clog2(NW)-1:0]; wdata = $urandom; img[k] = wdata;
      end
      @(negedge clk); we = 0;
      for (int d = 0; d < DIM; d++) begin
        rd_dim = d[$clog2(DIM)-1:0]; #1;
        for (int f = 0; f < FRAMES; f++) begin
          int i;
          logic [15:0] e;
          i = f*DIM + d;
          e = (i % 2 == 1) ? img[i/2][31:16] : img[i/2][15:0];
          checks++;
          if (x[f] != $signed(e)) begin failures++; $display("f%0d d%0d got %h exp %h", f, d, x[f], e); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

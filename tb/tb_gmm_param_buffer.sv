// tb_gmm_param_buffer: writes different random states into the two banks
// and reads both back, also while the other bank is being rewritten, to show
// that the banks are independent (ping-pong operation).
module tb_gmm_param_buffer;
  import hmm_pkg::*;
  localparam int MIX = 16, DIM = 25, WPS = MIX*(DIM+1), AW = $clog2(WPS);
  logic clk = 0, we = 0, wbank = 0, rbank = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] img [2][WPS];
  int checks = 0, failures = 0;
  gmm_param_buffer #(.MIX(MIX), .DIM(DIM)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int b = 0; b < 2; b++) for (int a = 0; a < WPS; a++) begin
      @(negedge clk); we = 1; wbank = b[0]; waddr = AW'(a); wdata = $urandom; img[b][a] = wdata;
    end
    // read bank 0 while bank 1 is overwritten
    for (int a = 0; a < WPS; a++) begin
      @(negedge clk); we = 1; wbank = 1; waddr = AW'(a); wdata = $urandom; img[1][a] = wdata;
      rbank = 0; raddr = AW'(WPS-1-a); #1;
      checks++; if (rdata != img[0][WPS-1-a]) begin failures++; $display("bank0 %0d", a); end
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < WPS; a++) begin
      rbank = 1; raddr = AW'(a); #1;
      checks++; if (rdata != img[1][a]) begin failures++; $display("bank1 %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

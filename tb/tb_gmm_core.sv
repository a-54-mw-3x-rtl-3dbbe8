// tb_gmm_core: runs two batches through a reduced GMM core (4 frames,
// 5 states, 3 mixtures, 6 dimensions) against the external memory model,
// checks every result row against a reference computed here from the same
// random model (batch 0 full-range values that mostly saturate, batch 1
// values that keep the scores in range), and checks that a batch takes no more than
// STATES*(MIX*(DIM+1)+1+LAT+2) cycles plus the two initial loads.
module tb_gmm_core;
  import hmm_pkg::*;
  localparam int FRAMES = 4, STATES = 5, MIX = 3, DIM = 6, LAT = 3;
  localparam int WPS = MIX*(DIM+1);
  localparam int MWORDS = (FRAMES*DIM+1)/2;
  localparam int unsigned MBASE = 32'h100, PBASE = 32'h1000;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic req_valid, req_ready, rsp_valid;
  bus_req_t req;
  logic [31:0] rsp_data;
  logic res_we;
  logic [$clog2(STATES)-1:0] res_addr;
  logic [FRAMES*16-1:0] res_data;
  int checks = 0, failures = 0;
  logic [FRAMES*16-1:0] got [STATES];
  bit seen [STATES];

  gmm_core #(.FRAMES(FRAMES), .STATES(STATES), .MIX(MIX), .DIM(DIM)) dut (
    .clk, .rst_n, .start, .mfcc_base(MBASE), .param_base(PBASE), .busy, .done,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_data, .res_we, .res_addr, .res_data);
  ext_mem_model #(.LAT(LAT)) mem (.clk, .req_valid, .req_ready, .req, .rsp_valid, .rsp_data);

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (res_we) begin got[res_addr] <= res_data; seen[res_addr] <= 1'b1; end

  function automatic longint ref_score(input int s, input int f);
    longint best = -32768, acc, sc, d;
    for (int m = 0; m < MIX; m++) begin
      acc = 0;
      for (int k = 0; k < DIM; k++) begin
        logic [31:0] w = mem.rd(PBASE + s*WPS + m*(DIM+1) + k);
        int fi = f*DIM + k;
        logic [31:0] xw = mem.rd(MBASE + fi/2);
        longint xv = (fi % 2 == 1) ? longint'($signed(xw[31:16])) : longint'($signed(xw[15:0]));
        d = xv - longint'($signed(w[31:16]));
        acc += ((d*d) * longint'(w[15:0])) >>> 16;
      end
      begin
        logic [31:0] cw = mem.rd(PBASE + s*WPS + m*(DIM+1) + DIM);
        sc = longint'($signed(cw[15:0])) - (acc >>> 1);
      end
      if (sc > 32767) sc = 32767; if (sc < -32768) sc = -32768;
      if (sc > best) best = sc;
    end
    return best;
  endfunction

  initial begin
    int cyc;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < MWORDS; i++)
        mem.wr(MBASE + i, (b == 0) ? $urandom : {16'($urandom_range(0, 1023) - 512), 16'($urandom_range(0, 1023) - 512)});
      for (int i = 0; i < STATES*WPS; i++)
        mem.wr(PBASE + i, (b == 0) ? $urandom : {16'($urandom_range(0, 1023) - 512), 16'($urandom_range(0, 48))});
      for (int s = 0; s < STATES; s++) seen[s] = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      for (int s = 0; s < STATES; s++) for (int f = 0; f < FRAMES; f++) begin
        longint e;
        e = ref_score(s, f);
        checks++;
        if (!seen[s] || longint'($signed(got[s][f*16 +: 16])) != e) begin
          failures++; $display("batch %0d state %0d frame %0d: got %0d exp %0d", b, s, f, $signed(got[s][f*16 +: 16]), e);
        end
      end
      checks++;
      if (cyc > MWORDS + WPS + 2*(LAT+2) + STATES*(WPS+1+LAT+2)) begin
        failures++; $display("batch took %0d cycles", cyc);
      end
      $display("batch %0d: %0d cycles", b, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mfcc_buffer: feature vectors of the frames of one GMM batch (20 frames of
// 25 16-bit MFCC components by default, 8,000 bits). It is filled from the
// 32-bit GMM bus, two components per bus word, in frame-major order: bus word
// k carries flat components 2k (bits 15:0) and 2k+1 (bits 31:16), flat
// component i being frame i / DIM, dimension i % DIM. For the GMM lanes it
// reads one dimension of every frame at once (combinational read), since all
// lanes consume the same dimension in the same cycle. Write takes effect at
// the clock edge. The buffer and its place on the GMM bus follow the
// published block diagram; the packing and read organisation are this
// design's choice.
module mfcc_buffer
  import hmm_pkg::*;
#(
  parameter int unsigned FRAMES = 20,
  parameter int unsigned DIM    = 25,
  localparam int unsigned NWORDS = (FRAMES*DIM+1)/2,
  localparam int unsigned WA_W   = $clog2(NWORDS),
  localparam int unsigned D_W    = $clog2(DIM)
)(
  input  logic                     clk,
  input  logic                     we,
  input  logic [WA_W-1:0]          waddr,
  input  logic [BUS_W-1:0]         wdata,
  input  logic [D_W-1:0]           rd_dim,
  output logic signed [FEAT_W-1:0] x [FRAMES]
);

  logic [FEAT_W-1:0] mem [2*NWORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[2*waddr]   <= wdata[FEAT_W-1:0];
      mem[2*waddr+1] <= wdata[BUS_W-1:FEAT_W];
    end
  end

  always_comb begin
    for (int f = 0; f < FRAMES; f++)
      x[f] = $signed(mem[f*DIM + int'(rd_dim)]);
  end

endmodule

// gmm_param_buffer: the two Gaussian parameter buffers of the GMM core
// ("buffer1" and "buffer2"). Each bank holds the parameters of one HMM state:
// MIX mixtures of DIM words {mean[31:16], 1/sigma^2[15:0]} followed by one
// word with the mixture constant C_m in bits 15:0, MIX*(DIM+1) = 416 words.
// While the lanes read the state in bank rbank, the bus loader writes the
// next state into the other bank, so parameter transfer and computation
// overlap. Writes land at the clock edge; reads are combinational. The
// ping-pong pair follows the published diagram; the word layout is this
// design's own.
module gmm_param_buffer
  import hmm_pkg::*;
#(
  parameter int unsigned MIX = 16,
  parameter int unsigned DIM = 25,
  localparam int unsigned WPS  = MIX*(DIM+1),
  localparam int unsigned A_W  = $clog2(WPS)
)(
  input  logic             clk,
  input  logic             we,
  input  logic             wbank,
  input  logic [A_W-1:0]   waddr,
  input  logic [BUS_W-1:0] wdata,
  input  logic             rbank,
  input  logic [A_W-1:0]   raddr,
  output logic [BUS_W-1:0] rdata
);

  logic [BUS_W-1:0] bank0 [WPS];
  logic [BUS_W-1:0] bank1 [WPS];

  always_ff @(posedge clk) begin
    if (we && !wbank) bank0[waddr] <= wdata;
    if (we &&  wbank) bank1[waddr] <= wdata;
  end

  assign rdata = rbank ? bank1[raddr] : bank0[raddr];

endmodule

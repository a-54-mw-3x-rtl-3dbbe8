// gmm_result_buffer: the two GMM result RAMs that decouple the GMM core from
// the Viterbi core. Each RAM holds log b_s(X_t) for STATES states and the
// FRAMES frames of one batch (2,000 x 20 x 16 bits = 640,000 bits per RAM).
// gmm_bank selects the RAM the GMM core writes; the Viterbi core reads the
// other one, so batch k+1 is computed while batch k is searched, and the
// sequencer flips gmm_bank between batches. A write stores the 20 scores of
// one state (one row). The Viterbi port reads one state of one frame; the
// test port reads a whole row of the GMM side for the result readout. Reads
// are combinational, writes land at the clock edge. The two-RAM pipeline is
// the published one; the row organisation is this design's choice.
module gmm_result_buffer
  import hmm_pkg::*;
#(
  parameter int unsigned STATES = 2000,
  parameter int unsigned FRAMES = 20,
  localparam int unsigned S_W = $clog2(STATES),
  localparam int unsigned F_W = $clog2(FRAMES)
)(
  input  logic                          clk,
  input  logic                          gmm_bank,
  // GMM core write port
  input  logic                          we,
  input  logic [S_W-1:0]                waddr,
  input  logic [FRAMES*GSCORE_W-1:0]    wdata,
  // Viterbi core read port (other bank)
  input  logic [S_W-1:0]                v_state,
  input  logic [F_W-1:0]                v_frame,
  output logic signed [GSCORE_W-1:0]    v_score,
  // test readout port (GMM bank)
  input  logic [S_W-1:0]                t_state,
  output logic [FRAMES*GSCORE_W-1:0]    t_row
);

  logic [FRAMES*GSCORE_W-1:0] ram0 [STATES];
  logic [FRAMES*GSCORE_W-1:0] ram1 [STATES];
  logic [FRAMES*GSCORE_W-1:0] vrow;

  always_ff @(posedge clk) begin
    if (we && !gmm_bank) ram0[waddr] <= wdata;
    if (we &&  gmm_bank) ram1[waddr] <= wdata;
  end

  assign vrow    = gmm_bank ? ram0[v_state] : ram1[v_state];
  assign v_score = $signed(vrow[int'(v_frame)*GSCORE_W +: GSCORE_W]);
  assign t_row   = gmm_bank ? ram1[t_state] : ram0[t_state];

endmodule

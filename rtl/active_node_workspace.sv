// active_node_workspace: the two active-node workspace RAMs of the Viterbi
// core. In each frame one bank holds the nodes that survived the previous
// frame (read by the controller through port r, one record per lookup) and
// the other bank collects the nodes of the current frame (read-modify-write
// by the trellis & token write module through port w, which reads at w_addr and writes at w_waddr). cur_bank names the
// bank being written; the roles swap at every frame. Reads are
// combinational, writes land at the clock edge. Records are anode_t (node,
// score, trigram history word, trellis token). The two-RAM organisation is
// published; SLOTS = 4,096 is this design's choice, the smallest power of two
// above the published beam width of 3,000 nodes.
module active_node_workspace
  import hmm_pkg::*;
#(
  parameter int unsigned SLOTS = 4096,
  localparam int unsigned SL_W = $clog2(SLOTS)
)(
  input  logic            clk,
  input  logic            cur_bank,
  input  logic [SL_W-1:0] r_addr,
  output anode_t          r_rec,
  input  logic [SL_W-1:0] w_addr,
  output anode_t          w_rdata,
  input  logic [SL_W-1:0] w_waddr,
  input  logic            w_en,
  input  anode_t          w_rec
);

  anode_t ram0 [SLOTS];
  anode_t ram1 [SLOTS];

  always_ff @(posedge clk) begin
    if (w_en && !cur_bank) ram0[w_waddr] <= w_rec;
    if (w_en &&  cur_bank) ram1[w_waddr] <= w_rec;
  end

  assign r_rec   = cur_bank ? ram0[r_addr] : ram1[r_addr];
  assign w_rdata = cur_bank ? ram1[w_addr] : ram0[w_addr];

endmodule

// active_node_map: direct-mapped table from an HMM node to the workspace
// slot that holds it in the current frame, so that a transition into a node
// that is already active is merged (max of scores) instead of creating a
// second copy. It is indexed by the low bits of the node number and stores
// only the slot; the trellis & token write module confirms a hit by reading
// that slot and comparing its node and by checking the slot is below the
// frame's node count, so the table needs no clearing between frames and
// stale entries are harmless. When two active nodes share an entry, the
// newer one takes it (a later transition into the older node then finds no
// entry and gives it a second slot). ENTRIES = 32,768 entries of 12 bits
// (393,216 bits) match the published
// 0.4 Mbit; the published block is a cache of a map held in the external
// data base, which this design replaces by the on-chip table alone.
// Combinational read, write at the clock edge.
module active_node_map
  import hmm_pkg::*;
#(
  parameter int unsigned ENTRIES = 32768,
  parameter int unsigned SLOTS   = 4096,
  localparam int unsigned IX_W = $clog2(ENTRIES),
  localparam int unsigned SL_W = $clog2(SLOTS)
)(
  input  logic              clk,
  input  logic [NODE_W-1:0] node,
  output logic [SL_W-1:0]   slot,
  input  logic              we,
  input  logic [SL_W-1:0]   wslot
);
  logic [SL_W-1:0] tbl [ENTRIES];
  logic [IX_W-1:0] ix;
  assign ix   = node[IX_W-1:0];
  assign slot = tbl[ix];
  always_ff @(posedge clk) if (we) tbl[ix] <= wslot;
endmodule

// output_buffer: FIFO of 64-bit trellis records (word ends and the final
// result) on their way to the external data base, 32 records = 2 Kbit. A
// record is pushed in one cycle when full is low. The drain side writes
// every record as two 32-bit bus writes, low word first, to
// base + 2*n where n counts the records written since reset or since
// clear (given at the start of an utterance, with the buffer empty), so record n
// lands at the address the trellis token n points to. The 2 Kbit output
// buffer on the Viterbi bus is published; the record format and addressing
// are this design's.
module output_buffer
  import hmm_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned P_W = $clog2(DEPTH)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              push,
  input  trec_t             rec,
  output logic              full,
  output logic              empty,
  input  logic [ADDR_W-1:0] base,
  output logic              req_valid,
  input  logic              req_ready,
  output bus_req_t          req
);
  trec_t          mem [DEPTH];
  logic [P_W:0]   wp, rp;
  logic           half;        // 0: low word next, 1: high word next
  logic [ADDR_W-1:0] n;
  logic [63:0]    head;

  assign full  = (wp - rp) == (P_W+1)'(DEPTH);
  assign empty = (wp == rp);
  assign head  = mem[rp[P_W-1:0]];
  assign req_valid = !empty;
  assign req = '{we: 1'b1, addr: base + (n << 1) + ADDR_W'(half),
                 wdata: half ? head[63:32] : head[31:0]};

  always_ff @(posedge clk) if (push && !full) mem[wp[P_W-1:0]] <= rec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; half <= 1'b0; n <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (req_valid && req_ready) begin
        half <= ~half;
        if (half) begin rp <= rp + 1'b1; n <= n + 1'b1; end
      end
      if (clear) n <= '0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
endmodule

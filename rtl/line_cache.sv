// line_cache: direct-mapped, read-only level-1 cache of the external data
// base, used for the N-gram cache and for the lexicon (tree data base) cache
// of the Viterbi core. A line is LINE_WORDS 32-bit words (8 by default), so
// one hit delivers a whole line: for the N-gram cache that is one successor
// entry for each of the 8 transition paths.
//
// Lookup: while lk_valid is high the cache compares the tag of lk_addr
// (combinationally) and raises lk_hit with the line in lk_line. On a miss it
// fetches the line over its bus port (LINE_WORDS reads from the aligned line
// address, answered in order), writes it and then hits; the requester simply
// holds lk_valid until lk_hit. miss pulses once per fill. Lines are never
// dirty: the data base is only read. Reset clears the valid bits.
// That the Viterbi core has these caches, and their capacities, are
// published (0.4 Mbit for the N-gram cache, hence 1,024 lines of 256 bits by
// default); mapping, line size and the fill protocol are this design's.
module line_cache
  import hmm_pkg::*;
#(
  parameter int unsigned LINES      = 1024,
  parameter int unsigned LINE_WORDS = 8,
  localparam int unsigned OFF_W = $clog2(LINE_WORDS),
  localparam int unsigned IDX_W = $clog2(LINES),
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W
)(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        lk_valid,
  input  logic [ADDR_W-1:0]           lk_addr,
  output logic                        lk_hit,
  output logic [LINE_WORDS*BUS_W-1:0] lk_line,
  output logic                        miss,
  output logic                        filling,
  // bus port
  output logic                        req_valid,
  input  logic                        req_ready,
  output bus_req_t                    req,
  input  logic                        rsp_valid,
  input  logic [BUS_W-1:0]            rsp_data
);

  logic [LINE_WORDS*BUS_W-1:0] data [LINES];
  logic [TAG_W-1:0]            tags [LINES];
  logic [LINES-1:0]            valid;

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  assign idx = lk_addr[OFF_W +: IDX_W];
  assign tag = lk_addr[ADDR_W-1 -: TAG_W];

  assign lk_hit  = lk_valid && valid[idx] && (tags[idx] == tag) && !filling;
  assign lk_line = data[idx];

  logic [OFF_W:0]              iss, rcv;
  logic [ADDR_W-1:0]           fbase;
  logic [LINE_WORDS*BUS_W-1:0] fbuf;

  assign req_valid = filling && (iss < (OFF_W+1)'(LINE_WORDS));
  assign req       = '{we: 1'b0, addr: fbase + ADDR_W'(iss), wdata: '0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0; filling <= 1'b0; miss <= 1'b0;
      iss <= '0; rcv <= '0; fbase <= '0; fbuf <= '0;
    end else begin
      miss <= 1'b0;
      if (!filling) begin
        if (lk_valid && !(valid[idx] && tags[idx] == tag)) begin
          filling <= 1'b1; miss <= 1'b1;
          iss <= '0; rcv <= '0;
          fbase <= {lk_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
        end
      end else begin
        if (req_valid && req_ready) iss <= iss + 1'b1;
        if (rsp_valid) begin
          fbuf[rcv[OFF_W-1:0]*BUS_W +: BUS_W] <= rsp_data;
          rcv <= rcv + 1'b1;
        end
        if (rcv == (OFF_W+1)'(LINE_WORDS)) begin
          filling <= 1'b0;
          valid[fbase[OFF_W +: IDX_W]] <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (filling && rcv == (OFF_W+1)'(LINE_WORDS)) begin
      data[fbase[OFF_W +: IDX_W]] <= fbuf;
      tags[fbase[OFF_W +: IDX_W]] <= fbase[ADDR_W-1 -: TAG_W];
    end
  end

endmodule

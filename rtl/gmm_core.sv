// gmm_core: GMM computation for a batch of FRAMES frames (20 by default).
//
// The core streams the acoustic model over its own 32-bit GMM bus once per
// batch and evaluates every state for all frames of the batch in parallel,
// one gmm_lane per frame. That is what lets a 32-bit bus sustain several
// times real time: every parameter word fetched is used FRAMES times.
//
// Sequence after start:
//   1. load the batch's MFCC vectors, (FRAMES*DIM)/2 words from mfcc_base,
//      into mfcc_buffer;
//   2. load state 0's parameters, MIX*(DIM+1) words from param_base, into
//      parameter bank 0;
//   3. for each state s: the lanes consume bank s%2 at one word per cycle
//      (DIM words {mu, 1/sigma^2} then one word C_m per mixture) while the
//      loader fills the other bank with state s+1 from
//      param_base + (s+1)*MIX*(DIM+1); then the FRAMES scores of state s are
//      written to the result buffer in one cycle.
//   4. done pulses for one cycle.
// With a memory that returns one word per cycle, a state takes MIX*(DIM+1)+1
// cycles (417 by default) and a batch about STATES*417 cycles.
//
// Bus: req_valid/req_ready handshake, reads only, any number outstanding;
// rsp_valid/rsp_data return the words in request order.
// The 20-frame parallel GMM, the ping-pong parameter buffers and the 32-bit
// GMM bus are published; the order of the streams, the word layout and the
// one-word-per-cycle schedule are this design's.
module gmm_core
  import hmm_pkg::*;
#(
  parameter int unsigned FRAMES = 20,
  parameter int unsigned STATES = 2000,
  parameter int unsigned MIX    = 16,
  parameter int unsigned DIM    = 25,
  localparam int unsigned WPS    = MIX*(DIM+1),
  localparam int unsigned MWORDS = (FRAMES*DIM+1)/2,
  localparam int unsigned S_W    = $clog2(STATES),
  localparam int unsigned P_W    = $clog2(WPS),
  localparam int unsigned MA_W   = $clog2(MWORDS),
  localparam int unsigned D_W    = $clog2(DIM+1)
)(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [ADDR_W-1:0]          mfcc_base,
  input  logic [ADDR_W-1:0]          param_base,
  output logic                       busy,
  output logic                       done,
  // GMM bus
  output logic                       req_valid,
  input  logic                       req_ready,
  output bus_req_t                   req,
  input  logic                       rsp_valid,
  input  logic [BUS_W-1:0]           rsp_data,
  // result buffer write port
  output logic                       res_we,
  output logic [S_W-1:0]             res_addr,
  output logic [FRAMES*GSCORE_W-1:0] res_data
);

  typedef enum logic [2:0] { G_IDLE, G_LD_MFCC, G_LD_P0, G_RUN, G_WRITE } gstate_e;
  gstate_e st;

  // ---------------- bus loader ----------------
  logic              ld_active;
  logic              ld_to_mfcc;   // destination: MFCC buffer, else parameter bank
  logic              ld_bank;
  logic [ADDR_W-1:0] ld_base;
  logic [P_W:0]      ld_count;
  logic [P_W:0]      ld_iss, ld_rcv;
  logic              ld_done;

  assign ld_done   = ld_active && (ld_rcv == ld_count);
  assign req_valid = ld_active && (ld_iss < ld_count);
  assign req       = '{we: 1'b0, addr: ld_base + ADDR_W'(ld_iss), wdata: '0};

  // ---------------- compute ----------------
  logic [S_W-1:0] s_idx;     // state under computation
  logic           rbank;
  logic [P_W-1:0] j;         // word within state
  logic [D_W-1:0] pos;       // word within mixture (DIM = constant word)
  logic [BUS_W-1:0] pword;
  logic signed [FEAT_W-1:0] xcol [FRAMES];
  logic run_cyc, lane_dim, lane_end, lane_start;
  logic signed [GSCORE_W-1:0] lane_score [FRAMES];

  mfcc_buffer #(.FRAMES(FRAMES), .DIM(DIM)) u_mfcc (
    .clk, .we(rsp_valid && ld_to_mfcc), .waddr(MA_W'(ld_rcv)), .wdata(rsp_data),
    .rd_dim(pos[$clog2(DIM)-1:0]), .x(xcol));

  gmm_param_buffer #(.MIX(MIX), .DIM(DIM)) u_pbuf (
    .clk, .we(rsp_valid && !ld_to_mfcc), .wbank(ld_bank), .waddr(P_W'(ld_rcv)),
    .wdata(rsp_data), .rbank(rbank), .raddr(j), .rdata(pword));

  assign run_cyc    = (st == G_RUN);
  assign lane_dim   = run_cyc && (pos != D_W'(DIM));
  assign lane_end   = run_cyc && (pos == D_W'(DIM));
  assign lane_start = run_cyc && (j == '0);

  for (genvar f = 0; f < FRAMES; f++) begin : g_lane
    gmm_lane u_lane (
      .clk, .rst_n, .start_state(lane_start), .dim_valid(lane_dim), .mix_end(lane_end),
      .x(xcol[f]), .mu($signed(pword[31:16])), .ivar(pword[15:0]),
      .c($signed(pword[15:0])), .score(lane_score[f]));
    assign res_data[f*GSCORE_W +: GSCORE_W] = lane_score[f];
  end

  assign res_we   = (st == G_WRITE);
  assign res_addr = s_idx;
  assign busy     = (st != G_IDLE);

  // start a load job
  task automatic start_load(input logic to_mfcc, input logic bank,
                            input logic [ADDR_W-1:0] base, input int unsigned cnt);
    ld_active  <= 1'b1;
    ld_to_mfcc <= to_mfcc;
    ld_bank    <= bank;
    ld_base    <= base;
    ld_count   <= (P_W+1)'(cnt);
    ld_iss     <= '0;
    ld_rcv     <= '0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= G_IDLE; done <= 1'b0;
      ld_active <= 1'b0; ld_to_mfcc <= 1'b0; ld_bank <= 1'b0; ld_base <= '0;
      ld_count <= '0; ld_iss <= '0; ld_rcv <= '0;
      s_idx <= '0; rbank <= 1'b0; j <= '0; pos <= '0;
    end else begin
      done <= 1'b0;
      if (req_valid && req_ready) ld_iss <= ld_iss + 1'b1;
      if (rsp_valid && ld_active) ld_rcv <= ld_rcv + 1'b1;
      unique case (st)
        G_IDLE: if (start) begin
          start_load(1'b1, 1'b0, mfcc_base, MWORDS);
          st <= G_LD_MFCC;
        end
        G_LD_MFCC: if (ld_done) begin
          start_load(1'b0, 1'b0, param_base, WPS);
          s_idx <= '0; rbank <= 1'b0;
          st <= G_LD_P0;
        end
        G_LD_P0: if (ld_done) begin
          ld_active <= 1'b0;
          if (STATES > 1) start_load(1'b0, 1'b1, param_base + ADDR_W'(WPS), WPS);
          j <= '0; pos <= '0;
          st <= G_RUN;
        end
        G_RUN: begin
          if (ld_done) ld_active <= 1'b0;
          j   <= j + 1'b1;
          pos <= (pos == D_W'(DIM)) ? '0 : pos + 1'b1;
          if (j == P_W'(WPS-1)) st <= G_WRITE;
        end
        G_WRITE: begin
          if (ld_done) ld_active <= 1'b0;
          if (s_idx == S_W'(STATES-1)) begin
            done <= 1'b1;
            ld_active <= 1'b0;
            st <= G_IDLE;
          end else if (!ld_active || ld_done) begin
            // state s_idx+1 is in bank ~rbank; fetch s_idx+2 into bank rbank
            if (32'(s_idx) + 2 < STATES)
              start_load(1'b0, rbank, param_base + ADDR_W'((32'(s_idx) + 2) * WPS), WPS);
            else
              ld_active <= 1'b0;
            s_idx <= s_idx + 1'b1;
            rbank <= ~rbank;
            j <= '0; pos <= '0;
            st <= G_RUN;
          end
        end
        default: st <= G_IDLE;
      endcase
    end
  end

  // the loader never gets more responses than it asked for
  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> ld_active && (ld_rcv < ld_iss));

endmodule

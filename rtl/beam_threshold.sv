// beam_threshold: threshold calculator of the Viterbi core. Pruning keeps a
// candidate whose score is at least (best score so far in the frame) -
// margin. At the end of every frame this block rescales the margin so that
// the number of surviving nodes moves toward the beam width BEAM:
//   margin' = clamp(margin * BEAM / count, MIN_MARGIN, MAX_MARGIN)
// (count = 0 gives MAX_MARGIN). The quotient comes from a restoring divider
// that produces one bit per cycle; done follows start by NUM_W+2 cycles
// (NUM_W = 35 by default).
// margin holds its value between updates and is INIT_MARGIN after reset
// and after init (the start of an utterance).
// A divider feeding the beam threshold and the beam width of 3,000 are
// published; the update rule is this design's own.
module beam_threshold
  import hmm_pkg::*;
#(
  parameter int unsigned BEAM        = 3000,
  parameter int unsigned CNT_W       = 13,
  parameter int unsigned INIT_MARGIN = 4096,
  parameter int unsigned MIN_MARGIN  = 64,
  parameter int unsigned MAX_MARGIN  = 1 << 20,
  localparam int unsigned M_W   = VSCORE_W - 1,
  localparam int unsigned NUM_W = M_W + 12
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,   // new utterance: margin back to INIT_MARGIN
  input  logic             start,
  input  logic [CNT_W-1:0] count,
  output logic             busy,
  output logic             done,
  output logic [M_W-1:0]   margin
);
  logic [NUM_W-1:0] num, quo;
  logic [CNT_W:0]   rem;
  logic [CNT_W-1:0] den;
  logic [$clog2(NUM_W+1)-1:0] bitn;
  logic [CNT_W:0]   trial;

  assign trial = {rem[CNT_W-1:0], num[NUM_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; margin <= M_W'(INIT_MARGIN);
      num <= '0; quo <= '0; rem <= '0; den <= '0; bitn <= '0;
    end else begin
      done <= 1'b0;
      if (init) begin
        margin <= M_W'(INIT_MARGIN); busy <= 1'b0;
      end else if (start && !busy) begin
        if (count == '0) begin
          margin <= M_W'(MAX_MARGIN); done <= 1'b1;
        end else begin
          busy <= 1'b1;
          num  <= NUM_W'(margin) * NUM_W'(BEAM);
          den  <= count; rem <= '0; quo <= '0;
          bitn <= ($clog2(NUM_W+1))'(NUM_W);
        end
      end else if (busy) begin
        if (bitn != '0) begin
          if (trial >= {1'b0, den}) begin
            rem <= trial - {1'b0, den}; quo <= {quo[NUM_W-2:0], 1'b1};
          end else begin
            rem <= trial;               quo <= {quo[NUM_W-2:0], 1'b0};
          end
          num  <= {num[NUM_W-2:0], 1'b0};
          bitn <= bitn - 1'b1;
        end else begin
          busy <= 1'b0; done <= 1'b1;
          if (quo < NUM_W'(MIN_MARGIN))      margin <= M_W'(MIN_MARGIN);
          else if (quo > NUM_W'(MAX_MARGIN)) margin <= M_W'(MAX_MARGIN);
          else                               margin <= M_W'(quo);
        end
      end
    end
  end
endmodule

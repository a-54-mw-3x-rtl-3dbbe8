// memory_if: the chip's interface to the external data base (the FPGA with
// its level-2 cache and the SDRAM). The GMM core and the Viterbi core each
// have their own 32-bit bus so that both can stream at once; memory_if puts
// them side by side on the 64-bit external link: channel 0 carries the GMM
// requests and returns its read data on ext_rsp_data[31:0], channel 1
// carries the Viterbi requests and returns on ext_rsp_data[63:32].
//
// Only channel 1 has write data pins. They are shared: in normal operation
// they carry the Viterbi core's trellis writes; in test mode, after a GMM
// batch, readout_start streams the GMM result RAM that the GMM core wrote out
// through them, FRAMES/2 words per state (two 16-bit scores per word, lower
// frame in bits 15:0) to t_base + s*FRAMES/2 + k, and pulses readout_done.
// The Viterbi channel is held off (v_req_ready low) in test mode.
// Each channel: valid/ready requests, in-order read responses (rsp_valid).
// The 64-bit link, the two 32-bit buses and the pin sharing with a GMM test
// output are published; the channel protocol and readout order are this
// design's.
module memory_if
  import hmm_pkg::*;
#(
  parameter int unsigned STATES = 2000,
  parameter int unsigned FRAMES = 20,
  localparam int unsigned S_W = $clog2(STATES),
  localparam int unsigned WPS = FRAMES/2,
  localparam int unsigned K_W = (WPS > 1) ? $clog2(WPS) : 1
)(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        test_mode,
  // GMM core bus (reads)
  input  logic                        g_req_valid,
  output logic                        g_req_ready,
  input  bus_req_t                    g_req,
  output logic                        g_rsp_valid,
  output logic [BUS_W-1:0]            g_rsp_data,
  // Viterbi core bus
  input  logic                        v_req_valid,
  output logic                        v_req_ready,
  input  bus_req_t                    v_req,
  output logic                        v_rsp_valid,
  output logic [BUS_W-1:0]            v_rsp_data,
  // GMM result test readout
  input  logic                        readout_start,
  input  logic [ADDR_W-1:0]           t_base,
  output logic [S_W-1:0]              t_state,
  input  logic [FRAMES*GSCORE_W-1:0]  t_row,
  output logic                        readout_done,
  // external 64-bit link
  output logic [1:0]                  ext_req_valid,
  input  logic [1:0]                  ext_req_ready,
  output logic [ADDR_W-1:0]           ext_addr [2],
  output logic                        ext_we,
  output logic [BUS_W-1:0]            ext_wdata,
  input  logic [1:0]                  ext_rsp_valid,
  input  logic [2*BUS_W-1:0]          ext_rsp_data
);

  logic          ro_active;
  logic [K_W-1:0] ro_k;
  logic [ADDR_W-1:0] ro_addr;

  // channel 0: GMM
  assign ext_req_valid[0] = g_req_valid;
  assign ext_addr[0]      = g_req.addr;
  assign g_req_ready      = ext_req_ready[0];
  assign g_rsp_valid      = ext_rsp_valid[0];
  assign g_rsp_data       = ext_rsp_data[BUS_W-1:0];

  // channel 1: Viterbi, or the GMM result readout in test mode
  always_comb begin
    if (test_mode) begin
      ext_req_valid[1] = ro_active;
      ext_addr[1]      = ro_addr;
      ext_we           = 1'b1;
      ext_wdata        = t_row[int'(ro_k)*BUS_W +: BUS_W];
      v_req_ready      = 1'b0;
    end else begin
      ext_req_valid[1] = v_req_valid;
      ext_addr[1]      = v_req.addr;
      ext_we           = v_req.we;
      ext_wdata        = v_req.wdata;
      v_req_ready      = ext_req_ready[1];
    end
  end
  assign v_rsp_valid = ext_rsp_valid[1] && !test_mode;
  assign v_rsp_data  = ext_rsp_data[2*BUS_W-1:BUS_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ro_active <= 1'b0; ro_k <= '0; t_state <= '0; ro_addr <= '0; readout_done <= 1'b0;
    end else begin
      readout_done <= 1'b0;
      if (!ro_active) begin
        if (readout_start && test_mode) begin
          ro_active <= 1'b1; ro_k <= '0; t_state <= '0; ro_addr <= t_base;
        end
      end else if (ext_req_ready[1]) begin
        ro_addr <= ro_addr + 1'b1;
        if (ro_k == K_W'(WPS-1)) begin
          ro_k <= '0;
          if (t_state == S_W'(STATES-1)) begin
            ro_active <= 1'b0; readout_done <= 1'b1;
          end else t_state <= t_state + 1'b1;
        end else ro_k <= ro_k + 1'b1;
      end
    end
  end

endmodule

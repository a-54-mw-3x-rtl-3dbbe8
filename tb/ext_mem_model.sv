// ext_mem_model: behavioural model of the external data base (the SDRAM
// behind the FPGA's level-2 cache) as seen from one 32-bit bus of the chip.
// Sparse word-addressed storage, unwritten words read as zero. Requests are
// always accepted; a read returns its word LAT cycles later, in order.
// Writes are stored immediately. With STALL_PCT above zero, req_ready drops
// on randomly chosen cycles. The model refuses all requests for its first
// four cycles, while the chip is still held in reset (its registers hold
// arbitrary values until the first reset edge). Testbench only.
module ext_mem_model
  import hmm_pkg::*;
#(
  parameter int unsigned LAT = 4,
  parameter int unsigned STALL_PCT = 0   // chance in percent that a cycle refuses requests
)(
  input  logic              clk,
  input  logic              req_valid,
  output logic              req_ready,
  input  bus_req_t          req,
  output logic              rsp_valid,
  output logic [BUS_W-1:0]  rsp_data
);
  logic [BUS_W-1:0] mem [int unsigned];
  logic              pv [LAT+1];
  logic [BUS_W-1:0]  pd [LAT+1];
  int unsigned n_reads = 0, n_writes = 0;

  logic stall = 1'b1;
  int unsigned ncyc = 0;
  assign req_ready = !stall;
  always @(negedge clk) begin
    ncyc <= ncyc + 1;
    stall <= (ncyc < 4) || (int'($urandom_range(0, 99)) < int'(STALL_PCT));
  end

  function automatic logic [BUS_W-1:0] rd(input int unsigned a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction
  function automatic void wr(input int unsigned a, input logic [BUS_W-1:0] d);
    mem[a] = d;
  endfunction

  initial for (int i = 0; i <= LAT; i++) begin pv[i] = 1'b0; pd[i] = '0; end

  always @(posedge clk) begin
    pv[0] <= req_valid && req_ready && !req.we;
    pd[0] <= rd(req.addr);
    for (int i = 1; i <= LAT; i++) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    if (req_valid && req_ready && req.we) begin mem[req.addr] = req.wdata; n_writes++; end
    if (req_valid && req_ready && !req.we) n_reads++;
  end
  assign rsp_valid = pv[LAT-1];
  assign rsp_data  = pd[LAT-1];
endmodule

// tb_active_node_map: writes slots for random nodes and reads them back,
// including two nodes that share an entry (the later one must win).
module tb_active_node_map;
  import hmm_pkg::*;
  localparam int ENTRIES = 32768, SLOTS = 4096;
  logic clk = 0, we = 0;
  logic [NODE_W-1:0] node = 0;
  logic [11:0] slot, wslot = 0;
  int ref_tbl [int];
  int checks = 0, failures = 0;
  active_node_map #(.ENTRIES(ENTRIES), .SLOTS(SLOTS)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int nodes [200];
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); we = 1;
      node = (i == 199) ? NODE_W'(nodes[0] + ENTRIES) : NODE_W'($urandom);
      nodes[i] = int'(node); wslot = 12'($urandom); ref_tbl[int'(node) % ENTRIES] = int'(wslot);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 200; i++) begin
      node = NODE_W'(nodes[i]); #1;
      checks++;
      if (int'(slot) != ref_tbl[nodes[i] % ENTRIES]) begin failures++; $display("node %0d", nodes[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hmm3_top: the end-to-end test of tb_hmm3_env in its reduced
// configuration (4-frame batches, 16 states, 3 mixtures, 6 dimensions,
// 8 workspace slots, beam 6, 16-line caches, 2-record output buffer).
module tb_hmm3_top;
  tb_hmm3_env #(.FULL(1'b0)) env ();
endmodule

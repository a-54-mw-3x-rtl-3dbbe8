// tb_hmm3_top_full: the end-to-end test of tb_hmm3_env with hmm3_top at
// its default parameters (20-frame batches, 2000 states x 16 mixtures x
// 25 dimensions, 4096 workspace slots, beam 3000, 1024-line caches).
module tb_hmm3_top_full;
  tb_hmm3_env env ();
endmodule

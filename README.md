# HMM3: a GMM + Viterbi speech recognition processor in SystemVerilog

This is the RTL for a hardware speech recogniser for a 60,000-word
vocabulary. A host extracts one MFCC feature vector every 10 ms. The chip
turns that stream into word hypotheses with two engines:

- The **GMM core** scores every HMM state of the acoustic model against
  each feature vector.
- The **Viterbi core** uses those scores, a pronunciation lexicon and an
  N-gram language model to run a frame-synchronous beam search.

The models are too large for the chip. They live in an external memory (the
"data base"), and the chip reaches it through two independent 32-bit buses
that share one 64-bit link.

Two ideas carry the design:

1. **Batching the GMM.** Frames are scored in batches of 20. Twenty datapath
   lanes, one per frame, all consume the same parameter word in the same
   cycle. So the acoustic model is streamed once per batch instead of once
   per frame, and a 32-bit bus is enough.
2. **Pipelining GMM and search.** There are two GMM result RAMs. While the
   GMM core fills one with batch *k*, the Viterbi core searches batch *k-1*
   in the other. Then they swap.

Inside the search, each active node's successors are evaluated eight at a
time by eight identical "transition paths". The paths add the transition or
language-model cost and apply the beam test in parallel. A write-back unit
then merges the survivors into the next frame's active set.

## Block map

```
hmm3_top
├── gmm_core                 20-frame GMM engine
│   ├── mfcc_buffer          feature vectors of the batch
│   ├── gmm_param_buffer     ping-pong buffer, one HMM state's Gaussians per bank
│   └── gmm_lane x 20        Eq. (1) datapath, one per frame
├── gmm_result_buffer        two result RAMs, swapped per batch
├── viterbi_core             search controller
│   ├── line_cache           lexicon cache
│   ├── line_cache           N-gram cache
│   ├── viterbi_path x 8     add + beam compare
│   ├── trellis_token_write  merge, workspace write, frame statistics, trellis tokens
│   ├── active_node_workspace  two banks: previous frame / current frame
│   ├── active_node_map      node -> workspace slot
│   ├── beam_threshold       divider that rescales the pruning margin per frame
│   └── output_buffer        trellis records to external memory
└── memory_if                64-bit link: GMM channel + Viterbi channel, GMM test readout
```

`hmm_pkg` holds the shared widths, record structs and data-base formats.

## The batch pipeline

- `start` begins an utterance of `n_batches` batches.
- The last batch holds `last_frames` frames (1..20), so an utterance does
  not have to be a multiple of 20 frames.
- The sequencer in `hmm3_top` runs `n_batches + 1` steps. Step *k* does
  three things:
  - starts the GMM on batch *k* if *k* < `n_batches`;
  - starts the search on batch *k-1* if *k* ≥ 1;
  - waits for both, then swaps the result RAMs.

```
step        0          1          2        ...   n
GMM      batch 0    batch 1    batch 2          (idle)
Viterbi  (idle)     batch 0    batch 1          batch n-1 + final record
RAM        A->       B-> A      A-> B            ...
```

`test_mode` runs the GMM on batch 0 alone. It then streams all
2,000 × 20 scores out through the Viterbi channel's write pins, to
`gmm_test_base`. Each word carries two 16-bit scores (lower frame in bits
15:0), giving 10 words per state in state order. This is how the GMM
results are observed from outside: in normal operation the GMM has no
output of its own.

## GMM core

Each state *s* is scored with the max approximation of the Gaussian-mixture
log likelihood:

    log b_s(x) = max over m of ( C_m - 1/2 · Σ_d (x_d - μ_md)^2 / σ_md^2 )

Fixed point:

| quantity | format |
|---|---|
| x_d, μ_md | signed 16 bit, Q8.8 |
| 1/σ² | unsigned 16 bit, holds 2^16/σ² |
| term | ((x-μ)² · ivar) >> 16 |
| accumulator | 40 bit |
| C_m and the score | signed 16 bit; the score saturates |

Parameter stream, per state:

- For each of the 16 mixtures: 25 words `{μ[31:16], ivar[15:0]}` followed
  by one word `{C[15:0]}`.
- That is 416 words per state, at `param_base + s·416`.

Schedule:

- At the start of a batch the core reads the batch's 250 MFCC words.
- It then works through the states. The lanes consume state *s* from one
  parameter bank at one word per cycle, while the loader fills the other
  bank with state *s+1*.
- A state costs 417 cycles, so a batch costs about 834,000 cycles when
  memory delivers one word per cycle. At 200 MHz that is 4.2 ms for 200 ms
  of speech.
- All 20 scores of a state are written to the result RAM in one cycle.

## Viterbi search

**Nodes and scores.**
- The search state is a set of active nodes. Each node record is
  `{node, score, pred word, token}`.
- A node is an HMM state of a word in the lexicon.
- Scores are log probabilities. When a node is read as a source, the
  previous frame's best score is subtracted, so 24 bits never overflow.

**Per frame:** each node in the previous-frame bank of the workspace is
expanded.

- **Inside a word (Eq. 2):** two candidates, the node itself (self loop)
  and node *n+1*.
  - Each score is `score − transition cost + log b` of the destination's
    GMM state. log b is read from the result RAM.
  - Both candidates go through paths 0 and 1 as one group.
- **At a word end:**
  - The node's self loop is issued first.
  - A trellis record `{frame, word, back token}` goes to the output
    buffer. The successors of this word carry that record's index as their
    token.
  - Then the word's successor list is read from the N-gram cache one
    aligned 8-entry line at a time. Each line feeds all 8 paths at once
    with `score − n-gram cost` (Eq. 3, no acoustic term).
- **Simplified trigram** (`trigram_en`):
  - At the end of word A, the node's `pred` field names the best word B
    before A, i.e. the word the surviving path came from.
  - The core searches A's trigram index for B. If there is a list for
    (B, A), that list is used; otherwise A's bigram list is.
  - Only the single best predecessor is considered, so the search network
    does not grow with the trigram.

**Beam test.**
- A candidate survives if its score ≥ (best score so far in this frame −
  margin).
- The threshold is sampled when a group enters the paths. Early groups in
  a frame therefore see a looser threshold than later ones.

**Merge.** `trellis_token_write` retires one survivor per cycle. It looks
up the destination node in `active_node_map`, then confirms the slot
against the workspace (right node, slot below the frame's count).
- Confirmed: the record is replaced only if the new score is higher. This
  is the max of Eq. (2)/(3).
- Not confirmed: the survivor takes the next free slot.
- All 4,096 slots taken: the survivor is dropped (workspace overflow).

**Margin update.** After the last source of a frame, `beam_threshold`
computes

    margin' = clamp(margin · BEAM / count, 64, 2^20)

with a 35-bit restoring divider (37 cycles). The margin shrinks when more
than BEAM = 3000 nodes were active and grows when fewer were. A frame with
no survivors sets the maximum margin.

**End of utterance.** After the last batch the core writes a final record:
the best node's word, its trellis token, and score bits 23:12. The host
recovers the sentence by following the back tokens through the trellis
records.

**Caches.** Lexicon and N-gram data come through two direct-mapped,
1,024-line × 8-word read-only caches. On a miss the controller stalls
until the line is in.

## External data base layout

All addresses are 32-bit word addresses. The base addresses are ports of
`hmm3_top`.

| what | where | format |
|---|---|---|
| MFCC | `mfcc_base + b·250 + i` | two Q8.8 values per word; value *j* of batch *b* is frame *j/25*, dim *j%25*, low half first |
| Gaussians | `param_base + s·416 + m·26 + d` | `{μ, ivar}`; word 25 of a mixture is `{16'b0, C}` |
| lexicon | `lex_base + 2n` | `{word_end[31], gmm_state[30:20], self_cost[19:12], next_cost[11:4]}` |
|  | `lex_base + 2n + 1` | word id |
| bigram header | `bg_base + 2w`, `+2w+1` | `list_start`, `{12'b0, count[19:0]}` |
| trigram header | `tg_base + 2w`, `+2w+1` | `index_start` (even), `{12'b0, count[19:0]}` |
| trigram index entry | `index_start + 2k`, `+2k+1` | `{pred_word[31:16], count[15:0]}`, `list_start` |
| list entry | `list_start + e` | `{dest_node[31:12], cost[11:0]}` |
| trellis / final record | `trellis_base + 2t`, `+2t+1` | 64-bit `trec_t`, low word first |

Notes on the layout:
- The lexicon is linear: node *n+1* follows node *n* inside a word, and a
  word-end flag closes the word.
- Costs are `−log` probabilities in the score's units.
- `bg_base` and `tg_base` must be even, so that a two-word header never
  straddles a cache line.

## The external link

`memory_if` gives each core its own channel on the 64-bit link:

| | channel 0 | channel 1 |
|---|---|---|
| carries | GMM core (reads only) | Viterbi core (reads, and trellis writes) |
| read data | `ext_rsp_data[31:0]` | `ext_rsp_data[63:32]` |

Each channel has `valid`/`ready` requests and in-order read responses, with
any number of requests outstanding. Inside the Viterbi core, the lexicon
cache has priority over the N-gram cache, which has priority over the
output buffer.

## Where this design departs from the published chip

The published chip defines the block structure, the 20-frame GMM batch,
the 8 paths, the two result RAMs, the two workspaces, the caches and their
capacities, the simplified trigram and the sizes in the table below.
Everything else was designed here. Concretely:

- **Lexicon.** The chip's lexicon cache is labelled as a shared-tree data
  base (words that share a prefix share nodes). The tree is not described,
  so this design uses a linear lexicon. Node sharing between words is then
  up to the lexicon compiler, through the `dest_node` of list entries.
- **Active node map.** The published map is a cache in front of a map in
  external memory. Here it is a stand-alone on-chip table of 32,768
  entries (0.39 Mbit).
  - The table is indexed by the low 15 node bits and holds no tag.
  - If two active nodes share an entry, the newer one wins. A later
    transition into the older node then gives it a second slot instead of
    merging, which leaves a duplicate path.
  - This cannot happen when node numbers are below 32,768.
- **MFCC buffer.** It holds one batch: 8,000 bits, against a published
  16 Kbit that would also allow loading the next batch while one is in
  use. Loading takes 250 bus cycles per batch.
- **Result RAMs.** 2 × 2,000 × 20 × 16 bit = 1.28 Mbit, against a
  published 1 Mbit. The 16-bit score width is this design's choice.
- **Miss handling.** A cache miss stalls the whole controller. The
  published chip uses its 8 paths partly to hide miss latency; here the
  paths only add throughput on hits.
- **Sizes of the language-model formats.**
  - A list start is a full 32-bit word address.
  - A bigram list holds up to 2^20 − 1 entries; a trigram list for one
    word pair holds up to 65,535.
  - Successor nodes are 20 bits (about a million lexicon nodes), and word
    ids are 16 bits.
  - These limits hold a 60k-word bigram or trigram model of the published
    size (4.0 M and 10.8 M list entries). Whether the lexicon fits in
    2^20 nodes depends on how it is compiled.
- **Speed.** The published real-time factors (3.02× with bigram and 2.25×
  with trigram at 200 MHz) depend on the real 60k models, which are not
  part of this design. They were not reproduced.

Default parameters and where their values come from:

| parameter | default | origin |
|---|---|---|
| FRAMES | 20 | published 20-frame GMM batch |
| STATES / MIX / DIM | 2000 / 16 / 25 | published acoustic model |
| N_PATHS | 8 | published |
| BEAM | 3000 | published beam width |
| SLOTS | 4096 | own choice; 2 × 4096 × 80 bit = 0.66 Mbit of workspace |
| MAP_ENTRIES | 32768 | published 0.4 Mbit map |
| NG_LINES, LEX_LINES | 1024 × 8 words | own choice, within the published 0.4 Mbit N-gram cache |
| OB_DEPTH | 32 records | published 2 Kbit output buffer |
| INIT_MARGIN | 4096 | own choice |

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The external memory is
the behavioural `ext_mem_model`: a sparse array, fixed read latency, and
random refusal of requests.

- **GMM.**
  - `tb_gmm_lane` and `tb_gmm_core` compare every score with Eq. (1)
    recomputed in 64-bit arithmetic, with both saturated and in-range
    scores.
  - `tb_gmm_core` also bounds the cycle count of a batch.
- **Search.** `tb_viterbi_core` runs a reduced core (16 slots, beam 12,
  16-line caches) on a random lexicon and language model. It runs twice,
  once with the bigram search and once with the trigram search.
  - A reference beam search, written in the testbench from the rules
    above, predicts every trellis record and the final record.
  - The counts of merges, prunes and overflows must match the reference.
  - Cache misses, trigram hits and bigram fallbacks must all occur.
- **Whole chip.** `tb_hmm3_top` (reduced) and `tb_hmm3_top_full` (all
  defaults: 2,000 states, 16 × 25 Gaussians, 4,096 slots) run the same
  environment, `tb_hmm3_env`:
  1. A test-mode readout of batch 0, checked against the reference GMM.
  2. A bigram utterance, then a trigram utterance, both ending in a
     partial batch. Every record is checked against a reference search
     driven by the reference GMM scores.
  - The environment counts each mechanism and fails any that never
    happens:
    - GMM/Viterbi overlap;
    - result-RAM swaps;
    - readout words;
    - the partial batch;
    - back-pressure on both channels;
    - lexicon and N-gram cache misses;
    - merges, prunes and workspace overflow (each equal to the reference
      count);
    - trigram hits and bigram fallbacks.
  - The full-size run takes about 12 million cycles with the random model.
    That is under a minute of simulation, after about a minute of
    compilation.
- **Output-buffer back-pressure.** It never occurs in the whole-chip runs,
  because the buffer drains faster than word ends arrive. `tb_output_buffer`
  tests it directly.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/hmm_pkg.sv tb/tb_hmm3_top.sv \
          --top tb_hmm3_top -Mdir obj_tb_hmm3_top
obj_tb_hmm3_top/Vtb_hmm3_top
```

Replace `tb_hmm3_top` with any other testbench name. The modules are found
through `-Irtl -Itb` by file name; `hmm_pkg.sv` must come first.

## Known limits

- The active-node map can duplicate a node when two active nodes collide
  in the table (see above). The search still works, but such a node is
  expanded twice.
- Search speed on a real 60k task is unmeasured. The GMM side needs
  834,000 cycles per 20-frame batch. The search side depends on the
  models and on cache hit rates.
- The host side is not part of the RTL: feature extraction, the USB link,
  the FPGA's level-2 cache, and the SDRAM and its controller. The chip
  expects a memory that answers reads in order.

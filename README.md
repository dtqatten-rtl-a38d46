# DTQAtten-style attention accelerator in SystemVerilog

Transformer attention spends most of its work on the Q, K and V vectors of the
tokens, yet tokens are not equally important. This design gives each token its
own precision, layer by layer, and picks it at run time. After each layer the
hardware measures how much attention each token received. The most important
tokens keep 8-bit Q/K/V vectors, the middle group drops to 4 bits, and the
rest are pruned (0 bits) and never fetched again. The matrix products run on
**variable-speed systolic arrays (VSSA)**. Their processing elements (PEs) are
built around one 4-bit multiplier, so a 4-bit x 4-bit product takes one
cycle, 4x8 takes two and 8x8 takes four. Low-precision tokens therefore save
time as well as bandwidth.

The method and architecture come from the paper *DTQAtten: Leveraging
Dynamic Token-based Quantization for Efficient Attention Architecture*. This
RTL is an independent implementation. The paper gives the block structure,
the PE principle, the stall rule and the token reordering. Everything at
register level is this design's own: interfaces, formats, the softmax
arithmetic, the top-k method and the control flow. Each file's header says
which parts follow the paper and which are choices made here.

## How a layer is processed

One run of `dtqatten_top` processes one attention layer. It goes through all
heads one after another:

1. **Fetch.** The Q/K/V fetcher holds the layer's token list: an id and a
   precision per token. For each list entry it computes the DRAM address and
   length of the vector. The DMA reads the vector and unpacks it into a line
   buffer.
2. **Q x K^T.** Query tokens are taken in tiles of `ROWS` and key tokens in
   tiles of `COLS`. For each pair of tiles, the first VSSA computes a
   `ROWS x COLS` block of scores over the `VEC_LEN` channels. A query tile's
   score rows are collected in a score buffer.
3. **Softmax.** Each score row becomes probabilities. They are broadcast
   to two consumers:
   * the softmax line buffer, which feeds the second array (the paper's
     "module 1");
   * the **importance accumulator**, which adds each probability to the
     score of its key token (the paper's "module 2"). It sums the columns of
     the probability matrix over all rows and all heads.
4. **Attention_prob x V.** The second VSSA multiplies the probability tile
   by V, `COLS` output channels at a time. The result rows leave on the
   `out_*` stream.

After the last softmax row of the last head, the **two top-k engines** start.
They run while the second array finishes its last tiles:

* engine 0 keeps the `k0` most important tokens (the rest are pruned);
* engine 1 marks `k1` of the kept tokens as 8-bit (the others of the kept
  tokens become 4-bit).

The fetcher then builds the next layer's list.

### Clustering and reordering tokens by precision

This is the idea that makes the arrays efficient. The next layer's list puts
all 4-bit tokens first and all 8-bit tokens after them, each group in
ascending order. A tile of `ROWS` query tokens or `COLS` key tokens is then
almost always of a single precision. Only the tile that straddles the
boundary between the groups mixes the two.

The reordering changes nothing in the results. Permuting the tokens permutes
the rows of the attention output and the rows and columns of the probability
matrix in the same way. The column sums used as importance scores therefore
come out in the new order.

This leads to one convention. A token's id in layer L+1 is its **position in
layer L's list**. Layer L's output is meant to be stored in list order, so
the next layer reads its vectors directly at those positions. No translation
table is needed.

## The variable-speed PE and pipeline stalls

`vssa_pe` has three registers:

* F: the row operand, moving right;
* W: the column operand, moving down;
* P: the partial sum, which stays in the PE (output-stationary).

Each element has a precision flag:

* a **4-bit element** is a signed code from -8 to 7;
* an **8-bit element** is split into a signed high nibble and an unsigned
  low nibble.

Each cycle the PE multiplies one nibble pair on a 5x5-bit signed multiplier.
It shifts the product left by 4 bits for each high nibble involved, then
adds it to P. An 8x8 product takes the pairs in the order HH (shift 8), HL
(4), LH (4), LL (0).

The systolic dataflow forces all PEs to advance together. In `vssa`, a
pipeline step lasts as long as its slowest active PE, and each faster PE
**stalls** for the rest of the step. The step ends in the first cycle where
no PE reports `busy`.

The array counts two things: stalled PE-cycles and multiplying PE-cycles.
From these you get the paper's stall cycle ratio:

    R = stalled PE-cycles / (number of PEs x cycles of the slowest PE)

Two examples, using the steady state (tags per row and per column):

* A 3x3 tile with one 8-bit query row and one 8-bit key column has a ratio
  of 20/36 = 55.5%.
* The same tile after clustering, with three 4-bit rows against one 4-bit
  and two 8-bit columns, has a ratio of 3/18 = 16.7%.

A tile whose rows and columns are all of one precision never stalls. The
end-to-end test checks that both stalled and stall-free tiles occur.

`vssa` skews its own inputs: row r is delayed r steps and column c is
delayed c steps. The caller hands it one unskewed k-slice per step. A tile
of K slices takes K + ROWS + COLS - 1 steps.

## Number formats

| Quantity | Format |
|---|---|
| Q, K, V element in DRAM, 8-bit token | one byte, two's complement |
| Q, K, V element in DRAM, 4-bit token | one nibble, two's complement; element 2i in bits 3:0 and element 2i+1 in bits 7:4 of byte i |
| Element in the line buffers | 8 bits; 4-bit codes are sign-extended |
| Score | 32-bit signed integer (`ACC_W`) |
| Probability | unsigned Q0.7, 0..127 (so it is a valid 8-bit operand) |
| Importance score | 24-bit unsigned, saturating (`IMP_W`) |
| Attention output | 32-bit signed; the sum over j of prob x V, with prob in Q0.7 |

Per-token quantization scales are not modelled. The arrays multiply integer
codes. Dequantization, and the 1/sqrt(d) factor, belong to the host's choice
of `sm_shift` and to whatever consumes the output.

### Softmax arithmetic

Let m be the maximum of the row.

1. For each score s, compute t = (m - s) >> `sm_shift`. This is an exponent
   in steps of 1/16.
2. Compute e = T[t mod 16] >> (t div 16). The table T holds
   T[f] = round(32768 x 2^(-f/16)) for f = 0..15.
3. Sum the e values of the row. Invert the sum once with a 31-step
   restoring divider: recip = 2^30 / sum.
4. Each probability is min(127, (e x recip) >> 23).

In effect this is a softmax with base 2^(1/2^(sm_shift+4)). Choose
`sm_shift` so that this matches e^(1/sqrt(d)) times the quantization
scales. A row of n scores takes 3n + 33 cycles.

### Top-k

Each engine takes one candidate token per cycle. It compares that token's
score with all `N_MAX` scores in parallel and counts how many valid tokens
beat it; on equal scores the lower index wins. The token is selected if
fewer than k tokens beat it. n tokens take n cycles.

## Memory layout and ports of the top

Each token owns a slot of `VEC_LEN` bytes. The vectors of head h, token id t
are at:

    base_q + h*head_stride + t*VEC_LEN     (Q; K and V likewise)

A 4-bit vector fills the first half of its slot. The DRAM port reads 64-bit
words with a valid/ready request and in-order responses.

| Port group | Meaning |
|---|---|
| `start`, `first_layer`, `n_init` | Start a layer. `first_layer` loads `n_init` tokens, all 8-bit. Otherwise the list left by the previous run is used. |
| `num_heads`, `k0`, `k1`, `sm_shift`, `base_*`, `head_stride` | Layer configuration. `k0` and `k1` are the token budgets from an offline search. |
| `done`, `list_n`, `n_lo` | End of layer; then the next list's length and how many 4-bit tokens lead it. |
| `rd_req_*`, `rd_resp_*` | DRAM read port. |
| `out_valid`, `out_head`, `out_row`, `out_col`, `out_data[COLS]` | One result row: head, position in the list, first channel, values. Only channels below `VEC_LEN` are meaningful. |
| `perf_*` | Cycles, Q x K^T tiles, stalled tiles, stalled and multiplying PE-cycles, stalled PE-cycles in the second array, cycles in which top-k overlapped Attention_prob x V, DRAM words read. |

Parameters of `dtqatten_top`:

| Parameter | Default | Source |
|---|---|---|
| `ROWS` x `COLS` | 16 x 18 | The paper's MAC budget is printed as "3168 (~16x18x11)" |
| `VEC_LEN` | 64 | Head size of BERT and GPT-2 (not stated in the paper) |
| `N_MAX` | 128 | Own choice |
| `DRAM_W`, `ADDR_W`, `ACC_W`, `IMP_W` | 64, 32, 32, 24 | Own choice |

## Where this design departs from the paper or goes beyond it

* **MAC count.** The paper's configuration has 3168 4-bit MACs in total
  (16x18x11) and does not say how they are divided among arrays. This design
  builds one pair of arrays, one for Q x K^T and one for
  Attention_prob x V, each 16x18. That is 576 MACs, so the paper's
  throughput figures do not apply to this configuration. The paper's
  architecture drawing shows the array pair as a stack of copies without
  giving their number or how work is spread over them. Here the heads of a
  layer run one after another on the single pair.
* **Sequence length.** At most `N_MAX` tokens per layer. BERT with 128-token
  inputs fits. SQuAD-length (384) and GPT-2-length (1024) sequences need a
  larger `N_MAX`. Area grows with it: the V buffer, score buffer and top-k
  comparators are all sized by `N_MAX`.
* **No causal mask.** GPT-2 needs one; the paper does not discuss masking.
* **Parts not built.** The FC layers that produce Q, K and V, and the
  feed-forward and normalisation layers, are outside the accelerator. So is
  the offline search that sets `k0` and `k1`.
* **Fetching.** Fetches are simple and serial. The DMA handles one vector at
  a time and K is re-fetched for every query tile. The next layer's vectors
  are fetched when that layer starts, not prefetched while the current layer
  finishes. This costs time, not correctness.
* **Softmax, top-k and formats.** The softmax method, the top-k method and
  all number formats are choices made here.

## Files

| File | Contents |
|---|---|
| `rtl/dtq_pkg.sv` | Precision and matrix enums, PE cycle count, exponential table |
| `rtl/vssa_pe.sv` | Variable-speed PE |
| `rtl/vssa.sv` | Output-stationary variable-speed systolic array with stall counters |
| `rtl/line_buffer.sv` | Token line buffer (Q, K, V, probabilities, scores) |
| `rtl/softmax_unit.sv` | Integer softmax |
| `rtl/importance_acc.sv` | Token importance score accumulator |
| `rtl/topk_engine.sv` | Top-k engine |
| `rtl/qkv_fetcher.sv` | Token list, clustering and reordering, address generation |
| `rtl/dma.sv` | DRAM-to-line-buffer mover |
| `rtl/dtqatten_top.sv` | The accelerator |
| `tb/tb_<block>.sv` | Self-checking test of each block |
| `tb/tb_dtqatten_top.sv` | End-to-end test at a small size (4x5 arrays, 16 channels, 22 tokens, 2 heads, 3 layers) |
| `tb/tb_fig5_workload.sv` | The paper's 3x3 stall example (9 tokens, 9 channels, tokens 1 and 6 8-bit) in natural and clustered order; checks each iteration's stall cycle ratio against the paper's tables |
| `tb/tb_dtqatten_full.sv` | End-to-end test at the default size (128 tokens, 2 heads, 2 layers) |
| `tb/attn_env.sv` | Shared end-to-end stimulus, reference model and mechanism counters |
| `tb/dram_model.sv` | Behavioural DRAM with latency and back-pressure |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. To run one
with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_dtqatten_full \
        -y rtl -y tb +libext+.sv rtl/dtq_pkg.sv tb/tb_dtqatten_full.sv
    ./obj_dir/Vtb_dtqatten_full

Replace the top module and file to run another testbench.

The end-to-end tests recompute everything in plain integer arithmetic:

* every output element;
* the next token list.

They also count how often each mechanism happened, and count a failure for
any that never did:

* stalled tiles and stall-free tiles;
* pruning;
* 4-bit tokens;
* reordering;
* top-k overlapping the second array;
* DRAM back-pressure;
* more than one tile;
* more than one head.

`tb_fig5_workload` reproduces every stall cycle ratio of the paper's worked
example on the real array and token list hardware:

* natural order: 55.5%, 33.3% or 0% per iteration, 8 of 9 iterations stall;
* clustered order: 0%, 16.6% or 30.5% per iteration, 5 of 9 stall.

The full-size test takes a few seconds. Its first layer has 128 tokens, all
8-bit. Its second layer keeps 92 of them (28 4-bit, 64 8-bit); 22 of its 72
Q x K^T tiles stall.

## Changing the design

* **Array size.** Set `ROWS` and `COLS`. Both arrays share them.
* **Sequence length.** Raise `N_MAX`. The importance score width `IMP_W`
  must hold 127 x rows x heads.
* **Head size.** `VEC_LEN` must be a multiple of 16, so that a 4-bit
  vector is a whole number of 64-bit DRAM words.
* **Precision rule.** The rule "4x4 = 1, 4x8 = 2, 8x8 = 4 cycles" lives in
  `dtq_pkg::mac_cycles`. The nibble schedule is in `vssa_pe`.

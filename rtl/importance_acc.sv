// importance_acc: token importance score accumulator.
//
// The importance of a token is the sum of the attention probabilities it
// receives: the column sums of Attention_prob, summed over all query rows and
// over all heads of a layer (the paper's Fig. 2(a)). The accumulator sits
// on the broadcast output of the softmax unit: every probability that the
// softmax unit emits for key token `add_idx` is added to that token's score.
// `clr` empties all scores at the start of a layer. All scores are visible at
// once on `scores`, for the parallel comparators of the top-k engines.
//
// Timing: one addition per cycle, visible on `scores` in the next cycle.
// The paper gives the function; the register file and the score width
// (SCORE_W bits; probabilities are Q0.7, so 2^(SCORE_W-7) full rows fit)
// are this design's choice.
module importance_acc #(
  parameter int unsigned N_MAX   = 128,
  parameter int unsigned SCORE_W = 24,
  parameter int unsigned IDX_W   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               add_en,
  input  logic [IDX_W-1:0]   add_idx,
  input  logic [7:0]         add_val,
  output logic [SCORE_W-1:0] scores [N_MAX]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_MAX; i++) scores[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < N_MAX; i++) scores[i] <= '0;
    end else if (add_en && (add_idx < IDX_W'(N_MAX))) begin
      // saturate instead of wrapping
      if (scores[add_idx] > {SCORE_W{1'b1}} - SCORE_W'(add_val)) scores[add_idx] <= '1;
      else scores[add_idx] <= scores[add_idx] + SCORE_W'(add_val);
    end
  end

endmodule

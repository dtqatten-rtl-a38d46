// topk_engine: selects the k tokens with the largest importance scores.
//
// The paper uses two of these engines in series: the first keeps the top
// k0 of all tokens (the rest become 0-bit, i.e. pruned), the second picks
// the top k1 of the kept tokens for 8-bit precision (the others of the kept
// tokens become 4-bit). It describes the engines as linear-time and highly
// parallel but does not give their insides; the rank-by-comparison scheme
// below is this design's choice. In cycle i the engine compares the score
// of candidate token i with all N_MAX scores at once (N_MAX comparators) and
// counts the valid tokens that beat it; a tie goes to the lower index. Token
// i is selected when it is valid and fewer than k tokens beat it, so exactly
// min(k, number of valid tokens) tokens are selected.
//
// Interface and timing: pulse `start` with `n` (tokens 0..n-1 are
// candidates), `valid_in` (candidate mask) and `k`. The engine needs n
// cycles; then `done` pulses and `sel` and `count` hold the result until
// the next start. Inputs must stay stable while `busy`.
module topk_engine #(
  parameter int unsigned N_MAX   = 128,
  parameter int unsigned SCORE_W = 24,
  parameter int unsigned IDX_W   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [IDX_W-1:0]   n,
  input  logic [IDX_W-1:0]   k,
  input  logic [N_MAX-1:0]   valid_in,
  input  logic [SCORE_W-1:0] scores [N_MAX],
  output logic [N_MAX-1:0]   sel,
  output logic [IDX_W-1:0]   count,
  output logic               busy,
  output logic               done
);

  logic [IDX_W-1:0] i;
  logic [IDX_W-1:0] n_q, k_q;
  logic [IDX_W-1:0] beats;
  logic [SCORE_W-1:0] s_i;
  logic take;

  always_comb begin
    s_i   = scores[i[$clog2(N_MAX)-1:0]];
    beats = '0;
    for (int j = 0; j < N_MAX; j++)
      if (valid_in[j] && (IDX_W'(j) < n_q) &&
          ((scores[j] > s_i) || ((scores[j] == s_i) && (IDX_W'(j) < i))))
        beats = beats + IDX_W'(1);
    take = valid_in[i[$clog2(N_MAX)-1:0]] && (beats < k_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i <= '0; n_q <= '0; k_q <= '0; sel <= '0; count <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        i <= '0; n_q <= n; k_q <= k; sel <= '0; count <= '0;
        busy <= (n != '0);
        done <= (n == '0);
      end else if (busy) begin
        if (take) begin
          sel[i[$clog2(N_MAX)-1:0]] <= 1'b1;
          count <= count + IDX_W'(1);
        end
        if (i + IDX_W'(1) == n_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        i <= i + IDX_W'(1);
      end
    end
  end

  a_n_fits: assert property (@(posedge clk) disable iff (!rst_n) start |-> (n <= IDX_W'(N_MAX)));

endmodule

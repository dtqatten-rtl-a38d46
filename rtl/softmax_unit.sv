// softmax_unit: turns one row of Q x K^T scores into attention probabilities.
//
// The paper gives this unit's function only (the softmax between the
// Q x K^T array and the two consumers of the probabilities); everything
// below is this design's own choice of the simplest integer implementation.
//
// Method: prob[j] = 2^(-(m - s[j]) / 2^(SHIFT+4)) / sum, with m the row
// maximum. The host folds 1/sqrt(d), the quantisation scales and log2(e)
// into the run-time `shift`. t = (m - s[j]) >> shift is the exponent in
// units of 1/16; the exponential is a 16-entry table of 2^(-f/16) (Q1.15)
// for the fraction, shifted right by the integer part. The row sum is
// inverted once with a 31-step restoring divider (recip = 2^30 / sum), and
// every probability is e[j] * recip >> 23, saturated to 127: an unsigned
// Q0.7 value in 0..127, so that it is a non-negative 8-bit operand of the
// Attention_prob x V array.
//
// Interface and timing: pulse `start` with `len` (1..MAX_LEN). The unit
// reads score `rd_idx` through `rd_data` combinationally, in three passes
// (maximum, sum of exponentials, output), with the divider between the
// second and the third. Output j appears on `out_valid/out_idx/out_prob`;
// `done` pulses after the last one. A row takes 3*len + 33 cycles from
// `start` to `done`.
module softmax_unit #(
  parameter int unsigned IDX_W   = 16,
  parameter int unsigned SCORE_W = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [IDX_W-1:0]          len,
  input  logic [4:0]                shift,
  output logic [IDX_W-1:0]          rd_idx,
  input  logic signed [SCORE_W-1:0] rd_data,
  output logic                      out_valid,
  output logic [IDX_W-1:0]          out_idx,
  output logic [7:0]                out_prob,
  output logic                      busy,
  output logic                      done
);
  import dtq_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_MAX, S_SUM, S_DIV, S_OUT, S_DONE} state_e;
  state_e state;

  logic signed [SCORE_W-1:0] m;
  logic [IDX_W-1:0]  idx;
  logic [IDX_W-1:0]  len_q;
  logic [4:0]        shift_q;
  logic [IDX_W+15:0] sum;
  logic [IDX_W+15:0] rem;
  logic [30:0]       quo;
  logic [4:0]        dstep;
  logic [15:0]       e_val;
  logic [SCORE_W:0]  diff;
  logic [SCORE_W:0]  t;
  logic [IDX_W+16:0] rem_sh;
  logic [31:0]       prod;

  assign rd_idx = idx;
  assign busy   = (state != S_IDLE);

  // exponential of the current element relative to the row maximum
  always_comb begin
    diff = {m[SCORE_W-1], m} - {rd_data[SCORE_W-1], rd_data};
    t    = diff >> shift_q;
    if (t >= (SCORE_W+1)'(256)) e_val = 16'd0;
    else                       e_val = exp2_frac(t[3:0]) >> t[7:4];
    prod   = 32'(e_val) * 32'(quo[15:0]);
    rem_sh = {rem, (dstep == 5'd30)};   // numerator 2^30: only bit 30 is one
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0; len_q <= '0; shift_q <= '0; m <= '0; sum <= '0;
      rem <= '0; quo <= '0; dstep <= '0; out_valid <= 1'b0; out_idx <= '0; out_prob <= '0;
      done <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          len_q <= len; shift_q <= shift; idx <= '0;
          m <= {1'b1, {(SCORE_W-1){1'b0}}};   // most negative score
          state <= S_MAX;
        end
        S_MAX: begin
          if (rd_data > m) m <= rd_data;
          if (idx + IDX_W'(1) == len_q) begin idx <= '0; sum <= '0; state <= S_SUM; end
          else idx <= idx + IDX_W'(1);
        end
        S_SUM: begin
          sum <= sum + (IDX_W+16)'(e_val);
          if (idx + IDX_W'(1) == len_q) begin
            idx <= '0; rem <= '0; quo <= '0; dstep <= 5'd30; state <= S_DIV;
          end else idx <= idx + IDX_W'(1);
        end
        S_DIV: begin
          // restoring division of 2^30 by sum, one quotient bit per cycle
          if (rem_sh >= {1'b0, sum}) begin
            rem <= (IDX_W+16)'(rem_sh - {1'b0, sum});
            quo <= {quo[29:0], 1'b1};
          end else begin
            rem <= (IDX_W+16)'(rem_sh);
            quo <= {quo[29:0], 1'b0};
          end
          if (dstep == 5'd0) state <= S_OUT;
          else dstep <= dstep - 5'd1;
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_idx   <= idx;
          out_prob  <= (prod[31:23] > 9'd127) ? 8'd127 : {1'b0, prod[29:23]};
          if (idx + IDX_W'(1) == len_q) state <= S_DONE;
          else idx <= idx + IDX_W'(1);
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The divisor is never zero: the row maximum alone contributes 2^15.
  a_sum_nonzero: assert property (@(posedge clk) disable iff (!rst_n) (state == S_DIV) |-> (sum != '0));

endmodule

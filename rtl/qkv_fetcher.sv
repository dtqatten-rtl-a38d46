// qkv_fetcher: token list of the current layer and Q/K/V address generation.
//
// The fetcher keeps the list of tokens that take part in the current layer,
// each with its id and precision. After a layer, the two top-k engines hand
// over their selections (kept tokens, and among them the 8-bit tokens), and
// the fetcher builds the next layer's list: first all 4-bit tokens, then all
// 8-bit tokens, each group in ascending id order; pruned tokens are
// dropped. This is the paper's clustering and reordering of tokens by
// precision, low precision first, which keeps most array tiles of a single
// precision and so removes most pipeline stalls. Because the layer output is
// stored in the reordered sequence, the id of a token in the next layer is
// its position in the current list (the paper's Eq. (4) and (5)
// argument), so no extra index translation is needed.
//
// Address generation: for list position `lk_idx` and matrix `lk_mat` the
// fetcher returns the DRAM byte address base + id * VEC_BYTES, where every
// token owns a slot of VEC_BYTES = VEC_LEN bytes, and the length of the
// vector: VEC_LEN bytes for an 8-bit token, VEC_LEN/2 bytes (packed nibbles)
// for a 4-bit token. The slot layout and packing are this design's choice;
// the paper says only that the fetcher computes start address and length.
//
// Interface and timing: `init` loads an identity list of `init_n` 8-bit
// tokens (the first layer, which is not yet quantized). `build` starts the
// rebuild from `keep_mask`, `hi_mask` and the current list length; it takes
// 2 * list_n cycles (one pass per precision group) and pulses `done`. The
// lookup is combinational.
module qkv_fetcher #(
  parameter int unsigned N_MAX   = 128,
  parameter int unsigned VEC_LEN = 64,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned IDX_W   = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic [IDX_W-1:0]    init_n,
  input  logic                build,
  input  logic [N_MAX-1:0]    keep_mask,
  input  logic [N_MAX-1:0]    hi_mask,
  output logic                busy,
  output logic                done,
  output logic [IDX_W-1:0]    list_n,
  output logic [IDX_W-1:0]    n_lo,          // 4-bit tokens at the front of the list
  // lookup
  input  logic [IDX_W-1:0]    lk_idx,
  input  dtq_pkg::mat_e       lk_mat,
  input  logic [ADDR_W-1:0]   base_q,
  input  logic [ADDR_W-1:0]   base_k,
  input  logic [ADDR_W-1:0]   base_v,
  output logic [ADDR_W-1:0]   lk_addr,
  output logic [IDX_W-1:0]    lk_bytes,
  output dtq_pkg::prec_e      lk_prec
);
  import dtq_pkg::*;

  localparam int unsigned NB = $clog2(N_MAX);

  logic [IDX_W-1:0] ids  [N_MAX];
  prec_e            prec [N_MAX];
  // the list being built
  logic [IDX_W-1:0] nids  [N_MAX];
  prec_e            nprec [N_MAX];
  logic [IDX_W-1:0] p, wr, old_n;
  logic             pass;          // 0: 4-bit group, 1: 8-bit group
  logic             take;
  logic [ADDR_W-1:0] base;

  always_comb begin
    take = pass ? (keep_mask[p[NB-1:0]] && hi_mask[p[NB-1:0]])
                : (keep_mask[p[NB-1:0]] && !hi_mask[p[NB-1:0]]);
    unique case (lk_mat)
      MAT_Q:   base = base_q;
      MAT_K:   base = base_k;
      default: base = base_v;
    endcase
    lk_prec  = (lk_idx < list_n) ? prec[lk_idx[NB-1:0]] : PREC0;
    lk_addr  = base + ADDR_W'(ids[lk_idx[NB-1:0]]) * ADDR_W'(VEC_LEN);
    lk_bytes = (lk_prec == PREC8) ? IDX_W'(VEC_LEN) :
               (lk_prec == PREC4) ? IDX_W'(VEC_LEN / 2) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_MAX; i++) begin
        ids[i] <= '0; prec[i] <= PREC0; nids[i] <= '0; nprec[i] <= PREC0;
      end
      list_n <= '0; n_lo <= '0; p <= '0; wr <= '0; old_n <= '0; pass <= 1'b0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (init) begin
        for (int i = 0; i < N_MAX; i++) begin
          ids[i]  <= IDX_W'(i);
          prec[i] <= (IDX_W'(i) < init_n) ? PREC8 : PREC0;
        end
        list_n <= init_n; n_lo <= '0;
        done   <= 1'b1;
      end else if (build) begin
        p <= '0; wr <= '0; pass <= 1'b0; old_n <= list_n;
        busy <= (list_n != '0);
        if (list_n == '0) begin
          done <= 1'b1;
        end
      end else if (busy) begin
        if (take) begin
          nids[wr[NB-1:0]]  <= p;
          nprec[wr[NB-1:0]] <= pass ? PREC8 : PREC4;
          wr <= wr + IDX_W'(1);
        end
        if (p + IDX_W'(1) == old_n) begin
          p <= '0;
          if (!pass) begin
            pass <= 1'b1;
            n_lo <= wr + IDX_W'(take);
          end else begin
            busy <= 1'b0;
            done <= 1'b1;
            list_n <= wr + IDX_W'(take);
            for (int i = 0; i < N_MAX; i++) begin
              ids[i]  <= nids[i];
              prec[i] <= (IDX_W'(i) < wr + IDX_W'(take)) ? nprec[i] : PREC0;
            end
            if (take) begin
              ids[wr[NB-1:0]]  <= p;
              prec[wr[NB-1:0]] <= PREC8;
            end
          end
        end else begin
          p <= p + IDX_W'(1);
        end
      end
    end
  end

endmodule

// dtqatten_top: attention-layer accelerator with dynamic token-based
// mixed-precision quantization.
//
// One run processes one attention layer, all heads in turn. The token list
// of the layer (held by the fetcher) gives every token an id and a precision
// (8-bit or 4-bit; pruned tokens are no longer in the list), 4-bit tokens
// first. For each head the controller:
//   1. fetches V of all listed tokens into the V buffer;
//   2. for each tile of ROWS query tokens: fetches their Q vectors, then for
//      each tile of COLS key tokens fetches their K vectors and runs Q x K^T
//      on the first variable-speed systolic array (VSSA), storing the scores;
//   3. runs the softmax unit over each score row; its probabilities are
//      broadcast to the softmax line buffer (module 1 path) and to the token
//      importance score accumulator (module 2 path);
//   4. runs Attention_prob x V on the second VSSA, one tile of COLS output
//      channels at a time, and streams the result rows out.
// When the last softmax row of the last head is done, the two top-k engines
// start and run in parallel with the remaining Attention_prob x V work: the
// first keeps the k0 most important tokens, the second marks k1 of those as
// 8-bit. The fetcher then builds the next layer's list (4-bit tokens first,
// then 8-bit tokens). The block structure and this flow follow the
// paper's architecture overview; the tile order, the fetch-on-demand of
// Q and K per tile, the serial DMA and the register-level handshakes are
// this design's choices. The paper also lets the DMA prefetch the next
// layer's vectors while the current layer computes, and stacks several
// copies of the array pair; here vectors are fetched when their layer runs
// and one array pair serves all heads in turn.
//
// The assertions use rst_n synchronously (disable iff) while the registers
// use it asynchronously; the lint note about this mixed use refers to the
// checks only, not to any flip-flop.
//
// Interface: pulse `start` with the layer configuration. `first_layer`
// loads an identity list of `n_init` 8-bit tokens; otherwise the list left
// by the previous run is used. Q, K and V of head h and token id t live at
// base_x + h * head_stride + t * VEC_LEN (VEC_LEN bytes per token slot; a
// 4-bit token uses the first VEC_LEN/2 bytes, packed nibbles). Output rows
// appear on `out_valid` with their head, list position and first channel;
// `out_data[c]` is channel out_col + c, valid for out_col + c < VEC_LEN.
// `done` pulses when the layer is finished and the next list is ready;
// `list_n` and `n_lo` then give the next layer's token count and the number
// of 4-bit tokens at its front. The perf_* counters clear on `start`, except
// perf_dram_words, which counts DRAM words read since reset.
module dtqatten_top #(
  parameter int unsigned ROWS    = 16,    // rows of each systolic array
  parameter int unsigned COLS    = 18,    // columns of each systolic array
  parameter int unsigned VEC_LEN = 64,    // channels per head (Q, K, V vector length)
  parameter int unsigned N_MAX   = 128,   // most tokens per layer
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DRAM_W  = 64,
  parameter int unsigned IMP_W   = 24,    // importance score width
  parameter int unsigned ACC_W   = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // layer configuration
  input  logic                    start,
  input  logic                    first_layer,
  input  logic [15:0]             n_init,
  input  logic [7:0]              num_heads,
  input  logic [15:0]             k0,
  input  logic [15:0]             k1,
  input  logic [4:0]              sm_shift,
  input  logic [ADDR_W-1:0]       base_q,
  input  logic [ADDR_W-1:0]       base_k,
  input  logic [ADDR_W-1:0]       base_v,
  input  logic [ADDR_W-1:0]       head_stride,
  output logic                    busy,
  output logic                    done,
  output logic [15:0]             list_n,
  output logic [15:0]             n_lo,
  // DRAM read port
  output logic                    rd_req_valid,
  input  logic                    rd_req_ready,
  output logic [ADDR_W-1:0]       rd_req_addr,
  input  logic                    rd_resp_valid,
  input  logic [DRAM_W-1:0]       rd_resp_data,
  // attention output stream
  output logic                    out_valid,
  output logic [7:0]              out_head,
  output logic [15:0]             out_row,
  output logic [15:0]             out_col,
  output logic signed [ACC_W-1:0] out_data [COLS],
  // statistics
  output logic [31:0]             perf_cycles,
  output logic [31:0]             perf_qk_tiles,
  output logic [31:0]             perf_qk_stall_tiles,
  output logic [31:0]             perf_qk_stall_cycles,
  output logic [31:0]             perf_qk_mac_cycles,
  output logic [31:0]             perf_pv_stall_cycles,
  output logic [31:0]             perf_topk_overlap,
  output logic [31:0]             perf_dram_words
);
  import dtq_pkg::*;

  localparam int unsigned IW = 16;
  localparam int unsigned EB = DRAM_W / 4;

  typedef enum logic [3:0] {
    C_IDLE, C_INIT, C_LIST, C_HEAD, C_VLOAD, C_QLOAD, C_KLOAD, C_QK, C_STORE,
    C_SM, C_PV, C_OUT, C_WAIT, C_DONE
  } cstate_e;
  typedef enum logic [2:0] {T_IDLE, T_K0, T_K1, T_BUILD, T_DONE} tstate_e;

  cstate_e cs;
  tstate_e ts;

  // ---------------------------------------------------------------- state
  logic [7:0]        head;
  logic [ADDR_W-1:0] head_off;
  logic [IW-1:0]     n_cur;        // tokens in this layer
  logic [IW-1:0]     r0, c0, dc;   // tile origins
  logic [IW-1:0]     p;            // fetch / row counter
  logic              issued;       // descriptor handed to the DMA, waiting
  logic [IW-1:0]     sm_row;
  logic              sm_started;
  logic              topk_go;

  // ---------------------------------------------------------------- fetcher
  logic        f_init, f_build, f_busy, f_done;
  logic [IW-1:0] lk_idx, lk_bytes;
  mat_e        lk_mat;
  logic [ADDR_W-1:0] lk_addr;
  prec_e       lk_prec;
  logic [N_MAX-1:0] sel0, sel1;

  qkv_fetcher #(.N_MAX(N_MAX), .VEC_LEN(VEC_LEN), .ADDR_W(ADDR_W), .IDX_W(IW)) u_fetch (
    .clk, .rst_n, .init(f_init), .init_n(n_init), .build(f_build),
    .keep_mask(sel0), .hi_mask(sel1), .busy(f_busy), .done(f_done),
    .list_n, .n_lo,
    .lk_idx, .lk_mat,
    .base_q(base_q + head_off), .base_k(base_k + head_off), .base_v(base_v + head_off),
    .lk_addr, .lk_bytes, .lk_prec
  );

  // ---------------------------------------------------------------- DMA
  logic        d_valid, d_ready;
  logic [IW-1:0] d_line;
  logic        wr_en;
  mat_e        wr_dest;
  logic [IW-1:0] wr_line, wr_elem;
  logic [EB-1:0] wr_mask;
  logic [7:0]  wr_data [EB];
  prec_e       wr_prec;

  dma #(.ADDR_W(ADDR_W), .IDX_W(IW), .DRAM_W(DRAM_W)) u_dma (
    .clk, .rst_n,
    .desc_valid(d_valid), .desc_ready(d_ready), .desc_addr(lk_addr), .desc_bytes(lk_bytes),
    .desc_prec(lk_prec), .desc_dest(lk_mat), .desc_line(d_line),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_en, .wr_dest, .wr_line, .wr_elem, .wr_mask, .wr_data, .wr_prec,
    .words_read(perf_dram_words)
  );

  // ---------------------------------------------------------------- line buffers
  logic [IW-1:0] qk_kidx, pv_kidx;
  logic [7:0]  q_col [ROWS];  prec_e q_prec [ROWS];
  logic [7:0]  k_col [COLS];  prec_e k_prec [COLS];
  logic [7:0]  v_row [VEC_LEN]; prec_e v_prec [N_MAX];
  logic [7:0]  p_col [ROWS];  prec_e p_prec_unused [ROWS];
  logic [7:0]  q_row_unused [VEC_LEN];
  logic [7:0]  k_row_unused [VEC_LEN];
  logic [7:0]  v_col_unused [N_MAX];
  logic [7:0]  p_row_unused [N_MAX];

  line_buffer #(.LINES(ROWS), .DEPTH(VEC_LEN), .EW(8), .WBEAT(EB), .IDX_W(IW)) u_qbuf (
    .clk, .rst_n, .wr_en(wr_en && wr_dest == MAT_Q), .wr_line, .wr_elem, .wr_mask, .wr_data, .wr_prec,
    .col_idx(qk_kidx), .col_data(q_col), .row_idx('0), .row_data(q_row_unused), .line_prec(q_prec));

  line_buffer #(.LINES(COLS), .DEPTH(VEC_LEN), .EW(8), .WBEAT(EB), .IDX_W(IW)) u_kbuf (
    .clk, .rst_n, .wr_en(wr_en && wr_dest == MAT_K), .wr_line, .wr_elem, .wr_mask, .wr_data, .wr_prec,
    .col_idx(qk_kidx), .col_data(k_col), .row_idx('0), .row_data(k_row_unused), .line_prec(k_prec));

  line_buffer #(.LINES(N_MAX), .DEPTH(VEC_LEN), .EW(8), .WBEAT(EB), .IDX_W(IW)) u_vbuf (
    .clk, .rst_n, .wr_en(wr_en && wr_dest == MAT_V), .wr_line, .wr_elem, .wr_mask, .wr_data, .wr_prec,
    .col_idx('0), .col_data(v_col_unused), .row_idx(pv_kidx), .row_data(v_row), .line_prec(v_prec));

  // softmax results: one line per query row of the tile, one element per key token
  logic        sm_valid;
  logic [IW-1:0] sm_idx;
  logic [7:0]  sm_prob;
  logic [7:0]  sm_wdata [1];
  assign sm_wdata[0] = sm_prob;

  line_buffer #(.LINES(ROWS), .DEPTH(N_MAX), .EW(8), .WBEAT(1), .IDX_W(IW)) u_pbuf (
    .clk, .rst_n, .wr_en(sm_valid), .wr_line(sm_row), .wr_elem(sm_idx), .wr_mask(1'b1),
    .wr_data(sm_wdata), .wr_prec(PREC8),
    .col_idx(pv_kidx), .col_data(p_col), .row_idx('0), .row_data(p_row_unused), .line_prec(p_prec_unused));

  // Q x K^T scores of the current query tile
  logic        s_wr;
  logic [COLS-1:0] s_mask;
  logic [ACC_W-1:0] s_wdata [COLS];
  logic [ACC_W-1:0] s_col [ROWS];
  logic [ACC_W-1:0] s_row_unused [N_MAX];
  prec_e       s_prec_unused [ROWS];
  logic [IW-1:0] sm_rd_idx;

  line_buffer #(.LINES(ROWS), .DEPTH(N_MAX), .EW(ACC_W), .WBEAT(COLS), .IDX_W(IW)) u_sbuf (
    .clk, .rst_n, .wr_en(s_wr), .wr_line(p), .wr_elem(c0), .wr_mask(s_mask), .wr_data(s_wdata),
    .wr_prec(PREC8), .col_idx(sm_rd_idx), .col_data(s_col), .row_idx('0), .row_data(s_row_unused),
    .line_prec(s_prec_unused));

  // ---------------------------------------------------------------- Q x K^T array
  logic qk_start, qk_adv, qk_running, qk_done;
  logic [7:0] qa [ROWS]; logic qa8 [ROWS]; logic qav [ROWS];
  logic [7:0] kb [COLS]; logic kb8 [COLS]; logic kbv [COLS];
  logic signed [ACC_W-1:0] qk_c [ROWS][COLS];
  logic [31:0] qk_stall, qk_mac, qk_run, qk_ssteps;

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      qa[r]  = q_col[r];
      qa8[r] = (q_prec[r] == PREC8);
      qav[r] = (r0 + IW'(r) < n_cur);
    end
    for (int c = 0; c < COLS; c++) begin
      kb[c]  = k_col[c];
      kb8[c] = (k_prec[c] == PREC8);
      kbv[c] = (c0 + IW'(c) < n_cur);
    end
  end

  vssa #(.ROWS(ROWS), .COLS(COLS), .K_W(IW), .ACC_W(ACC_W)) u_qk (
    .clk, .rst_n, .start(qk_start), .k_len(IW'(VEC_LEN)), .k_idx(qk_kidx), .adv(qk_adv),
    .a_in(qa), .a_is8(qa8), .a_vld(qav), .b_in(kb), .b_is8(kb8), .b_vld(kbv),
    .running(qk_running), .done(qk_done), .c_out(qk_c),
    .stall_cycles(qk_stall), .mac_cycles(qk_mac), .run_cycles(qk_run), .stall_steps(qk_ssteps));

  // ---------------------------------------------------------------- Attention_prob x V array
  logic pv_start, pv_adv, pv_running, pv_done;
  logic [7:0] pa [ROWS]; logic pa8 [ROWS]; logic pav [ROWS];
  logic [7:0] vb [COLS]; logic vb8 [COLS]; logic vbv [COLS];
  logic signed [ACC_W-1:0] pv_c [ROWS][COLS];
  logic [31:0] pv_stall, pv_mac, pv_run, pv_ssteps;

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      pa[r]  = p_col[r];
      pa8[r] = 1'b1;                  // probabilities are 8-bit
      pav[r] = (r0 + IW'(r) < n_cur);
    end
    for (int c = 0; c < COLS; c++) begin
      vb[c]  = (dc + IW'(c) < IW'(VEC_LEN)) ? v_row[(dc + IW'(c)) % IW'(VEC_LEN)] : 8'd0;
      vb8[c] = (pv_kidx < IW'(N_MAX)) ? (v_prec[pv_kidx % IW'(N_MAX)] == PREC8) : 1'b0;
      vbv[c] = (dc + IW'(c) < IW'(VEC_LEN));
    end
  end

  vssa #(.ROWS(ROWS), .COLS(COLS), .K_W(IW), .ACC_W(ACC_W)) u_pv (
    .clk, .rst_n, .start(pv_start), .k_len(n_cur), .k_idx(pv_kidx), .adv(pv_adv),
    .a_in(pa), .a_is8(pa8), .a_vld(pav), .b_in(vb), .b_is8(vb8), .b_vld(vbv),
    .running(pv_running), .done(pv_done), .c_out(pv_c),
    .stall_cycles(pv_stall), .mac_cycles(pv_mac), .run_cycles(pv_run), .stall_steps(pv_ssteps));

  // ---------------------------------------------------------------- softmax and module 2
  logic sm_start, sm_busy, sm_done;

  softmax_unit #(.IDX_W(IW), .SCORE_W(ACC_W)) u_sm (
    .clk, .rst_n, .start(sm_start), .len(n_cur), .shift(sm_shift),
    .rd_idx(sm_rd_idx), .rd_data(s_col[sm_row % IW'(ROWS)]),
    .out_valid(sm_valid), .out_idx(sm_idx), .out_prob(sm_prob), .busy(sm_busy), .done(sm_done));

  logic imp_clr;
  logic [IMP_W-1:0] imp [N_MAX];

  importance_acc #(.N_MAX(N_MAX), .SCORE_W(IMP_W), .IDX_W(IW)) u_imp (
    .clk, .rst_n, .clr(imp_clr), .add_en(sm_valid), .add_idx(sm_idx), .add_val(sm_prob), .scores(imp));

  logic t0_start, t0_busy, t0_done, t1_start, t1_busy, t1_done;
  logic [IW-1:0] t0_count, t1_count;

  topk_engine #(.N_MAX(N_MAX), .SCORE_W(IMP_W), .IDX_W(IW)) u_topk0 (
    .clk, .rst_n, .start(t0_start), .n(n_cur), .k(k0), .valid_in('1), .scores(imp),
    .sel(sel0), .count(t0_count), .busy(t0_busy), .done(t0_done));

  topk_engine #(.N_MAX(N_MAX), .SCORE_W(IMP_W), .IDX_W(IW)) u_topk1 (
    .clk, .rst_n, .start(t1_start), .n(n_cur), .k(k1), .valid_in(sel0), .scores(imp),
    .sel(sel1), .count(t1_count), .busy(t1_busy), .done(t1_done));

  // ---------------------------------------------------------------- fetch request mux
  always_comb begin
    lk_mat = MAT_Q;
    lk_idx = p;
    d_line = '0;
    unique case (cs)
      C_VLOAD: begin lk_mat = MAT_V; d_line = p; end
      C_QLOAD: begin lk_mat = MAT_Q; d_line = p - r0; end
      C_KLOAD: begin lk_mat = MAT_K; d_line = p - c0; end
      default: ;
    endcase
    d_valid = ((cs == C_VLOAD) || (cs == C_QLOAD) || (cs == C_KLOAD)) && !issued &&
              (p < n_cur) && (p < ((cs == C_VLOAD) ? n_cur :
                                   (cs == C_QLOAD) ? r0 + IW'(ROWS) : c0 + IW'(COLS)));
  end

  // score tile write: row p of the finished Q x K^T tile
  always_comb begin
    s_wr = (cs == C_STORE);
    for (int c = 0; c < COLS; c++) begin
      s_wdata[c] = qk_c[p % IW'(ROWS)][c];
      s_mask[c]  = (c0 + IW'(c) < n_cur);
    end
  end

  // attention output
  always_comb begin
    out_valid = (cs == C_OUT) && (r0 + p < n_cur);
    out_head  = head;
    out_row   = r0 + p;
    out_col   = dc;
    for (int c = 0; c < COLS; c++) out_data[c] = pv_c[p % IW'(ROWS)][c];
  end

  assign busy = (cs != C_IDLE);

  // ---------------------------------------------------------------- main controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs <= C_IDLE; head <= '0; head_off <= '0; n_cur <= '0; r0 <= '0; c0 <= '0; dc <= '0;
      p <= '0; issued <= 1'b0; sm_row <= '0; sm_started <= 1'b0; topk_go <= 1'b0;
      f_init <= 1'b0; imp_clr <= 1'b0; qk_start <= 1'b0; pv_start <= 1'b0; sm_start <= 1'b0;
      done <= 1'b0;
      perf_cycles <= '0; perf_qk_tiles <= '0; perf_qk_stall_tiles <= '0;
      perf_qk_stall_cycles <= '0; perf_qk_mac_cycles <= '0; perf_pv_stall_cycles <= '0;
    end else begin
      f_init <= 1'b0; imp_clr <= 1'b0; qk_start <= 1'b0; pv_start <= 1'b0; sm_start <= 1'b0;
      done <= 1'b0; topk_go <= 1'b0;
      if (cs != C_IDLE) perf_cycles <= perf_cycles + 32'd1;
      if (d_valid && d_ready) issued <= 1'b1;
      unique case (cs)
        C_IDLE: if (start) begin
          perf_cycles <= '0; perf_qk_tiles <= '0; perf_qk_stall_tiles <= '0;
          perf_qk_stall_cycles <= '0; perf_qk_mac_cycles <= '0; perf_pv_stall_cycles <= '0;
          f_init  <= first_layer;
          imp_clr <= 1'b1;
          cs <= C_INIT;
        end
        C_INIT: cs <= C_LIST;          // the fetcher loads its list in this cycle
        C_LIST: begin
          n_cur <= list_n;
          head <= '0; head_off <= '0;
          cs <= C_HEAD;
        end
        C_HEAD: begin
          p <= '0; issued <= 1'b0;
          cs <= (n_cur == '0) ? C_WAIT : C_VLOAD;
          if (n_cur == '0) topk_go <= 1'b1;
        end
        C_VLOAD, C_QLOAD, C_KLOAD: begin
          // one descriptor at a time: issue, wait for the DMA to finish it
          if (issued && d_ready && !(d_valid)) begin
            issued <= 1'b0;
            p <= p + IW'(1);
          end
          if (!issued && !d_valid && d_ready) begin
            // all vectors of this load are in
            unique case (cs)
              C_VLOAD: begin r0 <= '0; p <= '0; cs <= C_QLOAD; end
              C_QLOAD: begin c0 <= '0; p <= '0; cs <= C_KLOAD; end
              default: begin qk_start <= 1'b1; cs <= C_QK; end
            endcase
          end
        end
        C_QK: if (qk_done) begin
          perf_qk_tiles        <= perf_qk_tiles + 32'd1;
          perf_qk_stall_cycles <= perf_qk_stall_cycles + qk_stall;
          perf_qk_mac_cycles   <= perf_qk_mac_cycles + qk_mac;
          if (qk_stall != '0) perf_qk_stall_tiles <= perf_qk_stall_tiles + 32'd1;
          p  <= '0;
          cs <= C_STORE;
        end
        C_STORE: begin
          if (p + IW'(1) == IW'(ROWS)) begin
            if (c0 + IW'(COLS) < n_cur) begin
              c0 <= c0 + IW'(COLS); p <= c0 + IW'(COLS); issued <= 1'b0; cs <= C_KLOAD;
            end else begin
              sm_row <= '0; sm_started <= 1'b0; cs <= C_SM;
            end
          end else p <= p + IW'(1);
        end
        C_SM: begin
          if (!sm_started) begin
            sm_start <= 1'b1; sm_started <= 1'b1;
          end else if (sm_done) begin
            sm_started <= 1'b0;
            if (sm_row + IW'(1) == IW'(ROWS) || r0 + sm_row + IW'(1) >= n_cur) begin
              // last softmax row of the layer: module 2 can start
              if (head + 8'd1 >= num_heads && r0 + IW'(ROWS) >= n_cur) topk_go <= 1'b1;
              dc <= '0; pv_start <= 1'b1; cs <= C_PV;
            end else sm_row <= sm_row + IW'(1);
          end
        end
        C_PV: if (pv_done) begin
          perf_pv_stall_cycles <= perf_pv_stall_cycles + pv_stall;
          p <= '0; cs <= C_OUT;
        end
        C_OUT: begin
          if (p + IW'(1) == IW'(ROWS)) begin
            p <= '0;
            if (dc + IW'(COLS) < IW'(VEC_LEN)) begin
              dc <= dc + IW'(COLS); pv_start <= 1'b1; cs <= C_PV;
            end else if (r0 + IW'(ROWS) < n_cur) begin
              r0 <= r0 + IW'(ROWS); p <= r0 + IW'(ROWS); issued <= 1'b0; cs <= C_QLOAD;
            end else if (head + 8'd1 < num_heads) begin
              head <= head + 8'd1; head_off <= head_off + head_stride; cs <= C_HEAD;
            end else cs <= C_WAIT;
          end else p <= p + IW'(1);
        end
        C_WAIT: if (ts == T_DONE) cs <= C_DONE;
        C_DONE: begin done <= 1'b1; cs <= C_IDLE; end
        default: cs <= C_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- module 2 controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_IDLE; t0_start <= 1'b0; t1_start <= 1'b0; f_build <= 1'b0; perf_topk_overlap <= '0;
    end else begin
      t0_start <= 1'b0; t1_start <= 1'b0; f_build <= 1'b0;
      if (cs == C_IDLE && start) perf_topk_overlap <= '0;
      else if (ts != T_IDLE && ts != T_DONE && (cs == C_PV || cs == C_OUT))
        perf_topk_overlap <= perf_topk_overlap + 32'd1;
      unique case (ts)
        T_IDLE:  if (topk_go) begin t0_start <= 1'b1; ts <= T_K0; end
        T_K0:    if (t0_done) begin t1_start <= 1'b1; ts <= T_K1; end
        T_K1:    if (t1_done) begin f_build <= 1'b1; ts <= T_BUILD; end
        T_BUILD: if (f_done) ts <= T_DONE;
        T_DONE:  if (cs == C_DONE) ts <= T_IDLE;
        default: ts <= T_IDLE;
      endcase
    end
  end

  a_no_dma_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (cs == C_QK || cs == C_PV) |-> d_ready);

endmodule

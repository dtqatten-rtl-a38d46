// attn_env: end-to-end stimulus and checker for dtqatten_top (testbench
// only). It holds a behavioural DRAM, fills it with random Q, K and V data
// for every layer and head, runs LAYERS layers on the accelerator and checks
// everything the accelerator produces against a reference model written
// here with plain integer arithmetic:
//   * every attention output element (Q x K^T, softmax, Attention_prob x V,
//     with 4-bit tokens decoded from packed nibbles);
//   * the next token list: kept tokens = top k0 of the importance scores
//     (column sums of the probabilities over all rows and heads), 8-bit
//     tokens = top k1 of those, ties to the lower position; the list holds
//     the 4-bit tokens first and the ids are positions in the old list.
// The per-layer k0 and k1 follow the average token split the method reaches
// on BERT: about 28% pruned, 41% 4-bit and 31% 8-bit tokens.
// It also counts how often each mechanism happened (stalled and stall-free
// Q x K^T tiles, pruning, 4-bit tokens, reordering, top-k overlapping with
// Attention_prob x V, DRAM back-pressure, several tiles per head, several
// heads) and counts a failure for each one that never did. It prints the
// TB_RESULT line and ends the simulation.
module attn_env #(
  parameter int ROWS    = 16,
  parameter int COLS    = 18,
  parameter int VEC_LEN = 64,
  parameter int N_MAX   = 128,
  parameter int N_TOK   = 128,
  parameter int HEADS   = 2,
  parameter int LAYERS  = 2,
  parameter int SHIFT   = 10,
  parameter int WATCHDOG = 50000000
) (
  output logic              clk,
  output logic              rst_n,
  output logic              start,
  output logic              first_layer,
  output logic [15:0]       n_init,
  output logic [7:0]        num_heads,
  output logic [15:0]       k0,
  output logic [15:0]       k1,
  output logic [4:0]        sm_shift,
  output logic [31:0]       base_q,
  output logic [31:0]       base_k,
  output logic [31:0]       base_v,
  output logic [31:0]       head_stride,
  input  logic              busy,
  input  logic              done,
  input  logic [15:0]       list_n,
  input  logic [15:0]       n_lo,
  input  logic              rd_req_valid,
  output logic              rd_req_ready,
  input  logic [31:0]       rd_req_addr,
  output logic              rd_resp_valid,
  output logic [63:0]       rd_resp_data,
  input  logic              out_valid,
  input  logic [7:0]        out_head,
  input  logic [15:0]       out_row,
  input  logic [15:0]       out_col,
  input  logic signed [31:0] out_data [COLS],
  input  logic [31:0]       perf_cycles,
  input  logic [31:0]       perf_qk_tiles,
  input  logic [31:0]       perf_qk_stall_tiles,
  input  logic [31:0]       perf_qk_stall_cycles,
  input  logic [31:0]       perf_qk_mac_cycles,
  input  logic [31:0]       perf_pv_stall_cycles,
  input  logic [31:0]       perf_topk_overlap,
  input  logic [31:0]       perf_dram_words
);
  localparam int D = VEC_LEN;
  localparam int LAYER_BYTES = 3 * HEADS * N_MAX * D;
  localparam int MEM = LAYERS * LAYER_BYTES;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_stall_tiles = 0, m_nonstall_tiles = 0, m_pruned = 0, m_lo = 0, m_reorder = 0;
  int m_overlap = 0, m_backpressure = 0, m_multitile = 0, m_multihead = 0;

  // reference model state
  int ids [N_MAX];
  int prc [N_MAX];                 // 8 or 4
  int n;
  int Qm [N_MAX][D], Km [N_MAX][D], Vm [N_MAX][D];
  longint S [N_MAX];
  int P [N_MAX][N_MAX];
  longint imp [N_MAX];
  longint O [N_MAX][D];
  int got [HEADS][N_MAX][D];
  bit seen [HEADS][N_MAX][D];

  initial begin clk = 1'b0; forever #5 clk = ~clk; end

  dram_model #(.SIZE(MEM), .DRAM_W(64), .LAT(4), .STALLS(1'b1)) u_dram (
    .clk, .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_addr(rd_req_addr),
    .resp_valid(rd_resp_valid), .resp_data(rd_resp_data));

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rd_req_valid && !rd_req_ready) m_backpressure++;

  always @(posedge clk) if (out_valid) begin
    for (int c = 0; c < COLS; c++)
      if (int'(out_col) + c < D && int'(out_row) < N_MAX && int'(out_head) < HEADS) begin
        got[out_head][out_row][out_col + c] = out_data[c];
        seen[out_head][out_row][out_col + c] = 1'b1;
      end
  end

  function automatic int elem(input int addr, input int p8, input int d);
    logic [7:0] b; logic [3:0] nib;
    if (p8 == 8) begin
      b = u_dram.mem[addr + d];
      return int'($signed(b));
    end
    b = u_dram.mem[addr + d / 2];
    nib = (d % 2 == 0) ? b[3:0] : b[7:4];
    return int'($signed(nib));
  endfunction

  function automatic longint e_model(input longint dlt, input int sh);
    longint t, tab;
    t = dlt >>> sh;
    if (t >= 256) return 0;
    tab = longint'($rtoi($floor(32768.0 * $pow(2.0, -real'(t % 16) / 16.0) + 0.5)));
    return tab >>> (t / 16);
  endfunction

  // top-k over positions 0..n-1 restricted to `valid`, ties to the lower index
  function automatic void topk(input bit valid [N_MAX], input int kk, output bit sel [N_MAX]);
    bit left [N_MAX];
    for (int j = 0; j < N_MAX; j++) begin sel[j] = 1'b0; left[j] = (j < n) && valid[j]; end
    for (int t = 0; t < kk; t++) begin
      int best; best = -1;
      for (int j = 0; j < n; j++) if (left[j] && (best < 0 || imp[j] > imp[best])) best = j;
      if (best < 0) break;
      sel[best] = 1'b1; left[best] = 1'b0;
    end
  endfunction

  initial begin
    int qa, ka, va, kk0, kk1;
    bit all [N_MAX];
    bit s0 [N_MAX], s1 [N_MAX];
    int nids [N_MAX], nprc [N_MAX], nn, nlo;
    rst_n = 1'b0; start = 1'b0; first_layer = 1'b0; n_init = '0; num_heads = '0;
    k0 = '0; k1 = '0; sm_shift = 5'(SHIFT); base_q = '0; base_k = '0; base_v = '0;
    head_stride = 32'(3 * N_MAX * D);
    for (int i = 0; i < MEM; i++) u_dram.mem[i] = 8'($urandom());
    n = N_TOK;
    for (int j = 0; j < N_MAX; j++) begin ids[j] = j; prc[j] = 8; all[j] = 1'b1; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);

    for (int L = 0; L < LAYERS; L++) begin
      // about 28% pruned, 31% of the tokens kept at 8 bits
      kk0 = (n * 72 + 50) / 100;
      kk1 = (n * 31 + 50) / 100;
      if (kk1 > kk0) kk1 = kk0;
      for (int h = 0; h < HEADS; h++)
        for (int r = 0; r < N_MAX; r++)
          for (int d = 0; d < D; d++) begin got[h][r][d] = 0; seen[h][r][d] = 1'b0; end
      #1;
      first_layer = (L == 0); n_init = 16'(N_TOK); num_heads = 8'(HEADS);
      k0 = 16'(kk0); k1 = 16'(kk1);
      base_q = 32'(L * LAYER_BYTES); base_k = base_q + 32'(N_MAX * D); base_v = base_k + 32'(N_MAX * D);
      start = 1'b1; @(posedge clk); #1 start = 1'b0;
      while (!done) @(posedge clk);
      #1;
      $display("layer %0d: %0d tokens, %0d cycles, %0d QK tiles (%0d stalled), QK stall %0d / mac %0d PE-cycles",
               L, n, perf_cycles, perf_qk_tiles, perf_qk_stall_tiles, perf_qk_stall_cycles, perf_qk_mac_cycles);
      m_stall_tiles    += int'(perf_qk_stall_tiles);
      m_nonstall_tiles += int'(perf_qk_tiles - perf_qk_stall_tiles);
      if (perf_topk_overlap != 0) m_overlap++;
      if (perf_qk_tiles > 32'(HEADS)) m_multitile++;
      if (HEADS > 1) m_multihead++;

      // reference model of the layer
      for (int j = 0; j < N_MAX; j++) imp[j] = 0;
      for (int h = 0; h < HEADS; h++) begin
        qa = L * LAYER_BYTES + h * 3 * N_MAX * D;
        ka = qa + N_MAX * D;
        va = ka + N_MAX * D;
        for (int p = 0; p < n; p++)
          for (int d = 0; d < D; d++) begin
            Qm[p][d] = elem(qa + ids[p] * D, prc[p], d);
            Km[p][d] = elem(ka + ids[p] * D, prc[p], d);
            Vm[p][d] = elem(va + ids[p] * D, prc[p], d);
          end
        for (int i = 0; i < n; i++) begin
          longint m, s, recip, pp;
          for (int j = 0; j < n; j++) begin
            S[j] = 0;
            for (int d = 0; d < D; d++) S[j] += longint'(Qm[i][d]) * longint'(Km[j][d]);
          end
          m = S[0];
          for (int j = 1; j < n; j++) if (S[j] > m) m = S[j];
          s = 0;
          for (int j = 0; j < n; j++) s += e_model(m - S[j], SHIFT);
          recip = (longint'(1) << 30) / s;
          for (int j = 0; j < n; j++) begin
            pp = (e_model(m - S[j], SHIFT) * recip) >>> 23;
            if (pp > 127) pp = 127;
            P[i][j] = int'(pp);
            imp[j] += pp;
          end
        end
        for (int i = 0; i < n; i++)
          for (int d = 0; d < D; d++) begin
            O[i][d] = 0;
            for (int j = 0; j < n; j++) O[i][d] += longint'(P[i][j]) * longint'(Vm[j][d]);
            checks++;
            if (!seen[h][i][d] || longint'(got[h][i][d]) != O[i][d]) begin
              failures++;
              if (failures < 10)
                $display("FAIL layer %0d head %0d row %0d ch %0d: got %0d (seen %0d) expected %0d",
                         L, h, i, d, got[h][i][d], seen[h][i][d], O[i][d]);
            end
          end
        // nothing beyond the token count may be written
        for (int i = n; i < N_MAX; i++) begin
          checks++;
          if (seen[h][i][0]) begin failures++; $display("FAIL output row %0d beyond %0d tokens", i, n); end
        end
      end

      // next token list
      topk(all, kk0, s0);
      topk(s0, kk1, s1);
      nn = 0;
      for (int p = 0; p < n; p++) if (s0[p] && !s1[p]) begin nids[nn] = p; nprc[nn] = 4; nn++; end
      nlo = nn;
      for (int p = 0; p < n; p++) if (s0[p] && s1[p]) begin nids[nn] = p; nprc[nn] = 8; nn++; end
      checks++;
      if (int'(list_n) != nn || int'(n_lo) != nlo) begin
        failures++; $display("FAIL next list: %0d tokens (%0d 4-bit), expected %0d (%0d)", list_n, n_lo, nn, nlo);
      end
      if (nn < n) m_pruned++;
      if (nlo > 0) m_lo++;
      for (int q = 1; q < nn; q++) if (nids[q] < nids[q-1]) begin m_reorder++; break; end
      n = nn;
      for (int q = 0; q < nn; q++) begin ids[q] = nids[q]; prc[q] = nprc[q]; end
    end

    // every mechanism must have happened
    checks++; if (m_stall_tiles    == 0) begin failures++; $display("FAIL no stalled QK tile"); end
    checks++; if (m_nonstall_tiles == 0) begin failures++; $display("FAIL no stall-free QK tile"); end
    checks++; if (m_pruned         == 0) begin failures++; $display("FAIL no token pruned"); end
    checks++; if (m_lo             == 0) begin failures++; $display("FAIL no 4-bit token"); end
    checks++; if (m_reorder        == 0) begin failures++; $display("FAIL no reordering"); end
    checks++; if (m_overlap        == 0) begin failures++; $display("FAIL top-k never overlapped PV"); end
    checks++; if (m_backpressure   == 0) begin failures++; $display("FAIL no DRAM back-pressure"); end
    checks++; if (m_multitile      == 0) begin failures++; $display("FAIL never more than one tile"); end
    checks++; if (m_multihead      == 0) begin failures++; $display("FAIL never more than one head"); end
    $display("mechanisms: stalled tiles %0d, stall-free tiles %0d, pruning %0d, 4-bit %0d, reorder %0d, overlap %0d, back-pressure %0d, multi-tile %0d, multi-head %0d",
             m_stall_tiles, m_nonstall_tiles, m_pruned, m_lo, m_reorder, m_overlap, m_backpressure, m_multitile, m_multihead);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

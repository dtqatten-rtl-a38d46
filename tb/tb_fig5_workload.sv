// tb_fig5_workload: the paper's worked stall example, run on the real array.
//
// The paper illustrates pipeline stalls with Q x K^T for 9 tokens of 9
// channels on a 3x3 array, where tokens 1 and 6 are 8-bit and the rest
// 4-bit. Q and K^T are cut into three tiles each, giving nine iterations
// I_rc. The paper prints the stall cycle ratio of every iteration: once for
// the tokens in their natural order, and once after the tokens were
// clustered by precision with the 4-bit group first.
//
// This test builds both token orders with the token-list fetcher (an
// identity list, then a rebuild with tokens 1 and 6 marked 8-bit), runs all
// nine tiles of each order on a 3x3 vssa, and checks:
//   * every element of every 3x3 result tile against an integer product;
//   * which iterations stall and which do not, as the paper's tables print;
//   * the stall cycle ratio, stalled PE-cycles / (PEs x cycles of the
//     slowest PE), over one step in which all nine PEs are busy. It must equal
//     the printed percentage, cut to one decimal (55.5, 33.3, 16.6, 30.5).
// The tile order inside each table does not matter for the ratios.
module tb_fig5_workload;
  localparam int N = 9, D = 9, T = 3;
  localparam int VL = 16;   // fetcher slot size; only the token id is used here

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // ---------------- token list fetcher ----------------
  logic        f_init = 1'b0, f_build = 1'b0, f_busy, f_done;
  logic [15:0] list_n, n_lo, lk_idx = '0, lk_bytes;
  logic [N-1:0] keep_mask = '0, hi_mask = '0;
  logic [31:0] lk_addr;
  dtq_pkg::prec_e lk_prec;

  qkv_fetcher #(.N_MAX(N), .VEC_LEN(VL), .ADDR_W(32), .IDX_W(16)) u_fetch (
    .clk, .rst_n, .init(f_init), .init_n(16'(N)), .build(f_build),
    .keep_mask, .hi_mask, .busy(f_busy), .done(f_done), .list_n, .n_lo,
    .lk_idx, .lk_mat(dtq_pkg::MAT_Q), .base_q(32'd0), .base_k(32'd0), .base_v(32'd0),
    .lk_addr, .lk_bytes, .lk_prec
  );

  // ---------------- 3x3 array ----------------
  logic start = 1'b0;
  logic [15:0] k_len = 16'(D), k_idx;
  logic adv, running, done;
  logic [7:0] a_in [T]; logic a_is8 [T]; logic a_vld [T];
  logic [7:0] b_in [T]; logic b_is8 [T]; logic b_vld [T];
  logic signed [31:0] c_out [T][T];
  logic [31:0] stall_cycles, mac_cycles, run_cycles, stall_steps;

  vssa #(.ROWS(T), .COLS(T), .K_W(16), .ACC_W(32)) u_arr (
    .clk, .rst_n, .start, .k_len, .k_idx, .adv, .a_in, .a_is8, .a_vld,
    .b_in, .b_is8, .b_vld, .running, .done, .c_out,
    .stall_cycles, .mac_cycles, .run_cycles, .stall_steps
  );

  // token data and the current tile
  logic [7:0] Q [N][D];
  logic [7:0] K [N][D];
  logic       is8 [N];
  int         order [N];
  int         qt [T], kt [T];

  always_comb begin
    for (int r = 0; r < T; r++) begin
      a_in[r]  = (k_idx < D) ? Q[qt[r]][k_idx] : 8'd0;
      a_is8[r] = is8[qt[r]];
      a_vld[r] = 1'b1;
    end
    for (int c = 0; c < T; c++) begin
      b_in[c]  = (k_idx < D) ? K[kt[c]][k_idx] : 8'd0;
      b_is8[c] = is8[kt[c]];
      b_vld[c] = 1'b1;
    end
  end

  // counter snapshots at the end of every step
  int          step;
  logic [31:0] snap_s [32], snap_m [32];
  always @(posedge clk) begin
    if (running && adv) begin
      #1;
      if (step < 32) begin snap_s[step] = stall_cycles; snap_m[step] = mac_cycles; end
      step++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // printed tables, in tenths of a percent
  int unsigned tab_normal    [T][T] = '{'{555, 333, 555}, '{333, 0, 333}, '{555, 333, 555}};
  int unsigned tab_clustered [T][T] = '{'{0, 0, 166}, '{0, 0, 166}, '{166, 166, 305}};

  function automatic logic [7:0] rnd_val(input logic big);
    int v;
    if (big) v = $signed($urandom_range(255, 0)) - 128;
    else     v = $signed($urandom_range(15, 0)) - 8;
    return 8'(v);
  endfunction

  // read the fetcher's list into order[]
  task automatic read_list();
    for (int i = 0; i < N; i++) begin
      lk_idx = 16'(i);
      #1;
      order[i] = int'(lk_addr) / VL;
      checks++;
      if ((lk_prec == dtq_pkg::PREC8) != is8[order[i]]) begin
        failures++;
        $display("FAIL list position %0d: token %0d has the wrong precision", i, order[i]);
      end
    end
  endtask

  task automatic run_tables(input string tag, input int unsigned tab [T][T],
                            output int n_stalled);
    longint exp_c;
    int unsigned ratio, ds, dm;
    n_stalled = 0;
    for (int tr = 0; tr < T; tr++) begin
      for (int tc = 0; tc < T; tc++) begin
        for (int i = 0; i < T; i++) begin qt[i] = order[tr*T+i]; kt[i] = order[tc*T+i]; end
        step = 0;
        @(posedge clk); #1 start = 1'b1; @(posedge clk); #1 start = 1'b0;
        while (!done) @(posedge clk);
        #2;
        for (int r = 0; r < T; r++) for (int c = 0; c < T; c++) begin
          exp_c = 0;
          for (int k = 0; k < D; k++)
            exp_c += longint'($signed(Q[qt[r]][k])) * longint'($signed(K[kt[c]][k]));
          checks++;
          if (longint'(c_out[r][c]) != exp_c) begin
            failures++;
            $display("FAIL %s I_r%0dc%0d C[%0d][%0d]=%0d expected %0d", tag, tr, tc, r, c,
                     c_out[r][c], exp_c);
          end
        end
        // step 7 is one where all nine PEs work on the same tile
        ds = snap_s[7] - snap_s[6];
        dm = snap_m[7] - snap_m[6];
        ratio = (ds * 1000) / (ds + dm);
        checks++;
        if (ratio != tab[tr][tc]) begin
          failures++;
          $display("FAIL %s I_r%0dc%0d stall cycle ratio %0d.%0d%% expected %0d.%0d%%", tag, tr, tc,
                   ratio / 10, ratio % 10, tab[tr][tc] / 10, tab[tr][tc] % 10);
        end
        checks++;
        if ((stall_cycles != 0) != (tab[tr][tc] != 0)) begin
          failures++;
          $display("FAIL %s I_r%0dc%0d stall status wrong (%0d stalled PE-cycles)", tag, tr, tc,
                   stall_cycles);
        end
        if (stall_cycles != 0) n_stalled++;
        $display("%s I_r%0dc%0d: %0d cycles, %0d stalled PE-cycles, ratio %0d.%0d%%", tag, tr, tc,
                 run_cycles, stall_cycles, ratio / 10, ratio % 10);
      end
    end
  endtask

  initial begin
    int ns;
    for (int t = 0; t < N; t++) begin
      is8[t] = (t == 1) || (t == 6);
      for (int k = 0; k < D; k++) begin Q[t][k] = rnd_val(is8[t]); K[t][k] = rnd_val(is8[t]); end
    end
    for (int i = 0; i < T; i++) begin qt[i] = 0; kt[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // natural order: every token starts 8-bit in the fetcher; the precisions
    // of this example are applied by the rebuild below, so for the natural
    // order the ids are taken from the identity list
    @(posedge clk); #1 f_init = 1'b1; @(posedge clk); #1 f_init = 1'b0;
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) begin lk_idx = 16'(i); #1; order[i] = int'(lk_addr) / VL; end
    run_tables("normal", tab_normal, ns);
    checks++;
    if (ns != 8) begin
      failures++;
      $display("FAIL natural order: %0d stalled iterations, expected 8", ns);
    end

    // clustered order: keep every token, tokens 1 and 6 high precision
    keep_mask = '1;
    hi_mask   = '0; hi_mask[1] = 1'b1; hi_mask[6] = 1'b1;
    @(posedge clk); #1 f_build = 1'b1; @(posedge clk); #1 f_build = 1'b0;
    while (!f_done) @(posedge clk);
    #2;
    checks++;
    if (list_n != 16'(N) || n_lo != 16'(N - 2)) begin
      failures++;
      $display("FAIL rebuilt list: %0d tokens, %0d of them 4-bit", list_n, n_lo);
    end
    read_list();
    run_tables("clustered", tab_clustered, ns);
    checks++;
    if (ns != 5) begin
      failures++;
      $display("FAIL clustered order: %0d stalled iterations, expected 5", ns);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

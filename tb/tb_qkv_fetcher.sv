// tb_qkv_fetcher: self-checking test of the Q/K/V fetcher.
//
// Starts from an identity list of 8-bit tokens, then rebuilds the list
// several times from random keep/8-bit masks, as after successive layers.
// The expected next list is computed here: kept-but-not-8-bit positions in
// ascending order, then 8-bit positions in ascending order, ids being the
// positions in the previous list. The test checks the list length, the
// number of 4-bit tokens, the rebuild time of 2n cycles, and for every list
// entry and matrix the DRAM address (base + id * 64) and length (64 or 32
// bytes).
module tb_qkv_fetcher;
  import dtq_pkg::*;
  localparam int N = 24, D = 64;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, build = 1'b0;
  logic [15:0] init_n, list_n, n_lo, lk_idx, lk_bytes;
  logic [N-1:0] keep_mask, hi_mask;
  logic busy, done;
  mat_e lk_mat;
  logic [31:0] base_q, base_k, base_v, lk_addr;
  prec_e lk_prec;
  int exp_id [N];
  prec_e exp_pr [N];
  int exp_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  qkv_fetcher #(.N_MAX(N), .VEC_LEN(D), .ADDR_W(32), .IDX_W(16)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_list();
    checks++;
    if (int'(list_n) != exp_n) begin failures++; $display("FAIL list_n %0d expected %0d", list_n, exp_n); end
    for (int p = 0; p < N; p++)
      for (int m = 0; m < 3; m++) begin
        logic [31:0] b;
        lk_idx = 16'(p); lk_mat = mat_e'(m); #1;
        b = (m == 0) ? base_q : ((m == 1) ? base_k : base_v);
        checks++;
        if (p < exp_n) begin
          if (lk_prec != exp_pr[p] || lk_addr != b + 32'(exp_id[p] * D) ||
              int'(lk_bytes) != ((exp_pr[p] == PREC8) ? D : D / 2)) begin
            failures++;
            $display("FAIL entry %0d mat %0d: addr %h bytes %0d prec %0d", p, m, lk_addr, lk_bytes, lk_prec);
          end
        end else if (lk_prec != PREC0 || lk_bytes != 0) begin
          failures++; $display("FAIL entry %0d past the end is not empty", p);
        end
      end
  endtask

  initial begin
    init_n = 0; keep_mask = 0; hi_mask = 0; lk_idx = 0; lk_mat = MAT_Q;
    base_q = 32'h1000; base_k = 32'h8000; base_v = 32'h20000;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int rep = 0; rep < 5; rep++) begin
      init_n = 16'($urandom_range(N, 1));
      init = 1'b1; @(posedge clk); #1 init = 1'b0;
      exp_n = init_n;
      for (int p = 0; p < N; p++) begin exp_id[p] = p; exp_pr[p] = PREC8; end
      check_list();
      for (int layer = 0; layer < 4 && exp_n > 0; layer++) begin
        int nid [N]; prec_e npr [N]; int nn, nlo, cyc;
        keep_mask = N'($urandom()) & N'($urandom() | $urandom());
        hi_mask   = N'($urandom());
        nn = 0;
        for (int p = 0; p < exp_n; p++) if (keep_mask[p] && !hi_mask[p]) begin nid[nn] = p; npr[nn] = PREC4; nn++; end
        nlo = nn;
        for (int p = 0; p < exp_n; p++) if (keep_mask[p] && hi_mask[p]) begin nid[nn] = p; npr[nn] = PREC8; nn++; end
        build = 1'b1; @(posedge clk); #1 build = 1'b0;
        cyc = 0;
        while (!done) begin @(posedge clk); #1 cyc++; end
        checks++;
        if (cyc != 2 * exp_n) begin failures++; $display("FAIL build took %0d cycles for %0d", cyc, exp_n); end
        checks++;
        if (int'(n_lo) != nlo) begin failures++; $display("FAIL n_lo %0d expected %0d", n_lo, nlo); end
        exp_n = nn;
        for (int p = 0; p < nn; p++) begin exp_id[p] = nid[p]; exp_pr[p] = npr[p]; end
        check_list();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

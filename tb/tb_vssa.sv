// tb_vssa: self-checking test of the variable-speed systolic array.
//
// A 3x4 array (small, and not square so that row/column mix-ups show) runs
// random matrix products with mixed 4-bit and 8-bit elements. Two precision
// patterns are used: per row of A and per column of B (as in Q x K^T, where
// every token has one precision) and per k (as in Attention_prob x V, where
// the precision belongs to the V token). The test checks every result
// element against an integer product and checks the cycle count, stalled
// PE-cycles and multiplying PE-cycles against a step-by-step model: PE(r,c)
// works on k during step k+r+c+1, a step lasts as long as its slowest active
// PE, every other active PE stalls for the rest of the step. A tile of only
// 4-bit tokens (the clustered case of the paper's Fig. 5(c)) must run
// without a single stall.
module tb_vssa;
  localparam int R = 3, C = 4, KMAX = 12;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] k_len, k_idx;
  logic adv, running, done;
  logic [7:0] a_in [R]; logic a_is8 [R]; logic a_vld [R];
  logic [7:0] b_in [C]; logic b_is8 [C]; logic b_vld [C];
  logic signed [31:0] c_out [R][C];
  logic [31:0] stall_cycles, mac_cycles, run_cycles, stall_steps;
  int checks = 0, failures = 0;

  logic [7:0] A [R][KMAX]; logic A8 [R][KMAX];
  logic [7:0] B [KMAX][C]; logic B8 [KMAX][C];

  always #5 clk = ~clk;

  vssa #(.ROWS(R), .COLS(C), .K_W(16), .ACC_W(32)) dut (.*);

  // slice feed, as a line buffer would give it
  always_comb begin
    for (int r = 0; r < R; r++) begin
      a_in[r] = (k_idx < KMAX) ? A[r][k_idx] : 8'd0;
      a_is8[r] = (k_idx < KMAX) ? A8[r][k_idx] : 1'b0;
      a_vld[r] = 1'b1;
    end
    for (int c = 0; c < C; c++) begin
      b_in[c] = (k_idx < KMAX) ? B[k_idx][c] : 8'd0;
      b_is8[c] = (k_idx < KMAX) ? B8[k_idx][c] : 1'b0;
      b_vld[c] = 1'b1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rnd_val(input logic is8);
    int v;
    if (is8) v = $signed($urandom_range(255, 0)) - 128;
    else     v = $signed($urandom_range(15, 0)) - 8;
    return 8'(v);
  endfunction

  task automatic run_and_check(input int K, input string tag, output longint st);
    longint exp_c, exp_run, exp_stall, exp_mac;
    int len, need;
    // model of the step schedule
    exp_run = 0; exp_stall = 0; exp_mac = 0;
    for (int s = 0; s < K + R + C - 1; s++) begin
      len = 1;
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        int k; k = s - 1 - r - c;
        if (k >= 0 && k < K) begin
          need = (A8[r][k] && B8[k][c]) ? 4 : ((A8[r][k] || B8[k][c]) ? 2 : 1);
          if (need > len) len = need;
        end
      end
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        int k; k = s - 1 - r - c;
        if (k >= 0 && k < K) begin
          need = (A8[r][k] && B8[k][c]) ? 4 : ((A8[r][k] || B8[k][c]) ? 2 : 1);
          exp_stall += len - need; exp_mac += need;
        end
      end
      exp_run += len;
    end
    k_len = 16'(K);
    @(posedge clk); #1 start = 1'b1; @(posedge clk); #1 start = 1'b0;
    while (!done) @(posedge clk);
    #1;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      exp_c = 0;
      for (int k = 0; k < K; k++) exp_c += longint'($signed(A[r][k])) * longint'($signed(B[k][c]));
      checks++;
      if (longint'(c_out[r][c]) != exp_c) begin
        failures++;
        $display("FAIL %s C[%0d][%0d]=%0d expected %0d", tag, r, c, c_out[r][c], exp_c);
      end
    end
    checks++;
    if (run_cycles != 32'(exp_run) || stall_cycles != 32'(exp_stall) || mac_cycles != 32'(exp_mac)) begin
      failures++;
      $display("FAIL %s cycles run %0d/%0d stall %0d/%0d mac %0d/%0d", tag,
               run_cycles, exp_run, stall_cycles, exp_stall, mac_cycles, exp_mac);
    end
    st = longint'(stall_cycles);
  endtask

  initial begin
    longint st;
    k_len = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // per-token precision (Q x K^T style)
    for (int t = 0; t < 30; t++) begin
      int K; K = $urandom_range(KMAX, 1);
      for (int r = 0; r < R; r++) begin
        logic p; p = 1'($urandom());
        for (int k = 0; k < KMAX; k++) begin A8[r][k] = p; A[r][k] = rnd_val(p); end
      end
      for (int c = 0; c < C; c++) begin
        logic p; p = 1'($urandom());
        for (int k = 0; k < KMAX; k++) begin B8[k][c] = p; B[k][c] = rnd_val(p); end
      end
      run_and_check(K, "qk", st);
    end
    // per-k precision (Attention_prob x V style: A always 8-bit)
    for (int t = 0; t < 30; t++) begin
      int K; K = $urandom_range(KMAX, 1);
      for (int k = 0; k < KMAX; k++) begin
        logic p; p = 1'($urandom());
        for (int r = 0; r < R; r++) begin A8[r][k] = 1'b1; A[r][k] = rnd_val(1'b1); end
        for (int c = 0; c < C; c++) begin B8[k][c] = p; B[k][c] = rnd_val(p); end
      end
      run_and_check(K, "pv", st);
    end
    // clustered all-4-bit tile: no stall at all
    for (int r = 0; r < R; r++) for (int k = 0; k < KMAX; k++) begin A8[r][k] = 1'b0; A[r][k] = rnd_val(1'b0); end
    for (int c = 0; c < C; c++) for (int k = 0; k < KMAX; k++) begin B8[k][c] = 1'b0; B[k][c] = rnd_val(1'b0); end
    run_and_check(9, "nonstall", st);
    checks++;
    if (st != 0 || run_cycles != 32'(9 + R + C - 1)) begin
      failures++;
      $display("FAIL single-precision tile stalled: %0d cycles, %0d stalls", run_cycles, st);
    end
    // one 8-bit row and one 8-bit column (unclustered case): must stall
    A8[1][0] = 1'b1;
    for (int k = 0; k < KMAX; k++) begin A8[1][k] = 1'b1; B8[k][1] = 1'b1; end
    run_and_check(9, "stall", st);
    checks++;
    if (st == 0 || stall_steps == 0) begin
      failures++;
      $display("FAIL mixed tile did not stall");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

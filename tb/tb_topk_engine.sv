// tb_topk_engine: self-checking test of the top-k engine.
//
// Random scores drawn from a small range (so that ties are common), random
// candidate masks, token counts and k. The expected selection is computed
// here by repeatedly taking the best remaining candidate (highest score,
// lowest index on a tie). The test checks the selected mask, the count and
// that the engine needs exactly n cycles. It also chains two runs as the
// accelerator does: top-k0 of all tokens, then top-k1 of the kept ones.
module tb_topk_engine;
  localparam int N = 16, SW = 8;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] n, k, count;
  logic [N-1:0] valid_in, sel;
  logic [SW-1:0] scores [N];
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  topk_engine #(.N_MAX(N), .SCORE_W(SW), .IDX_W(16)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model(input logic [N-1:0] v, input int nn, input int kk);
    logic [N-1:0] res, left;
    res = '0;
    left = '0;
    for (int j = 0; j < nn; j++) left[j] = v[j];
    for (int t = 0; t < kk; t++) begin
      int best; best = -1;
      for (int j = 0; j < nn; j++)
        if (left[j] && (best < 0 || scores[j] > scores[best])) best = j;
      if (best < 0) break;
      res[best] = 1'b1; left[best] = 1'b0;
    end
    return res;
  endfunction

  task automatic run(input logic [N-1:0] v, input int nn, input int kk, output logic [N-1:0] got);
    int cyc;
    logic [N-1:0] e;
    valid_in = v; n = 16'(nn); k = 16'(kk);
    @(posedge clk); #1 start = 1'b1; @(posedge clk); #1 start = 1'b0;
    cyc = 0;
    while (!done) begin @(posedge clk); #1 cyc++; end
    e = model(v, nn, kk);
    checks++;
    if (sel != e) begin failures++; $display("FAIL sel %b expected %b (n=%0d k=%0d)", sel, e, nn, kk); end
    checks++;
    if (int'(count) != $countones(e)) begin failures++; $display("FAIL count %0d", count); end
    checks++;
    if (nn > 0 && cyc != nn) begin failures++; $display("FAIL cycles %0d for n=%0d", cyc, nn); end
    got = sel;
  endtask

  initial begin
    logic [N-1:0] g0, g1;
    n = '0; k = '0; valid_in = '0;
    for (int j = 0; j < N; j++) scores[j] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int nn, k0, k1;
      for (int j = 0; j < N; j++) scores[j] = SW'($urandom_range(7, 0));
      nn = $urandom_range(N, 1);
      k0 = $urandom_range(nn, 0);
      k1 = $urandom_range(k0, 0);
      if (t % 2 == 0) run(N'($urandom()), nn, k0, g0);
      else begin
        run('1, nn, k0, g0);          // first engine: keep k0 of all tokens
        run(g0, nn, k1, g1);          // second engine: 8-bit among the kept
        checks++;
        if ((g1 & ~g0) != '0) begin failures++; $display("FAIL 8-bit token outside kept set"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

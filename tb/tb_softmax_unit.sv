// tb_softmax_unit: self-checking test of the softmax unit.
//
// Random score rows (lengths 1..40, random shifts) are served from an array
// here. The expected probabilities are computed in the testbench from the
// formula: table values from real arithmetic round(32768 * 2^(-f/16)), the
// reciprocal by integer division, the product shifted and saturated. The
// test also checks that the probabilities of a row add up to about 1.0
// (128 in Q0.7), that the largest score gets the largest probability, and
// the row latency of 3*len + 33 cycles.
module tb_softmax_unit;
  localparam int NMAX = 40;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] len, rd_idx, out_idx;
  logic [4:0] shift;
  logic signed [31:0] rd_data;
  logic out_valid, busy, done;
  logic [7:0] out_prob;
  logic signed [31:0] row [NMAX];
  int got [NMAX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  softmax_unit #(.IDX_W(16), .SCORE_W(32)) dut (.*);

  assign rd_data = (rd_idx < NMAX) ? row[rd_idx] : 32'sd0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && out_idx < NMAX) got[out_idx] = int'(out_prob);

  function automatic longint e_model(input longint d, input int sh);
    longint t; longint tab;
    t = d >>> sh;
    if (t >= 256) return 0;
    tab = longint'($rtoi($floor(32768.0 * $pow(2.0, -real'(t % 16) / 16.0) + 0.5)));
    return tab >>> (t / 16);
  endfunction

  initial begin
    longint m, s, e, recip, p, tot;
    int n, sh, cyc, best;
    len = '0; shift = '0;
    for (int i = 0; i < NMAX; i++) row[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      n  = $urandom_range(NMAX, 1);
      sh = $urandom_range(8, 0);
      for (int i = 0; i < NMAX; i++) row[i] = $signed($urandom_range(40000, 0)) - 20000;
      if (t == 0) for (int i = 0; i < NMAX; i++) row[i] = 32'sd5;   // all equal
      len = 16'(n); shift = 5'(sh);
      @(posedge clk); #1 start = 1'b1; @(posedge clk); #1 start = 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (cyc != 3 * n + 33) begin failures++; $display("FAIL latency %0d for len %0d", cyc, n); end
      // model
      m = row[0]; best = 0;
      for (int i = 1; i < n; i++) if (row[i] > m) begin m = row[i]; best = i; end
      s = 0;
      for (int i = 0; i < n; i++) s += e_model(m - row[i], sh);
      recip = (longint'(1) << 30) / s;
      tot = 0;
      for (int i = 0; i < n; i++) begin
        e = e_model(m - row[i], sh);
        p = (e * recip) >>> 23;
        if (p > 127) p = 127;
        checks++;
        if (got[i] != int'(p)) begin failures++; $display("FAIL prob[%0d]=%0d expected %0d", i, got[i], p); end
        tot += got[i];
      end
      checks++;
      if (tot > 128 || tot < 128 - n - 1) begin failures++; $display("FAIL row sum %0d (len %0d)", tot, n); end
      checks++;
      for (int i = 0; i < n; i++) if (got[i] > got[best]) begin
        failures++; $display("FAIL max score not max prob"); break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

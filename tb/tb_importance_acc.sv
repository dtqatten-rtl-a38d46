// tb_importance_acc: self-checking test of the token importance accumulator.
//
// Streams random (token, probability) pairs into a 10-bit accumulator with
// 12 tokens, keeps the expected column sums here (saturating at 1023), and
// compares all scores after every addition; `clr` must empty them all.
module tb_importance_acc;
  localparam int N = 12, SW = 10;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, add_en = 1'b0;
  logic [15:0] add_idx;
  logic [7:0] add_val;
  logic [SW-1:0] scores [N];
  int expv [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  importance_acc #(.N_MAX(N), .SCORE_W(SW), .IDX_W(16)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(scores[i]) != expv[i]) begin
        failures++; $display("FAIL score[%0d]=%0d expected %0d", i, scores[i], expv[i]);
      end
    end
  endtask

  initial begin
    add_idx = '0; add_val = '0;
    for (int i = 0; i < N; i++) expv[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      for (int t = 0; t < 150; t++) begin
        add_en = 1'b1;
        add_idx = 16'($urandom_range(N, 0));   // N is out of range and ignored
        add_val = 8'($urandom_range(127, 0));
        if (add_idx < N) begin
          expv[add_idx] += add_val;
          if (expv[add_idx] > (1 << SW) - 1) expv[add_idx] = (1 << SW) - 1;
        end
        @(posedge clk); #1 add_en = 1'b0;
        compare();
      end
      clr = 1'b1; @(posedge clk); #1 clr = 1'b0;
      for (int i = 0; i < N; i++) expv[i] = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

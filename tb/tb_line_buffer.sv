// tb_line_buffer: self-checking test of the token line buffer.
//
// Random masked beat writes (including beats that run past the end of a
// line and writes to lines that do not exist) go to the buffer and to a
// shadow copy kept here; after each write every column read, every row read
// and every line tag is compared with the shadow.
module tb_line_buffer;
  import dtq_pkg::*;
  localparam int L = 4, D = 10, W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en;
  logic [15:0] wr_line, wr_elem, col_idx, row_idx;
  logic [W-1:0] wr_mask;
  logic [7:0] wr_data [W];
  prec_e wr_prec;
  logic [7:0] col_data [L];
  logic [7:0] row_data [D];
  prec_e line_prec [L];
  logic [7:0] shadow [L][D];
  prec_e stag [L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  line_buffer #(.LINES(L), .DEPTH(D), .EW(8), .WBEAT(W), .IDX_W(16)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_line = 0; wr_elem = 0; wr_mask = 0; wr_prec = PREC0; col_idx = 0; row_idx = 0;
    for (int i = 0; i < W; i++) wr_data[i] = 0;
    for (int l = 0; l < L; l++) begin stag[l] = PREC0; for (int e = 0; e < D; e++) shadow[l][e] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      wr_en = 1'b1;
      wr_line = 16'($urandom_range(L, 0));        // L itself is out of range
      wr_elem = 16'($urandom_range(D, 0));
      wr_mask = W'($urandom());
      wr_prec = prec_e'($urandom_range(2, 0));
      for (int i = 0; i < W; i++) wr_data[i] = 8'($urandom());
      if (wr_line < L) begin
        stag[wr_line] = wr_prec;
        for (int i = 0; i < W; i++)
          if (wr_mask[i] && wr_elem + i < D) shadow[wr_line][wr_elem + i] = wr_data[i];
      end
      @(posedge clk); #1 wr_en = 1'b0;
      for (int e = 0; e <= D; e++) begin
        col_idx = 16'(e); #1;
        for (int l = 0; l < L; l++) begin
          checks++;
          if (col_data[l] != ((e < D) ? shadow[l][e] : 8'd0)) begin
            failures++; $display("FAIL col read line %0d elem %0d", l, e);
          end
        end
      end
      for (int l = 0; l < L; l++) begin
        row_idx = 16'(l); #1;
        for (int e = 0; e < D; e++) begin
          checks++;
          if (row_data[e] != shadow[l][e]) begin failures++; $display("FAIL row read %0d %0d", l, e); end
        end
        checks++;
        if (line_prec[l] != stag[l]) begin failures++; $display("FAIL tag line %0d", l); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

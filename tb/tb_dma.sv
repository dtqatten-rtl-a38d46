// tb_dma: self-checking test of the DMA.
//
// A behavioural DRAM (with back-pressure) holds random bytes. Random
// descriptors of 8-bit (64 bytes) and 4-bit (32 bytes of packed nibbles)
// token vectors go to the DMA; its write beats are collected into a line
// here and compared with the vector decoded directly from DRAM contents
// (bytes for 8-bit tokens, sign-extended nibbles for 4-bit tokens). Also
// checked: destination, line and precision of every beat, and the number of
// words read.
module tb_dma;
  import dtq_pkg::*;
  localparam int D = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic desc_valid, desc_ready;
  logic [31:0] desc_addr;
  logic [15:0] desc_bytes, desc_line;
  prec_e desc_prec;
  mat_e desc_dest;
  logic rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [31:0] rd_req_addr;
  logic [63:0] rd_resp_data;
  logic wr_en;
  mat_e wr_dest;
  logic [15:0] wr_line, wr_elem;
  logic [15:0] wr_mask;
  logic [7:0] wr_data [16];
  prec_e wr_prec;
  logic [31:0] words_read;
  logic [7:0] line [D];
  int checks = 0, failures = 0, beat_errs = 0;

  always #5 clk = ~clk;

  dma #(.ADDR_W(32), .IDX_W(16), .DRAM_W(64)) dut (.*);
  dram_model #(.SIZE(8192), .DRAM_W(64), .LAT(3), .STALLS(1'b1)) u_dram (
    .clk, .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_addr(rd_req_addr),
    .resp_valid(rd_resp_valid), .resp_data(rd_resp_data));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (wr_en) begin
    if (wr_dest != desc_dest || wr_line != desc_line || wr_prec != desc_prec) beat_errs++;
    for (int i = 0; i < 16; i++)
      if (wr_mask[i] && wr_elem + i < D) line[wr_elem + i] = wr_data[i];
  end

  initial begin
    int unsigned w0;
    desc_valid = 0; desc_addr = 0; desc_bytes = 0; desc_line = 0; desc_prec = PREC8; desc_dest = MAT_Q;
    for (int i = 0; i < 8192; i++) u_dram.mem[i] = 8'($urandom());
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      logic [31:0] a;
      logic p8;
      p8 = 1'($urandom());
      a = 32'($urandom_range(100, 0) * D);
      for (int i = 0; i < D; i++) line[i] = 8'hEE;
      w0 = words_read;
      desc_addr = a; desc_prec = p8 ? PREC8 : PREC4; desc_bytes = p8 ? 16'(D) : 16'(D / 2);
      desc_dest = mat_e'($urandom_range(2, 0)); desc_line = 16'($urandom_range(15, 0));
      desc_valid = 1'b1;
      @(posedge clk); #1 desc_valid = 1'b0;
      while (!desc_ready) begin @(posedge clk); #1; end
      for (int i = 0; i < D; i++) begin
        logic [7:0] e;
        if (p8) e = u_dram.mem[a + i];
        else begin
          logic [3:0] nib;
          nib = (i % 2 == 0) ? u_dram.mem[a + i / 2][3:0] : u_dram.mem[a + i / 2][7:4];
          e = {{4{nib[3]}}, nib};
        end
        checks++;
        if (line[i] != e) begin failures++; $display("FAIL elem %0d got %h expected %h (p8=%0b)", i, line[i], e, p8); end
      end
      checks++;
      if (words_read - w0 != (p8 ? D / 8 : D / 16)) begin failures++; $display("FAIL words %0d", words_read - w0); end
    end
    checks++;
    if (beat_errs != 0) begin failures++; $display("FAIL %0d beats with wrong routing", beat_errs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// dma: moves one token vector from DRAM into a line buffer.
//
// The paper's DMA fetches the Q, K and V vectors of each valid token, at
// the address and length computed by the fetcher, into the line buffers.
// This module handles one vector (descriptor) at a time. It issues the word
// reads of the vector on the DRAM read port (DRAM_W-bit words, responses in
// order) and turns each returned word into one write beat for the line
// buffer: an 8-bit token gives DRAM_W/8 elements per word, a 4-bit token
// gives DRAM_W/4 elements per word (nibbles, sign-extended to the 8-bit
// element format). Element i of a word is its i-th byte or nibble counted
// from the least significant end. The word-based DRAM port, the packing and
// the one-descriptor-at-a-time operation are this design's choices.
//
// Interface and timing: a descriptor is taken when `desc_valid && desc_ready`.
// Read requests go out with valid/ready, up to one per cycle; every response
// becomes a write beat in the cycle after it arrives. `desc_ready` rises
// again after the last beat. `desc_line` and `desc_dest` are passed to the
// write port unchanged so the caller routes the beats.
module dma #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned IDX_W  = 16,
  parameter int unsigned DRAM_W = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // descriptor
  input  logic                 desc_valid,
  output logic                 desc_ready,
  input  logic [ADDR_W-1:0]    desc_addr,
  input  logic [IDX_W-1:0]     desc_bytes,
  input  dtq_pkg::prec_e       desc_prec,
  input  dtq_pkg::mat_e        desc_dest,
  input  logic [IDX_W-1:0]     desc_line,
  // DRAM read port
  output logic                 rd_req_valid,
  input  logic                 rd_req_ready,
  output logic [ADDR_W-1:0]    rd_req_addr,
  input  logic                 rd_resp_valid,
  input  logic [DRAM_W-1:0]    rd_resp_data,
  // line buffer write port
  output logic                 wr_en,
  output dtq_pkg::mat_e        wr_dest,
  output logic [IDX_W-1:0]     wr_line,
  output logic [IDX_W-1:0]     wr_elem,
  output logic [DRAM_W/4-1:0]  wr_mask,
  output logic [7:0]           wr_data [DRAM_W/4],
  output dtq_pkg::prec_e       wr_prec,
  output logic [31:0]          words_read
);
  import dtq_pkg::*;

  localparam int unsigned WB = DRAM_W / 8;   // bytes per word
  localparam int unsigned EB = DRAM_W / 4;   // elements per word at most

  logic             active;
  logic [ADDR_W-1:0] addr_q;
  logic [IDX_W-1:0] words_total, words_req, words_got, elem_q;
  prec_e            prec_q;
  mat_e             dest_q;
  logic [IDX_W-1:0] line_q;

  assign desc_ready   = !active && !wr_en;
  assign rd_req_valid = active && (words_req < words_total);
  assign rd_req_addr  = addr_q + ADDR_W'(words_req) * ADDR_W'(WB);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; addr_q <= '0; words_total <= '0; words_req <= '0; words_got <= '0;
      elem_q <= '0; prec_q <= PREC0; dest_q <= MAT_Q; line_q <= '0;
      wr_en <= 1'b0; wr_dest <= MAT_Q; wr_line <= '0; wr_elem <= '0; wr_mask <= '0;
      wr_prec <= PREC0; words_read <= '0;
      for (int i = 0; i < EB; i++) wr_data[i] <= '0;
    end else begin
      wr_en <= 1'b0;
      if (desc_valid && desc_ready) begin
        active      <= (desc_bytes != '0);
        addr_q      <= desc_addr;
        words_total <= (desc_bytes + IDX_W'(WB - 1)) / IDX_W'(WB);
        words_req   <= '0;
        words_got   <= '0;
        elem_q      <= '0;
        prec_q      <= desc_prec;
        dest_q      <= desc_dest;
        line_q      <= desc_line;
      end else if (active) begin
        if (rd_req_valid && rd_req_ready) words_req <= words_req + IDX_W'(1);
        if (rd_resp_valid) begin
          wr_en   <= 1'b1;
          wr_dest <= dest_q;
          wr_line <= line_q;
          wr_elem <= elem_q;
          wr_prec <= prec_q;
          words_read <= words_read + 32'd1;
          if (prec_q == PREC8) begin
            for (int i = 0; i < EB; i++) begin
              wr_data[i] <= (i < WB) ? rd_resp_data[(i % WB)*8 +: 8] : 8'd0;
              wr_mask[i] <= (i < WB);
            end
            elem_q <= elem_q + IDX_W'(WB);
          end else begin
            for (int i = 0; i < EB; i++) begin
              wr_data[i] <= {{4{rd_resp_data[i*4+3]}}, rd_resp_data[i*4 +: 4]};
              wr_mask[i] <= 1'b1;
            end
            elem_q <= elem_q + IDX_W'(EB);
          end
          words_got <= words_got + IDX_W'(1);
          if (words_got + IDX_W'(1) == words_total) active <= 1'b0;
        end
      end
    end
  end

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    rd_resp_valid |-> active && (words_got < words_req));

endmodule

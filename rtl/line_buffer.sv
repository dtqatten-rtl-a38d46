// line_buffer: on-chip buffer of token lines that feeds a systolic array.
//
// The paper places a line buffer in front of each edge of both arrays
// (for Q, for K^T, for V and for the softmax results); each line holds the
// vector of one token and feeds one row or column of PEs. This module is one
// such buffer: LINES lines of DEPTH elements of EW bits, plus a precision
// tag per line. The DMA (or the softmax unit) writes up to WBEAT consecutive
// elements of one line per cycle; the tag of that line is written with them.
// Two combinational read ports serve the arrays: `col_*` returns element
// `col_idx` of every line (one k-slice for the array edge) and `row_*`
// returns one whole line. Reads of elements past DEPTH return zero.
// Building the buffer from flip-flops with these two read ports is this
// design's choice; the paper gives only the function.
module line_buffer #(
  parameter int unsigned LINES = 16,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned EW    = 8,
  parameter int unsigned WBEAT = 16,
  parameter int unsigned IDX_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_line,
  input  logic [IDX_W-1:0] wr_elem,              // first element written
  input  logic [WBEAT-1:0] wr_mask,              // which of the WBEAT elements to write
  input  logic [EW-1:0]    wr_data [WBEAT],
  input  dtq_pkg::prec_e   wr_prec,
  input  logic [IDX_W-1:0] col_idx,
  output logic [EW-1:0]    col_data [LINES],
  input  logic [IDX_W-1:0] row_idx,
  output logic [EW-1:0]    row_data [DEPTH],
  output dtq_pkg::prec_e   line_prec [LINES]
);
  import dtq_pkg::*;

  localparam int unsigned LB = (LINES > 1) ? $clog2(LINES) : 1;  // line index bits
  localparam int unsigned DB = (DEPTH > 1) ? $clog2(DEPTH) : 1;  // element index bits

  logic [EW-1:0] mem [LINES][DEPTH];
  prec_e         tag [LINES];
  logic [IDX_W-1:0] wa [WBEAT];   // element address of each beat lane

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LINES; l++) begin
        tag[l] <= PREC0;
        for (int e = 0; e < DEPTH; e++) mem[l][e] <= '0;
      end
    end else if (wr_en && (wr_line < IDX_W'(LINES))) begin
      tag[wr_line[LB-1:0]] <= wr_prec;
      for (int i = 0; i < WBEAT; i++)
        if (wr_mask[i] && (wa[i] < IDX_W'(DEPTH)))
          mem[wr_line[LB-1:0]][wa[i][DB-1:0]] <= wr_data[i];
    end
  end

  always_comb
    for (int i = 0; i < WBEAT; i++) wa[i] = wr_elem + IDX_W'(i);

  always_comb begin
    for (int l = 0; l < LINES; l++) begin
      col_data[l]  = (col_idx < IDX_W'(DEPTH)) ? mem[l][col_idx[DB-1:0]] : '0;
      line_prec[l] = tag[l];
    end
    for (int e = 0; e < DEPTH; e++)
      row_data[e] = (row_idx < IDX_W'(LINES)) ? mem[row_idx[LB-1:0]][e] : '0;
  end

endmodule

// tb_dtqatten_top: end-to-end test of the accelerator at a reduced size
// (4x5 arrays, 16 channels per head, up to 24 tokens, 2 heads, 3 layers).
// The stimulus, the reference model and all checks are in attn_env.
module tb_dtqatten_top;
  localparam int ROWS = 4, COLS = 5, VEC_LEN = 16, N_MAX = 24;
  logic clk, rst_n, start, first_layer, busy, done;
  logic [15:0] n_init, k0, k1, list_n, n_lo, out_row, out_col;
  logic [7:0] num_heads, out_head;
  logic [4:0] sm_shift;
  logic [31:0] base_q, base_k, base_v, head_stride, rd_req_addr;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, out_valid;
  logic [63:0] rd_resp_data;
  logic signed [31:0] out_data [COLS];
  logic [31:0] perf_cycles, perf_qk_tiles, perf_qk_stall_tiles, perf_qk_stall_cycles;
  logic [31:0] perf_qk_mac_cycles, perf_pv_stall_cycles, perf_topk_overlap, perf_dram_words;

  dtqatten_top #(.ROWS(ROWS), .COLS(COLS), .VEC_LEN(VEC_LEN), .N_MAX(N_MAX)) dut (.*);

  attn_env #(.ROWS(ROWS), .COLS(COLS), .VEC_LEN(VEC_LEN), .N_MAX(N_MAX), .N_TOK(22),
             .HEADS(2), .LAYERS(3), .SHIFT(8), .WATCHDOG(2000000)) env (.*);
endmodule

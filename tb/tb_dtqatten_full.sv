// tb_dtqatten_full: end-to-end test of the accelerator at its default size
// (16x18 arrays, 64 channels per head, 128 tokens), two heads and two
// layers, so that the second layer runs on pruned, mixed-precision,
// reordered tokens. The stimulus, the reference model and all checks are
// in attn_env.
module tb_dtqatten_full;
  localparam int COLS = 18;
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

  dtqatten_top dut (.*);

  attn_env #(.ROWS(16), .COLS(COLS), .VEC_LEN(64), .N_MAX(128), .N_TOK(128),
             .HEADS(2), .LAYERS(2), .SHIFT(10), .WATCHDOG(20000000)) env (.*);
endmodule

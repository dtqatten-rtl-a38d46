// vssa: output-stationary variable-speed systolic array (ROWS x COLS PEs).
//
// Computes C = A x B for an A of ROWS x K and a B of K x COLS, where every
// element carries a precision flag (8-bit or 4-bit). Row r of A enters PE row
// r from the left, column c of B enters PE column c from the top; each PE
// keeps its own C[r][c] in its P register (output stationary, as the
// paper's Fig. 4 draws both arrays). The array skews the inputs itself:
// row r is delayed by r steps and column c by c steps, so the caller presents
// one unskewed k-slice {A[*][k], B[k][*]} per step.
//
// Variable speed and stalls: all PEs advance in lock step, as the strict
// systolic dataflow requires. A step lasts as long as its slowest active PE
// (1, 2 or 4 cycles); the other active PEs stall for the rest of the step.
// The array counts the stalled PE-cycles, the multiplying PE-cycles and the
// steps in which any PE stalled, which gives the stall cycle ratio of the
// paper's Eq. (3). The lock-step rule is the paper's; deriving the
// step end from an OR of the PEs' `busy` outputs is this design's choice.
//
// Interface and timing: pulse `start` with `k_len` (number of k-slices,
// >= 1). While running, `k_idx` names the slice wanted; the caller drives
// a_*/b_* for that slice combinationally and the array takes it when `adv` is
// high. A slice index >= k_len is treated as empty. After
// k_len + ROWS + COLS - 1 steps `done` pulses for one cycle and `c_out` holds
// the result until the next `start`. Counters clear on `start`.
module vssa #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 18,
  parameter int unsigned K_W   = 16,   // width of the k-slice counter
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [K_W-1:0]          k_len,
  output logic [K_W-1:0]          k_idx,
  output logic                    adv,
  input  logic [7:0]              a_in   [ROWS],
  input  logic                    a_is8  [ROWS],
  input  logic                    a_vld  [ROWS],
  input  logic [7:0]              b_in   [COLS],
  input  logic                    b_is8  [COLS],
  input  logic                    b_vld  [COLS],
  output logic                    running,
  output logic                    done,
  output logic signed [ACC_W-1:0] c_out  [ROWS][COLS],
  output logic [31:0]             stall_cycles,  // sum over PEs of stalled cycles
  output logic [31:0]             mac_cycles,    // sum over PEs of multiplying cycles
  output logic [31:0]             run_cycles,    // cycles from start to done
  output logic [31:0]             stall_steps    // steps in which at least one PE stalled
);

  localparam int unsigned NPE = ROWS * COLS;

  logic [1:0]     cyc;
  logic [K_W-1:0] steps_total;
  logic           clr;
  logic           any_busy, any_stall;
  logic           step_stalled;
  logic [$clog2(NPE+1)-1:0] n_stall, n_mac;

  // Operand wires between PEs: a flows right, b flows down.
  logic [7:0] a_w   [ROWS][COLS+1];
  logic       a8_w  [ROWS][COLS+1];
  logic       av_w  [ROWS][COLS+1];
  logic [7:0] b_w   [ROWS+1][COLS];
  logic       b8_w  [ROWS+1][COLS];
  logic       bv_w  [ROWS+1][COLS];
  logic       busy_w  [ROWS][COLS];
  logic       mac_w   [ROWS][COLS];
  logic       stall_w [ROWS][COLS];

  // Skew delay lines: row r is delayed by r steps, column c by c steps.
  logic [7:0] a_dl  [ROWS][ROWS];
  logic       a8_dl [ROWS][ROWS];
  logic       av_dl [ROWS][ROWS];
  logic [7:0] b_dl  [COLS][COLS];
  logic       b8_dl [COLS][COLS];
  logic       bv_dl [COLS][COLS];

  logic slice_ok;
  assign slice_ok = running && (k_idx < k_len);
  assign clr      = start;
  assign steps_total = k_len + K_W'(ROWS + COLS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int i = 0; i < ROWS; i++) begin
          a_dl[r][i] <= '0; a8_dl[r][i] <= 1'b0; av_dl[r][i] <= 1'b0;
        end
      for (int c = 0; c < COLS; c++)
        for (int i = 0; i < COLS; i++) begin
          b_dl[c][i] <= '0; b8_dl[c][i] <= 1'b0; bv_dl[c][i] <= 1'b0;
        end
    end else if (clr) begin
      for (int r = 0; r < ROWS; r++)
        for (int i = 0; i < ROWS; i++) av_dl[r][i] <= 1'b0;
      for (int c = 0; c < COLS; c++)
        for (int i = 0; i < COLS; i++) bv_dl[c][i] <= 1'b0;
    end else if (adv) begin
      for (int r = 0; r < ROWS; r++) begin
        a_dl[r][0] <= a_in[r]; a8_dl[r][0] <= a_is8[r]; av_dl[r][0] <= a_vld[r] && slice_ok;
        for (int i = 1; i < ROWS; i++) begin
          a_dl[r][i] <= a_dl[r][i-1]; a8_dl[r][i] <= a8_dl[r][i-1]; av_dl[r][i] <= av_dl[r][i-1];
        end
      end
      for (int c = 0; c < COLS; c++) begin
        b_dl[c][0] <= b_in[c]; b8_dl[c][0] <= b_is8[c]; bv_dl[c][0] <= b_vld[c] && slice_ok;
        for (int i = 1; i < COLS; i++) begin
          b_dl[c][i] <= b_dl[c][i-1]; b8_dl[c][i] <= b8_dl[c][i-1]; bv_dl[c][i] <= bv_dl[c][i-1];
        end
      end
    end
  end

  // Array edge inputs: undelayed for row/column 0, from the delay line otherwise.
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      if (r == 0) begin
        a_w[r][0] = a_in[r]; a8_w[r][0] = a_is8[r]; av_w[r][0] = a_vld[r] && slice_ok;
      end else begin
        a_w[r][0] = a_dl[r][r-1]; a8_w[r][0] = a8_dl[r][r-1]; av_w[r][0] = av_dl[r][r-1];
      end
    end
    for (int c = 0; c < COLS; c++) begin
      if (c == 0) begin
        b_w[0][c] = b_in[c]; b8_w[0][c] = b_is8[c]; bv_w[0][c] = b_vld[c] && slice_ok;
      end else begin
        b_w[0][c] = b_dl[c][c-1]; b8_w[0][c] = b8_dl[c][c-1]; bv_w[0][c] = bv_dl[c][c-1];
      end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      vssa_pe #(.ACC_W(ACC_W)) u_pe (
        .clk, .rst_n, .clr, .adv, .cyc,
        .a_in(a_w[r][c]), .a_is8_in(a8_w[r][c]), .a_vld_in(av_w[r][c]),
        .b_in(b_w[r][c]), .b_is8_in(b8_w[r][c]), .b_vld_in(bv_w[r][c]),
        .a_out(a_w[r][c+1]), .a_is8_out(a8_w[r][c+1]), .a_vld_out(av_w[r][c+1]),
        .b_out(b_w[r+1][c]), .b_is8_out(b8_w[r+1][c]), .b_vld_out(bv_w[r+1][c]),
        .busy(busy_w[r][c]), .mac(mac_w[r][c]), .stall(stall_w[r][c]),
        .p(c_out[r][c])
      );
    end
  end

  always_comb begin
    any_busy  = 1'b0;
    any_stall = 1'b0;
    n_stall   = '0;
    n_mac     = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        any_busy  = any_busy  | busy_w[r][c];
        any_stall = any_stall | stall_w[r][c];
        n_stall   = n_stall + $bits(n_stall)'(stall_w[r][c]);
        n_mac     = n_mac   + $bits(n_mac)'(mac_w[r][c]);
      end
  end

  // The step ends in the first cycle in which no PE needs another cycle.
  assign adv = running && !any_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; done <= 1'b0; cyc <= '0; k_idx <= '0;
      stall_cycles <= '0; mac_cycles <= '0; run_cycles <= '0; stall_steps <= '0;
      step_stalled <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        running <= 1'b1; cyc <= '0; k_idx <= '0;
        stall_cycles <= '0; mac_cycles <= '0; run_cycles <= '0; stall_steps <= '0;
        step_stalled <= 1'b0;
      end else if (running) begin
        run_cycles   <= run_cycles + 32'd1;
        stall_cycles <= stall_cycles + 32'(n_stall);
        mac_cycles   <= mac_cycles + 32'(n_mac);
        if (adv) begin
          cyc <= '0;
          step_stalled <= 1'b0;
          if (step_stalled || any_stall) stall_steps <= stall_steps + 32'd1;
          k_idx <= k_idx + K_W'(1);
          if (k_idx + K_W'(1) == steps_total) begin
            running <= 1'b0;
            done    <= 1'b1;
          end
        end else begin
          cyc <= cyc + 2'd1;
          step_stalled <= step_stalled | any_stall;
        end
      end
    end
  end

  // A step never lasts more than four cycles.
  a_cyc_bound: assert property (@(posedge clk) disable iff (!rst_n) running |-> (cyc != 2'd3) || adv);

endmodule

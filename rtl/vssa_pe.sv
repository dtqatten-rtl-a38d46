// vssa_pe: one processing element of the variable-speed systolic array.
//
// The PE is built around a single small multiplier, the "4-bit MAC" of the
// paper's Fig. 1(b), and three registers: F (operand from the left
// neighbour), W (operand from the top neighbour) and P (output-stationary
// partial sum). An 8-bit operand is split into a signed high nibble and an
// unsigned low nibble; a 4-bit operand is used whole. One multiply-accumulate
// therefore takes 1 cycle (4x4), 2 cycles (4x8, 8x4) or 4 cycles (8x8), which
// is the paper's variable speed. In the 8x8 case the four cycles take the
// nibble pairs HH, HL, LH, LL; each partial product is shifted left by 4 per
// high nibble involved (8, 4, 4, 0) and added to P. The paper's figure
// shows the shifts as "<<4" steps; adding pre-shifted partial products into P
// gives the same sum while P keeps accumulating across the dot product, and
// is this design's choice. The multiplier is 5x5 bits signed so that a signed
// high nibble and an unsigned low nibble go through the same unit.
//
// Timing: the array drives a common sub-cycle index `cyc` (0..3) and a common
// `adv` that ends the pipeline step. During a step the PE multiplies in the
// cycles cyc < its own need and stalls for the rest of the step. On `adv`
// the PE also moves F to the right and W downwards and loads the operands of
// the next step. `busy` tells the array that this PE still needs cycles after
// the current one; the step ends in the first cycle where no PE is busy.
// `clr` empties P and the operand registers for a new tile.
module vssa_pe #(
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    adv,
  input  logic [1:0]              cyc,
  // operand from the left (row operand, register F)
  input  logic [7:0]              a_in,
  input  logic                    a_is8_in,
  input  logic                    a_vld_in,
  // operand from the top (column operand, register W)
  input  logic [7:0]              b_in,
  input  logic                    b_is8_in,
  input  logic                    b_vld_in,
  // registered operands forwarded to the right and downwards
  output logic [7:0]              a_out,
  output logic                    a_is8_out,
  output logic                    a_vld_out,
  output logic [7:0]              b_out,
  output logic                    b_is8_out,
  output logic                    b_vld_out,
  output logic                    busy,    // needs at least one more cycle in this step
  output logic                    mac,     // multiplies in this cycle
  output logic                    stall,   // holds a valid pair but waits for the step to end
  output logic signed [ACC_W-1:0] p
);
  import dtq_pkg::*;

  logic [7:0] f_q, w_q;
  logic       f_is8, w_is8, f_vld, w_vld;
  logic       both;
  logic [2:0] need;
  logic       a_hi, b_hi;
  logic signed [4:0] a_nib, b_nib;
  logic signed [9:0] prod;
  logic [3:0] sh;
  logic signed [ACC_W-1:0] part;

  assign both = f_vld && w_vld;
  assign need = mac_cycles(f_is8, w_is8);
  assign mac   = both && ({1'b0, cyc} < need);
  assign stall = both && ({1'b0, cyc} >= need);
  assign busy  = both && ({1'b0, cyc} + 3'd1 < need);

  // Nibble selection for the current sub-cycle.
  always_comb begin
    a_hi = 1'b0;
    b_hi = 1'b0;
    if (f_is8) a_hi = w_is8 ? (cyc < 2'd2) : (cyc == 2'd0);
    if (w_is8) b_hi = f_is8 ? (cyc[0] == 1'b0) : (cyc == 2'd0);
    if (!f_is8)     a_nib = {f_q[3], f_q[3:0]};
    else if (a_hi)  a_nib = {f_q[7], f_q[7:4]};
    else            a_nib = {1'b0, f_q[3:0]};
    if (!w_is8)     b_nib = {w_q[3], w_q[3:0]};
    else if (b_hi)  b_nib = {w_q[7], w_q[7:4]};
    else            b_nib = {1'b0, w_q[3:0]};
    sh   = ((f_is8 && a_hi) ? 4'd4 : 4'd0) + ((w_is8 && b_hi) ? 4'd4 : 4'd0);
    prod = a_nib * b_nib;
    part = ACC_W'(prod) <<< sh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q <= '0; w_q <= '0; f_is8 <= 1'b0; w_is8 <= 1'b0;
      f_vld <= 1'b0; w_vld <= 1'b0; p <= '0;
    end else if (clr) begin
      f_q <= '0; w_q <= '0; f_is8 <= 1'b0; w_is8 <= 1'b0;
      f_vld <= 1'b0; w_vld <= 1'b0; p <= '0;
    end else begin
      if (mac) p <= p + part;
      if (adv) begin
        f_q <= a_in; f_is8 <= a_is8_in; f_vld <= a_vld_in;
        w_q <= b_in; w_is8 <= b_is8_in; w_vld <= b_vld_in;
      end
    end
  end

  assign a_out = f_q;  assign a_is8_out = f_is8;  assign a_vld_out = f_vld;
  assign b_out = w_q;  assign b_is8_out = w_is8;  assign b_vld_out = w_vld;

endmodule

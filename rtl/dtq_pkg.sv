// dtq_pkg: types and constants shared by the dynamic token-quantized attention
// accelerator.
//
// Every token of a layer carries one precision: 8-bit (important tokens),
// 4-bit (less important tokens) or 0-bit (pruned, never fetched again). The
// three levels and the 8/4-bit split follow the paper; the two-bit encoding
// below is this design's own choice.
//
// Element format inside the accelerator: every Q, K, V element is held in an
// 8-bit two's-complement field. A 4-bit token's elements are sign-extended
// 4-bit codes (-8..7). The PE reads an 8-bit element as a signed high nibble
// and an unsigned low nibble.
package dtq_pkg;

  typedef enum logic [1:0] {
    PREC0 = 2'd0,   // pruned token
    PREC4 = 2'd1,   // low precision
    PREC8 = 2'd2    // high precision
  } prec_e;

  // Which matrix a fetch is for.
  typedef enum logic [1:0] {
    MAT_Q = 2'd0,
    MAT_K = 2'd1,
    MAT_V = 2'd2
  } mat_e;

  // Cycles one variable-speed PE needs for one multiply-accumulate step:
  // 4x4 -> 1, 4x8 or 8x4 -> 2, 8x8 -> 4 (Fig. 1(b) and Sec. IV-C).
  function automatic logic [2:0] mac_cycles(input logic a_is8, input logic b_is8);
    unique case ({a_is8, b_is8})
      2'b00:   return 3'd1;
      2'b11:   return 3'd4;
      default: return 3'd2;
    endcase
  endfunction

  // 2^(-f/16) for f = 0..15 in Q1.15: round(32768 * 2^(-f/16)).
  // Used by the softmax unit's exponential.
  function automatic logic [15:0] exp2_frac(input logic [3:0] f);
    unique case (f)
      4'd0:  return 16'd32768;
      4'd1:  return 16'd31379;
      4'd2:  return 16'd30048;
      4'd3:  return 16'd28774;
      4'd4:  return 16'd27554;
      4'd5:  return 16'd26386;
      4'd6:  return 16'd25268;
      4'd7:  return 16'd24196;
      4'd8:  return 16'd23170;
      4'd9:  return 16'd22188;
      4'd10: return 16'd21247;
      4'd11: return 16'd20347;
      4'd12: return 16'd19484;
      4'd13: return 16'd18658;
      4'd14: return 16'd17867;
      default: return 16'd17109;
    endcase
  endfunction

endpackage

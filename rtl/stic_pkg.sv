// stic_pkg: types, constants and helper functions shared by the stochastic
// intermittent computing (STIC) core.
//
// The core converts binary (or analog) operands into stochastic bit-streams,
// processes P stream bits per clock in P parallel lanes, and stops each
// computation at one of a few "valid" stream lengths picked from the
// harvested charging rate. The valid lengths are powers of two,
// 2^(MIN_LOG2 + i*LEVEL_STEP) bits for precision level i; divided by P they
// are the clock-cycle counts at which the controller checks the charging
// rate. The default set {16,32,64,128,256} with P = 4 follows the design's
// Algorithm 1; the opcode encoding of the processing unit is this design's
// own choice.
package stic_pkg;

  // Operation performed by every lane of the stochastic processing unit.
  // X and Y are correlated streams (shared RNG), W is uncorrelated to both.
  // Codes 8..10 select the 3x3-window circuits and 11 the gamma circuit of
  // the core instead of the two-operand unit.
  typedef enum logic [3:0] {
    OP_MIN     = 4'd0,  // AND of correlated X,Y      -> min(X,Y)
    OP_MAX     = 4'd1,  // OR  of correlated X,Y      -> max(X,Y)
    OP_ABSSUB  = 4'd2,  // XOR of correlated X,Y      -> |X-Y|
    OP_MUL     = 4'd3,  // AND of uncorrelated X,W    -> X*W
    OP_ADDAPX  = 4'd4,  // OR  of uncorrelated X,W    -> ~X+W (small values)
    OP_DIV     = 4'd5,  // MUX + D flip-flop, X <= Y  -> X/Y
    OP_SCALED  = 4'd6,  // MUX selected by W (=0.5)   -> (X+Y)/2
    OP_PASS    = 4'd7,  // X stream itself (conversion only)
    OP_ROBERTS = 4'd8,  // Roberts cross of pixels 0,1,3,4, select W (=0.5)
    OP_MEDIAN  = 4'd9,  // median of the nine pixels
    OP_MAC     = 4'd10, // sum of pixel[i] * weight[i], i = 0..8
    OP_GAMMA   = 4'd11  // gamma correction X^0.45 (Bernstein polynomial)
  } spu_op_e;

  // Gamma correction: degree and Bernstein coefficients of the polynomial
  // that approximates y = x^0.45 on [0,1]. The coefficients b_k are the
  // least-squares fit of sum_k b_k C(6,k) x^k (1-x)^(6-k) to x^0.45 over the
  // 256 values x = v/256, times 256, rounded and clamped to 0..255 (b_3 = 1.06
  // is clamped). Returned scaled to a w-bit operand. Degree 6: k = 0..6.

  function automatic logic [31:0] gamma_coef(int k, int w);
    logic [31:0] c8;
    case (k)
      0: c8 = 32'd21;
      1: c8 = 32'd194;
      2: c8 = 32'd74;
      3: c8 = 32'd255;
      4: c8 = 32'd170;
      5: c8 = 32'd252;
      default: c8 = 32'd254;
    endcase
    return (w >= 8) ? c8 << (w - 8) : c8 >> (8 - w);
  endfunction

  // Number of precision levels for a given bit-width range and level step.
  function automatic int num_levels(int max_log2, int min_log2, int step);
    return (max_log2 - min_log2) / step + 1;
  endfunction

  // Valid stream length of a level, in clock cycles of a P-lane core.
  function automatic int valid_cycles(int level, int min_log2, int step,
                                      int log2p);
    return 1 << (min_log2 + level * step - log2p);
  endfunction

  // Maximal-length feedback taps (bit positions counted from 1) for the
  // Fibonacci LFSR of a given width, packed as a mask over bits [w-1:0].
  function automatic logic [31:0] lfsr_taps(int w);
    case (w)
      3:  return 32'h0000_0006;  // x^3 + x^2 + 1
      4:  return 32'h0000_000C;  // x^4 + x^3 + 1
      5:  return 32'h0000_0014;  // x^5 + x^3 + 1
      6:  return 32'h0000_0030;  // x^6 + x^5 + 1
      7:  return 32'h0000_0060;  // x^7 + x^6 + 1
      8:  return 32'h0000_00B8;  // x^8 + x^6 + x^5 + x^4 + 1
      9:  return 32'h0000_0110;  // x^9 + x^5 + 1
      10: return 32'h0000_0240;  // x^10 + x^7 + 1
      11: return 32'h0000_0500;  // x^11 + x^9 + 1
      12: return 32'h0000_0829;  // x^12 + x^6 + x^4 + x + 1
      13: return 32'h0000_100D;  // x^13 + x^4 + x^3 + x + 1
      14: return 32'h0000_2015;  // x^14 + x^5 + x^3 + x + 1
      15: return 32'h0000_6000;  // x^15 + x^14 + 1
      16: return 32'h0000_D008;  // x^16 + x^15 + x^13 + x^4 + 1
      default: return 32'h0000_0000;
    endcase
  endfunction

endpackage

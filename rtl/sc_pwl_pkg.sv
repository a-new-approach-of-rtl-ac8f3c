// sc_pwl_pkg - shared types and constants of the stochastic piecewise-linear
// (PWL) function units.
//
// Each function f(x) on x in [0,1) is split into NSEG = 8 equal segments and
// approximated in segment i by f(x) ~ a_i*x + b_i, with a_i and b_i stored as
// 8-bit integers N meaning N * 2^-8. The tables below are the optimised
// coefficients published with the method; the storage convention per
// function is:
//   ln(1+x), tanh, sigmoid, sin : A = a_i,   B = b_i          f = B + a*x
//   cos                         : A = |a_i|, B = b_i - 1.0    f = (1 - A*x) + B
//   e^-x                        : A = |a_i|, B = b_i          f = B - A*x
// Two entries are choices of this design: e^-x segment 0 has b_0 = 1.0
// (256 * 2^-8), which does not fit in 8 bits and is stored as 255; sigmoid
// segment 6 uses b_6 = 135, the value that keeps that segment within the
// maximum error of 7.1e-4 quoted for the sigmoid table.
package sc_pwl_pkg;

  localparam int unsigned W      = 8;   // coefficient / data width (B = 8)
  localparam int unsigned SEGBITS = 3;  // s = 2^3 = 8 segments
  localparam int unsigned NSEG   = 1 << SEGBITS;

  typedef enum logic [2:0] {
    FN_LN1P    = 3'd0,
    FN_TANH    = 3'd1,
    FN_SIGMOID = 3'd2,
    FN_SIN     = 3'd3,
    FN_COS     = 3'd4,
    FN_EXPNEG  = 3'd5
  } sc_func_e;

  localparam int unsigned NFUNC = 6;

  // How the counted product and b are combined
  typedef enum logic [1:0] {
    COMB_AND_ADD  = 2'd0,  // ln(1+x), tanh, sigmoid, sin: AND multiplier, adder
    COMB_NAND_ADD = 2'd1,  // cos: NAND multiplier (1 - a*x), adder
    COMB_AND_SUB  = 2'd2   // e^-x: AND multiplier, subtractor
  } sc_comb_e;

  // One ROM's contents: entry i is word [i]
  typedef logic [NSEG-1:0][W-1:0] coef_tbl_t;

  function automatic sc_comb_e comb_of(sc_func_e f);
    case (f)
      FN_COS:    return COMB_NAND_ADD;
      FN_EXPNEG: return COMB_AND_SUB;
      default:   return COMB_AND_ADD;
    endcase
  endfunction

  // ROM-A contents (slope magnitudes), segment 7 first in the literal
  function automatic coef_tbl_t rom_a_of(sc_func_e f);
    case (f)
      FN_LN1P:    return {8'd126, 8'd143, 8'd151, 8'd162, 8'd180, 8'd193, 8'd217, 8'd243};
      FN_TANH:    return {8'd117, 8'd141, 8'd165, 8'd189, 8'd213, 8'd232, 8'd247, 8'd255};
      FN_SIGMOID: return {8'd50,  8'd52,  8'd57,  8'd57,  8'd63,  8'd63,  8'd64,  8'd64};
      FN_SIN:     return {8'd144, 8'd178, 8'd201, 8'd214, 8'd232, 8'd245, 8'd254, 8'd255};
      FN_COS:     return {8'd211, 8'd186, 8'd162, 8'd138, 8'd106, 8'd79,  8'd47,  8'd13};
      default:    return {8'd101, 8'd116, 8'd131, 8'd144, 8'd166, 8'd187, 8'd211, 8'd234};
    endcase
  endfunction

  // ROM-B contents (offsets), segment 7 first in the literal
  function automatic coef_tbl_t rom_b_of(sc_func_e f);
    case (f)
      FN_LN1P:    return {8'd51,  8'd36,  8'd30,  8'd23,  8'd14,  8'd9,   8'd3,   8'd0};
      FN_TANH:    return {8'd78,  8'd57,  8'd39,  8'd24,  8'd12,  8'd5,   8'd2,   8'd0};
      FN_SIGMOID: return {8'd137, 8'd135, 8'd131, 8'd131, 8'd128, 8'd128, 8'd128, 8'd128};
      FN_SIN:     return {8'd71,  8'd41,  8'd24,  8'd16,  8'd7,   8'd2,   8'd0,   8'd0};
      // cos: b_i - 256 (b_0 = 1.0 -> 0)
      FN_COS:     return {8'd93,  8'd71,  8'd53,  8'd38,  8'd22,  8'd12,  8'd4,   8'd0};
      default:    return {8'd195, 8'd208, 8'd219, 8'd227, 8'd238, 8'd246, 8'd252, 8'd255};
    endcase
  endfunction

  // LFSR polynomials x^8 + x + 1 and x^8 + x^2 + 1 as tap masks: bit k-1 set
  // for each term x^k of degree 1..8.
  localparam logic [W-1:0] POLY_X_DEFAULT = 8'b1000_0001;  // x^8 + x   + 1
  localparam logic [W-1:0] POLY_A_DEFAULT = 8'b1000_0010;  // x^8 + x^2 + 1
  // Seeds loaded at the start of every evaluation (design choice)
  localparam logic [W-1:0] SEED_X_DEFAULT = 8'd33;
  localparam logic [W-1:0] SEED_A_DEFAULT = 8'd176;

endpackage

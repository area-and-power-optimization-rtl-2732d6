// gain_cal_pkg: shared constants and helpers of the second-order gain
// calibration unit.
//
// Number formats (all two's complement, "Qi.f" = f fractional bits):
//   Y, Ycal, Y_PN : Y_W bits with Y_FRAC = Y_W-2 fractional bits, so the
//                   residue range [-2, 2) of VREF is covered (VREF = 1).
//   D             : sub-DAC level of stage 1 in half units of VREF, so the
//                   dithered levels D +/- PN/2 are integers here.
//   coef_t        : the two gain-error estimates dg0 and dg2 as they travel
//                   from the estimation block through the unit delay to the
//                   correction block, Q2.29.
// The word widths of Y (13 bits) and the reduced precisions (7 bits) follow
// the 14-bit ADC with a 1-bit first stage that the calibration targets; the
// coefficient format and the D encoding are this design's own choice.
package gain_cal_pkg;

  // ADC resolution M and first-stage effective resolution m
  localparam int unsigned M_BITS   = 14;
  localparam int unsigned M_STAGE1 = 1;
  // full precision of Y and Y_PN: M - m bits
  localparam int unsigned Y_BITS   = M_BITS - M_STAGE1;
  // reduced precisions of Y (inside the correction term) and of Y_PN
  localparam int unsigned YR_BITS  = 7;
  localparam int unsigned YPN_BITS = 7;
  // step sizes mu0 = 2^-K0, mu2 = 2^-K2 and the low-pass factor mu_e = 2^-KE
  localparam int unsigned K0_SHIFT = 22;
  localparam int unsigned K2_SHIFT = 14;
  localparam int unsigned KE_SHIFT = 19;

  // width of the D input (half units of VREF: -3..+3)
  localparam int unsigned D_W = 3;

  // gain-error coefficient format
  localparam int unsigned COEF_W    = 32;
  localparam int unsigned COEF_FRAC = 29;
  typedef logic signed [COEF_W-1:0] coef_t;

  // the pair of estimates that the loop carries
  typedef struct packed {
    coef_t dg0;  // zero-order gain-error estimate
    coef_t dg2;  // second-order gain-error estimate
  } gain_est_t;

  // Shift a wide two's-complement value left by sl and arithmetically right
  // by sr (floor), then clamp it to the coefficient range.
  function automatic coef_t to_coef(input logic signed [127:0] v,
                                    input int unsigned sl,
                                    input int unsigned sr);
    logic signed [127:0] t;
    logic signed [127:0] hi;
    logic signed [127:0] lo;
    t  = (v <<< sl) >>> sr;
    hi = 128'sd1 <<< (COEF_W - 1);
    lo = -hi;
    hi = hi - 128'sd1;
    if (t > hi)      return coef_t'(hi);
    else if (t < lo) return coef_t'(lo);
    else             return coef_t'(t);
  endfunction

endpackage

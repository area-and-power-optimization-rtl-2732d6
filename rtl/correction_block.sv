// correction_block: digital correction of the stage-1 gain error.
//
// Computes Ycal = Y * (1 + dg), dg = dg0 + dg2 * Y^2, with dg0 and dg2 the
// current gain-error estimates. Y itself enters the final product at full
// precision (it sets the accuracy of the ADC output), but the Y^2 inside the
// second-order term uses Y truncated to YR_W bits: the estimates dg0/dg2 are
// noisy accumulator outputs, so a precise Y^2 buys no accuracy, and the
// squarer shrinks from a Y_W x Y_W to a YR_W x YR_W multiplier.
//
// Purely combinational; the loop register lives in unit_delay.
// Interface:
//   y      full-precision Y_W-bit residue code, Q1.(Y_W-2)
//   est    gain-error estimates, Q2.29 (gain_cal_pkg::coef_t)
//   ycal   corrected residue, Y_W bits, same format as y, saturated
//   sat    high when ycal was clamped
// The correction equation and the reduced precision of Y in the square
// follow the calibration method; truncation (floor) everywhere, the
// CORR_FRAC-bit coefficient precision and the saturation are choices of this
// design.
module correction_block
  import gain_cal_pkg::*;
#(
  parameter int unsigned Y_W       = Y_BITS,   // full precision of Y
  parameter int unsigned YR_W      = YR_BITS,  // precision of Y inside Y^2
  parameter int unsigned CORR_FRAC = 16        // fraction bits of dg used here
) (
  input  logic signed [Y_W-1:0] y,
  input  gain_est_t             est,
  output logic signed [Y_W-1:0] ycal,
  output logic                  sat
);

  localparam int unsigned YR_FRAC = YR_W - 2;
  localparam int unsigned CW      = COEF_W - (COEF_FRAC - CORR_FRAC);
  localparam int unsigned T2W     = CW + 2 * YR_W;
  localparam int unsigned DGW     = T2W + 1;
  localparam int unsigned PW      = Y_W + DGW;
  localparam int unsigned SW      = PW + 1;

  logic signed [YR_W-1:0]   yr;      // Y truncated to YR_W bits, Q1.YR_FRAC
  logic signed [2*YR_W-1:0] yr2;     // Y^2, Q2.(2*YR_FRAC)
  logic signed [CW-1:0]     dg0_c;   // dg0 at CORR_FRAC fraction bits
  logic signed [CW-1:0]     dg2_c;   // dg2 at CORR_FRAC fraction bits
  logic signed [T2W-1:0]    t2;      // dg2 * Y^2 at CORR_FRAC fraction bits
  logic signed [DGW-1:0]    dg;      // dg = dg0 + dg2 * Y^2
  logic signed [PW-1:0]     y_dg;    // Y * dg at Y_FRAC fraction bits
  logic signed [SW-1:0]     sum;     // Y + Y * dg

  always_comb begin
    yr    = YR_W'(y >>> (Y_W - YR_W));
    yr2   = yr * yr;
    dg0_c = CW'(est.dg0 >>> (COEF_FRAC - CORR_FRAC));
    dg2_c = CW'(est.dg2 >>> (COEF_FRAC - CORR_FRAC));
    t2    = (dg2_c * yr2) >>> (2 * YR_FRAC);
    dg    = dg0_c + t2;
    y_dg  = (y * dg) >>> CORR_FRAC;
    sum   = y + y_dg;
    // clamp to the Y_W-bit range when the upper bits disagree
    sat   = !((&sum[SW-1:Y_W-1]) || !(|sum[SW-1:Y_W-1]));
    if (!sat)            ycal = sum[Y_W-1:0];
    else if (sum[SW-1])  ycal = {1'b1, {(Y_W-1){1'b0}}};
    else                 ycal = {1'b0, {(Y_W-1){1'b1}}};
  end

endmodule

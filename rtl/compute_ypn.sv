// compute_ypn: forms the calibrated output word and the signal Y_PN.
//
// OUT_cal = (D + Ycal) / 2 is the calibrated M-bit ADC output for stage 1
// (M = Y_W + 1). Y_PN = 2*OUT_cal - (D - PN/2) = Ycal + PN/2 is the residue
// with the dither put back, the signal whose correlation with PN the
// estimation block drives to zero.
//
// Combinational. Interface:
//   ycal    corrected residue, Q1.(Y_W-2)
//   d       stage-1 sub-DAC level in half units of VREF (signed, -3..+3),
//           i.e. the digit D with the PN/2 dither it was applied with
//   pn      dither bit, 1 = +1, 0 = -1
//   out_cal OUT_cal, Y_W+1 bits, Q1.(Y_W-1): the same bits as D + Ycal
//   ypn     Y_PN, Y_W bits, Q1.(Y_W-2), saturated; ypn_sat flags clamping
// Both equations follow the calibration method. The half-unit coding of D,
// the bit layout of OUT_cal and the saturation of Y_PN are this design's.
module compute_ypn
  import gain_cal_pkg::*;
#(
  parameter int unsigned Y_W = Y_BITS
) (
  input  logic signed [Y_W-1:0] ycal,
  input  logic signed [D_W-1:0] d,
  input  logic                  pn,
  output logic signed [Y_W:0]   out_cal,
  output logic signed [Y_W-1:0] ypn,
  output logic                  ypn_sat
);

  localparam int unsigned Y_FRAC = Y_W - 2;
  localparam int unsigned XW     = Y_W + 2;

  logic signed [Y_W:0]  d_y;       // D in Y units (Q1.Y_FRAC)
  logic signed [Y_W:0]  pn_half;   // PN/2 in Y units
  logic signed [XW-1:0] two_out;   // 2*OUT_cal in Y units
  logic signed [XW-1:0] ypn_full;

  always_comb begin
    d_y      = (Y_W+1)'(d) <<< (Y_FRAC - 1);
    pn_half  = pn ? ((Y_W+1)'(1) <<< (Y_FRAC - 1)) : -((Y_W+1)'(1) <<< (Y_FRAC - 1));
    // D + Ycal; read with one more fraction bit it is (D + Ycal)/2
    out_cal  = ycal + d_y;
    two_out  = XW'(out_cal);
    ypn_full = two_out - (d_y - pn_half);
    ypn_sat  = !((&ypn_full[XW-1:Y_W-1]) || !(|ypn_full[XW-1:Y_W-1]));
    if (!ypn_sat)            ypn = ypn_full[Y_W-1:0];
    else if (ypn_full[XW-1]) ypn = {1'b1, {(Y_W-1){1'b0}}};
    else                     ypn = {1'b0, {(Y_W-1){1'b1}}};
  end

endmodule

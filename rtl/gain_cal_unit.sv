// gain_cal_unit: second-order digital background gain calibration of the
// first stage of a pipelined ADC (M = 14 bits, 1-bit first stage).
//
// The first stage amplifies its residue with a gain error
// dg = dg0 + dg2*y^2 that the rest of the pipeline digitizes as the
// Y_W-bit code Y. Every clock this unit
//   1. corrects Y:       Ycal = Y*(1 + dg0 + dg2*Y^2)     (correction_block)
//   2. forms             OUT_cal = (D + Ycal)/2 and
//                        Y_PN = 2*OUT_cal - (D - PN/2)    (compute_ypn)
//   3. updates dg0, dg2 from the correlation of Y_PN with PN
//                                                          (estimation_block)
// and feeds the new estimates back through a one-cycle register
// (unit_delay). The pseudorandom dither PN comes from pn_generator; pn_out
// goes to the analog stage, and a copy delayed by PN_DELAY cycles lines up
// with the Y and D that the stage produces from it.
//
// Area and power are saved by carrying only YR_W bits of Y into the
// second-order correction term and only YPN_W bits of Y_PN into the
// estimation arithmetic (7 of 13 bits by default); Y itself keeps full
// precision in the correction product.
//
// SECOND_ORDER = 0 turns the unit into a zero-order calibration (dg2 held
// at 0, only dg0 estimated), the reference the method is compared with.
//
// Interface (one sample per clock, synchronous active-low reset):
//   y, d        stage-1 residue code Q1.(Y_W-2) and sub-DAC level in half
//               units of VREF, both for the sample dithered with the pn_out
//               value of PN_DELAY cycles before
//   pn_out      dither bit for the analog stage, 1 = +1, 0 = -1
//   out_cal     calibrated ADC word, Y_W+1 bits, Q1.(Y_W-1), registered
//   ypn_q       Y_PN of the same sample, registered (monitor)
//   est         current dg0, dg2 estimates, Q2.29
//   ycal_sat, ypn_sat  registered flags: the sample was clamped
// Latency y -> out_cal: one clock.
// The block structure, the equations, the step sizes and the precisions
// follow the calibration method; the number formats, PN_DELAY, the output
// registers and the saturation flags are this design's own.
module gain_cal_unit
  import gain_cal_pkg::*;
#(
  parameter int unsigned Y_W      = Y_BITS,    // M - m bits of Y
  parameter int unsigned YR_W     = YR_BITS,   // bits of Y in the Y^2 term
  parameter int unsigned YPN_W    = YPN_BITS,  // bits of Y_PN for estimation
  parameter int unsigned K0       = K0_SHIFT,  // mu0 = 2^-K0
  parameter int unsigned K2       = K2_SHIFT,  // mu2 = 2^-K2
  parameter int unsigned KE       = KE_SHIFT,  // mu_e = 2^-KE
  parameter int unsigned PN_DELAY = 0,         // analog-path latency of PN
  parameter bit          SECOND_ORDER = 1'b1   // 0: zero-order calibration
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [Y_W-1:0] y,
  input  logic signed [D_W-1:0] d,
  output logic                  pn_out,
  output logic signed [Y_W:0]   out_cal,
  output logic signed [Y_W-1:0] ypn_q,
  output gain_est_t             est,
  output logic                  ycal_sat,
  output logic                  ypn_sat
);

  logic                  pn_cal;     // PN aligned with y and d
  logic signed [Y_W-1:0] ycal;
  logic                  ycal_sat_c;
  logic signed [Y_W:0]   out_cal_c;
  logic signed [Y_W-1:0] ypn;
  logic                  ypn_sat_c;
  gain_est_t             est_new;

  pn_generator u_pn (.clk(clk), .rst_n(rst_n), .pn(pn_out));

  if (PN_DELAY == 0) begin : g_pn_nodelay
    assign pn_cal = pn_out;
  end else begin : g_pn_delay
    logic [PN_DELAY-1:0] pn_pipe;
    always_ff @(posedge clk) begin
      if (!rst_n) pn_pipe <= '0;
      else        pn_pipe <= (pn_pipe << 1) | PN_DELAY'(pn_out);
    end
    assign pn_cal = pn_pipe[PN_DELAY-1];
  end

  correction_block #(.Y_W(Y_W), .YR_W(YR_W)) u_corr (
    .y(y), .est(est), .ycal(ycal), .sat(ycal_sat_c));

  compute_ypn #(.Y_W(Y_W)) u_ypn (
    .ycal(ycal), .d(d), .pn(pn_cal),
    .out_cal(out_cal_c), .ypn(ypn), .ypn_sat(ypn_sat_c));

  estimation_block #(.Y_W(Y_W), .YPN_W(YPN_W), .K0(K0), .K2(K2), .KE(KE),
                     .SECOND_ORDER(SECOND_ORDER)) u_est (
    .clk(clk), .rst_n(rst_n), .ypn(ypn), .pn(pn_cal), .est(est_new));

  unit_delay u_dly (.clk(clk), .rst_n(rst_n), .d(est_new), .q(est));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_cal  <= '0;
      ypn_q    <= '0;
      ycal_sat <= 1'b0;
      ypn_sat  <= 1'b0;
    end else begin
      out_cal  <= out_cal_c;
      ypn_q    <= ypn;
      ycal_sat <= ycal_sat_c;
      ypn_sat  <= ypn_sat_c;
    end
  end

endmodule

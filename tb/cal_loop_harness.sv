// cal_loop_harness: one calibration loop for the precision-sweep testbench.
//
// Holds a gain_cal_unit with the given sizes, step sizes and order, and
// drives it every clock from the behavioural front end of adc_model_pkg,
// whose gain error is dg = G0 + G2*y^2. The sample is
// taken from x_in, and the unit's own dither is used with PN_DELAY = 0. The
// harness accumulates the error statistics of OUT_cal against the input
// while `meas` is high. The parent reads them hierarchically (s_e, s_e2,
// s_x2, s_n) together with the estimates on `est`. Not synthesizable (real
// arithmetic).
module cal_loop_harness
  import gain_cal_pkg::*;
  import adc_model_pkg::*;
#(
  parameter int unsigned Y_W   = 13,
  parameter int unsigned YR_W  = 7,
  parameter int unsigned YPN_W = 7,
  parameter int unsigned K0    = 20,
  parameter int unsigned K2    = 12,
  parameter int unsigned KE    = 17,
  parameter bit          SECOND_ORDER = 1'b1,
  parameter real         G0    = 0.02,      // front-end gain error
  parameter real         G2    = 0.01       // dg = G0 + G2*y^2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  real       x_in,
  input  logic      meas,
  output gain_est_t est
);

  logic signed [Y_W-1:0] y;
  logic signed [D_W-1:0] d;
  logic                  pn_out;
  logic signed [Y_W:0]   out_cal;
  logic signed [Y_W-1:0] ypn_q;
  logic                  ycal_sat;
  logic                  ypn_sat;

  real    s_e = 0.0, s_e2 = 0.0, s_x2 = 0.0;
  longint s_n = 0;
  real    x_prev = 0.0;

  gain_cal_unit #(.Y_W(Y_W), .YR_W(YR_W), .YPN_W(YPN_W), .K0(K0), .K2(K2), .KE(KE),
                .SECOND_ORDER(SECOND_ORDER)) dut (
    .clk(clk), .rst_n(rst_n), .y(y), .d(d), .pn_out(pn_out), .out_cal(out_cal),
    .ypn_q(ypn_q), .est(est), .ycal_sat(ycal_sat), .ypn_sat(ypn_sat));

  // the stage converts the sample with the dither bit of this clock
  always @(negedge clk) begin
    stage1_out_t o;
    o = stage1(x_in, pn_out, G0, G2, Y_W);
    y <= Y_W'(o.y_code);
    d <= D_W'(o.d_half);
    x_prev <= x_in;
  end

  // out_cal after the rising edge belongs to the sample driven before it
  always @(posedge clk) begin
    real oc;
    #1;
    oc = real'(out_cal) / (2.0 ** (Y_W - 1));
    if (meas && rst_n) begin
      s_e  += oc - x_prev;
      s_e2 += (oc - x_prev) * (oc - x_prev);
      s_x2 += x_prev * x_prev;
      s_n++;
    end
  end

endmodule

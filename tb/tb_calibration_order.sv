// tb_calibration_order: zero-order against second-order calibration over the
// opamp's maximum dc gain A0.
//
// With a 1.5-bit stage (feedback factor 1/2) and an opamp whose gain falls
// as A0*(1 - (y/ysat)^2), ysat = 1.414, the gain error to second order is
// dg = 2/A0 + (1/A0)*y^2. For A0 = 25, 100 and 400 V/V the testbench runs
// two loops each on the same 0.9 VREF sine: one unit with SECOND_ORDER = 0
// (only dg0 is estimated) and one with SECOND_ORDER = 1. Both use Y and
// Y_PN at 7 bits and 4x the default step sizes (K0 = 20, K2 = 12, KE = 17).
// The SNDR of the first, uncorrected samples stands for "no calibration".
//
// Checks, after 10 M settling samples and 1 M measured samples:
//   * the zero-order loops raise the SNDR by at least 6 dB over no
//     calibration and keep dg2 at exactly 0;
//   * the second-order loops reach at least 48 dB at every A0;
//   * the second-order loop beats the zero-order loop by at least 6 dB at
//     A0 = 25, where the y^2 term limits zero-order calibration;
//   * at A0 = 25 and 100 the second-order dg0 lies within 15 % of 2/A0,
//     and at A0 = 25 dg2 lies within 25 % of 1/A0.
// The second-order loop has an SNDR floor near 51 dB at these step sizes,
// set by the wander of dg2, so at A0 = 400 zero-order calibration scores
// higher; that is printed, not checked. All SNDR values are printed.
module tb_calibration_order;
  import gain_cal_pkg::*;

  localparam int  SETTLE = 10_000_000;
  localparam int  MEAS   = 1_000_000;
  localparam real FREQ   = 0.01234567;
  localparam real PI     = 3.14159265358979;
  localparam int  NL     = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic meas = 1'b0;
  real  x = 0.0;
  longint n = 0;

  int checks = 0;
  int failures = 0;

  gain_est_t est [NL];

  cal_loop_harness #(.SECOND_ORDER(0), .G0(0.08),  .G2(0.04))   hZ25  (.clk, .rst_n, .x_in(x), .meas, .est(est[0]));
  cal_loop_harness #(.SECOND_ORDER(1), .G0(0.08),  .G2(0.04))   hS25  (.clk, .rst_n, .x_in(x), .meas, .est(est[1]));
  cal_loop_harness #(.SECOND_ORDER(0), .G0(0.02),  .G2(0.01))   hZ100 (.clk, .rst_n, .x_in(x), .meas, .est(est[2]));
  cal_loop_harness #(.SECOND_ORDER(1), .G0(0.02),  .G2(0.01))   hS100 (.clk, .rst_n, .x_in(x), .meas, .est(est[3]));
  cal_loop_harness #(.SECOND_ORDER(0), .G0(0.005), .G2(0.0025)) hZ400 (.clk, .rst_n, .x_in(x), .meas, .est(est[4]));
  cal_loop_harness #(.SECOND_ORDER(1), .G0(0.005), .G2(0.0025)) hS400 (.clk, .rst_n, .x_in(x), .meas, .est(est[5]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (SETTLE + MEAS + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // new input sample shortly after every rising edge
  always @(posedge clk) begin
    #2;
    n++;
    x = 0.9 * $sin(2.0 * PI * FREQ * real'(n));
  end

  function automatic real sndr_of(input real se, input real se2, input real sx2,
                                  input longint sn);
    real m;
    m = se / real'(sn);
    return 10.0 * $log10((sx2 / real'(sn)) / (se2 / real'(sn) - m * m));
  endfunction

  real sndr_b [NL];
  real sndr_a [NL];

  task automatic snapshot(output real r [NL]);
    r[0] = sndr_of(hZ25.s_e,  hZ25.s_e2,  hZ25.s_x2,  hZ25.s_n);
    r[1] = sndr_of(hS25.s_e,  hS25.s_e2,  hS25.s_x2,  hS25.s_n);
    r[2] = sndr_of(hZ100.s_e, hZ100.s_e2, hZ100.s_x2, hZ100.s_n);
    r[3] = sndr_of(hS100.s_e, hS100.s_e2, hS100.s_x2, hS100.s_n);
    r[4] = sndr_of(hZ400.s_e, hZ400.s_e2, hZ400.s_x2, hZ400.s_n);
    r[5] = sndr_of(hS400.s_e, hS400.s_e2, hS400.s_x2, hS400.s_n);
  endtask

  task automatic clear_all();
    hZ25.s_e = 0;  hZ25.s_e2 = 0;  hZ25.s_x2 = 0;  hZ25.s_n = 0;
    hS25.s_e = 0;  hS25.s_e2 = 0;  hS25.s_x2 = 0;  hS25.s_n = 0;
    hZ100.s_e = 0; hZ100.s_e2 = 0; hZ100.s_x2 = 0; hZ100.s_n = 0;
    hS100.s_e = 0; hS100.s_e2 = 0; hS100.s_x2 = 0; hS100.s_n = 0;
    hZ400.s_e = 0; hZ400.s_e2 = 0; hZ400.s_x2 = 0; hZ400.s_n = 0;
    hS400.s_e = 0; hS400.s_e2 = 0; hS400.s_x2 = 0; hS400.s_n = 0;
  endtask

  initial begin
    string names [NL] = '{"A0=25  zero", "A0=25  second", "A0=100 zero", "A0=100 second",
                          "A0=400 zero", "A0=400 second"};
    real g0_true [NL] = '{0.08, 0.08, 0.02, 0.02, 0.005, 0.005};
    real g0, g2;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    meas = 1'b1;
    repeat (20000) @(posedge clk);
    meas = 1'b0;
    snapshot(sndr_b);
    repeat (SETTLE) @(posedge clk);
    @(negedge clk);
    clear_all();
    meas = 1'b1;
    repeat (MEAS) @(posedge clk);
    meas = 1'b0;
    snapshot(sndr_a);
    for (int i = 0; i < NL; i++) begin
      g0 = real'(est[i].dg0) / (2.0 ** COEF_FRAC);
      g2 = real'(est[i].dg2) / (2.0 ** COEF_FRAC);
      $display("%-14s SNDR %5.1f -> %5.1f dB   dg0 %0.5f  dg2 %0.5f", names[i], sndr_b[i],
               sndr_a[i], g0, g2);
      if (i % 2 == 0) begin
        checks++;
        if (sndr_a[i] < sndr_b[i] + 6.0) failures++;
        checks++;
        if (est[i].dg2 != '0) failures++;
      end else begin
        checks++;
        if (sndr_a[i] < 48.0) failures++;
        if (i < 4) begin
          checks++;
          if (g0 < 0.85 * g0_true[i] || g0 > 1.15 * g0_true[i]) failures++;
        end
      end
    end
    g2 = real'(est[1].dg2) / (2.0 ** COEF_FRAC);
    checks++;
    if (g2 < 0.75 * 0.04 || g2 > 1.25 * 0.04) failures++;
    checks++;
    if (sndr_a[1] < sndr_a[0] + 6.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

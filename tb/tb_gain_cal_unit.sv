// tb_gain_cal_unit: end-to-end test of the calibration unit in a loop with a
// behavioural model of the ADC front end (adc_model_pkg).
//
// A 0.9 VREF sine is converted by a first stage whose residue amplifier has
// the gain error dg = 0.02 + 0.01*y^2; the ideal back end returns the 13-bit
// code Y two clocks after the stage received its dither bit (PN_DELAY = 2).
// The step sizes are all raised by the same factor 2^2 (K0 = 20, K2 = 12,
// KE = 17) so that the loop settles in ten million samples. Checked:
//   - the SNDR of OUT_cal against the sampled input is low before
//     calibration (below 45 dB) and above 48 dB once dg0 and dg2 have
//     settled (the loop noise of dg2 bounds it, see README);
//   - the settled estimates are near the values that cancel the error
//     (about 0.0204 and 0.0106 for this front end);
//   - OUT_cal of every sample equals (D + Ycal)/2 one clock later, with
//     Ycal recomputed here in real arithmetic from the current estimates;
//   - every mechanism was exercised: correction, dropped LSBs of Y and Y_PN,
//     increments and decrements of both estimates, saturation of Ycal and
//     of Y_PN (an over-range burst at the end).
module tb_gain_cal_unit;
  import gain_cal_pkg::*;
  import adc_model_pkg::*;

  localparam int unsigned Y_W   = 13;
  localparam int unsigned DLY   = 2;
  localparam int unsigned SETTLE = 10_000_000;
  localparam int unsigned MEAS   = 1_000_000;
  localparam real LSB  = 1.0 / (2.0 ** (Y_W - 2));
  localparam real FREQ = 0.01234567;
  localparam real PI   = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [Y_W-1:0] y;
  logic signed [D_W-1:0] d;
  logic                  pn_out;
  logic signed [Y_W:0]   out_cal;
  logic signed [Y_W-1:0] ypn_q;
  gain_est_t             est;
  logic                  ycal_sat;
  logic                  ypn_sat;

  int checks = 0;
  int failures = 0;

  gain_cal_unit #(.K0(20), .K2(12), .KE(17), .PN_DELAY(DLY)) dut (
    .clk(clk), .rst_n(rst_n), .y(y), .d(d), .pn_out(pn_out), .out_cal(out_cal),
    .ypn_q(ypn_q), .est(est), .ycal_sat(ycal_sat), .ypn_sat(ypn_sat));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (SETTLE + 3 * MEAS + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  longint n_corr = 0, n_ytrunc = 0, n_ypntrunc = 0;
  longint n_dg0_up = 0, n_dg0_dn = 0, n_dg2_up = 0, n_dg2_dn = 0;
  longint n_ycal_sat = 0, n_ypn_sat = 0;

  bit     pn_hist[$];
  longint n = 0;
  real    x_prev, d_prev, ycal_exp_prev;
  bit     have_prev = 0;
  bit     overdrive = 0;
  gain_est_t est_prev;

  // statistics of OUT_cal - x over a window
  real s_e, s_e2, s_x2;
  longint s_n;

  function automatic real coef_r(input coef_t c);
    return real'(c) / (2.0 ** COEF_FRAC);
  endfunction

  // drive one sample at the falling edge, observe after the rising edge
  task automatic cycle();
    real x, yr, dg, ycal_r, oc;
    stage1_out_t o;
    bit p;
    @(negedge clk);
    pn_hist.push_front(pn_out);
    p = (pn_hist.size() > DLY) ? pn_hist[DLY] : 1'b0;
    if (pn_hist.size() > DLY + 1) void'(pn_hist.pop_back());
    x = 0.9 * $sin(2.0 * PI * FREQ * real'(n));
    o = stage1(x, p, 0.02, 0.01, Y_W);
    if (overdrive) o.y_code = (n % 2 == 0) ? 4095 : -4096;
    y = Y_W'(o.y_code);
    d = D_W'(o.d_half);
    // what the unit must produce for this sample, from the estimates now
    yr     = $floor(real'(o.y_code) / 64.0) / 32.0;
    dg     = $floor(coef_r(est.dg0) * 65536.0) / 65536.0
           + $floor(coef_r(est.dg2) * 65536.0) / 65536.0 * yr * yr;
    ycal_r = real'(o.y_code) * LSB * (1.0 + dg);
    if (o.y_code % 64 != 0) n_ytrunc++;
    if (dg != 0.0) n_corr++;
    est_prev = est;
    @(posedge clk);
    #1;
    if (dut.u_ypn.ypn % 64 != 0 && !overdrive) n_ypntrunc++;
    if (dut.est.dg0 > est_prev.dg0) n_dg0_up++;
    if (dut.est.dg0 < est_prev.dg0) n_dg0_dn++;
    if (dut.est.dg2 > est_prev.dg2) n_dg2_up++;
    if (dut.est.dg2 < est_prev.dg2) n_dg2_dn++;
    if (ycal_sat) n_ycal_sat++;
    if (ypn_sat) n_ypn_sat++;
    // registered output of this sample
    oc = real'(out_cal) / (2.0 ** (Y_W - 1));
    if (!overdrive) begin
      checks++;
      if (oc > (real'(o.d_half) / 2.0 + ycal_r) / 2.0 + 1.5 * LSB
          || oc < (real'(o.d_half) / 2.0 + ycal_r) / 2.0 - 1.5 * LSB) begin
        failures++;
        if (failures < 10)
          $display("OUT_cal mismatch n=%0d got %f expected %f", n, oc,
                   (real'(o.d_half) / 2.0 + ycal_r) / 2.0);
      end
    end
    s_e  += oc - x;
    s_e2 += (oc - x) * (oc - x);
    s_x2 += x * x;
    s_n++;
    n++;
  endtask

  function automatic real sndr();
    real m, v;
    m = s_e / real'(s_n);
    v = s_e2 / real'(s_n) - m * m;
    return 10.0 * $log10((s_x2 / real'(s_n)) / v);
  endfunction

  task automatic clear_stats();
    s_e = 0.0; s_e2 = 0.0; s_x2 = 0.0; s_n = 0;
  endtask

  initial begin
    real sndr_before, sndr_after, g0, g2;
    y = '0;
    d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // before calibration has acted: the first samples are uncorrected
    clear_stats();
    repeat (20000) cycle();
    sndr_before = sndr();
    repeat (SETTLE) cycle();
    clear_stats();
    repeat (MEAS) cycle();
    sndr_after = sndr();
    g0 = coef_r(est.dg0);
    g2 = coef_r(est.dg2);
    $display("SNDR before %0.1f dB, after %0.1f dB; dg0 = %0.5f, dg2 = %0.5f",
             sndr_before, sndr_after, g0, g2);
    checks++;
    if (sndr_before > 45.0) failures++;
    checks++;
    if (sndr_after < 48.0) failures++;
    checks++;
    if (g0 < 0.017 || g0 > 0.024) failures++;
    checks++;
    if (g2 < 0.002 || g2 > 0.018) failures++;
    // over-range burst: full-scale codes push Ycal and Y_PN into clamping
    overdrive = 1;
    repeat (16) cycle();
    overdrive = 0;
    $display("mechanisms: corr=%0d ytrunc=%0d ypntrunc=%0d dg0 up/dn=%0d/%0d dg2 up/dn=%0d/%0d ycal_sat=%0d ypn_sat=%0d",
             n_corr, n_ytrunc, n_ypntrunc, n_dg0_up, n_dg0_dn, n_dg2_up, n_dg2_dn,
             n_ycal_sat, n_ypn_sat);
    checks++; if (n_corr == 0) failures++;
    checks++; if (n_ytrunc == 0) failures++;
    checks++; if (n_ypntrunc == 0) failures++;
    checks++; if (n_dg0_up == 0 || n_dg0_dn == 0) failures++;
    checks++; if (n_dg2_up == 0 || n_dg2_dn == 0) failures++;
    checks++; if (n_ycal_sat == 0) failures++;
    checks++; if (n_ypn_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

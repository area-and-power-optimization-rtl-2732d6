// tb_precision_sweep: the data-precision configurations of the calibration
// unit side by side, in closed loop with the behavioural front end.
//
// The same 0.9 VREF sine, with gain error dg = 0.02 + 0.01*y^2, feeds six
// loops. The first five calibrate stage 1 of the 14-bit ADC (13-bit Y):
//   A  Y 13 / Y_PN 13 bits   full precision
//   B  Y  7 / Y_PN  7 bits   the default reduced precision
//   C  Y  5 / Y_PN  5 bits   both reduced further
//   D  Y  7 / Y_PN 13 bits   only Y reduced
//   E  Y 13 / Y_PN  7 bits   only Y_PN reduced
// The sixth calibrates stage 2 as the first stage of a 13-bit ADC:
//   F  12-bit Y, Y and Y_PN at 6 bits
// Step sizes are 4x the defaults (K0 = 20, K2 = 12, KE = 17) so that ten
// million samples settle the loops. Each loop must reach dg0 within
// 0.017..0.025 and dg2 within -0.01..0.03 (dg2 wanders around its target
// at these step sizes), and must raise the SNDR of its
// OUT_cal by at least 8 dB over the first, uncorrected samples. The SNDR of
// every configuration is printed.
module tb_precision_sweep;
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

  cal_loop_harness #(.Y_W(13), .YR_W(13), .YPN_W(13)) hA (.clk, .rst_n, .x_in(x), .meas, .est(est[0]));
  cal_loop_harness #(.Y_W(13), .YR_W(7),  .YPN_W(7))  hB (.clk, .rst_n, .x_in(x), .meas, .est(est[1]));
  cal_loop_harness #(.Y_W(13), .YR_W(5),  .YPN_W(5))  hC (.clk, .rst_n, .x_in(x), .meas, .est(est[2]));
  cal_loop_harness #(.Y_W(13), .YR_W(7),  .YPN_W(13)) hD (.clk, .rst_n, .x_in(x), .meas, .est(est[3]));
  cal_loop_harness #(.Y_W(13), .YR_W(13), .YPN_W(7))  hE (.clk, .rst_n, .x_in(x), .meas, .est(est[4]));
  cal_loop_harness #(.Y_W(12), .YR_W(6),  .YPN_W(6))  hF (.clk, .rst_n, .x_in(x), .meas, .est(est[5]));

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
  real sndr_a  [NL];

  task automatic snapshot(output real r [NL]);
    r[0] = sndr_of(hA.s_e, hA.s_e2, hA.s_x2, hA.s_n);
    r[1] = sndr_of(hB.s_e, hB.s_e2, hB.s_x2, hB.s_n);
    r[2] = sndr_of(hC.s_e, hC.s_e2, hC.s_x2, hC.s_n);
    r[3] = sndr_of(hD.s_e, hD.s_e2, hD.s_x2, hD.s_n);
    r[4] = sndr_of(hE.s_e, hE.s_e2, hE.s_x2, hE.s_n);
    r[5] = sndr_of(hF.s_e, hF.s_e2, hF.s_x2, hF.s_n);
  endtask

  task automatic clear_all();
    hA.s_e = 0; hA.s_e2 = 0; hA.s_x2 = 0; hA.s_n = 0;
    hB.s_e = 0; hB.s_e2 = 0; hB.s_x2 = 0; hB.s_n = 0;
    hC.s_e = 0; hC.s_e2 = 0; hC.s_x2 = 0; hC.s_n = 0;
    hD.s_e = 0; hD.s_e2 = 0; hD.s_x2 = 0; hD.s_n = 0;
    hE.s_e = 0; hE.s_e2 = 0; hE.s_x2 = 0; hE.s_n = 0;
    hF.s_e = 0; hF.s_e2 = 0; hF.s_x2 = 0; hF.s_n = 0;
  endtask

  initial begin
    string names [NL] = '{"A 13/13", "B 7/7", "C 5/5", "D Y7/YPN13", "E Y13/YPN7", "F stage2 6/6"};
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
      checks++;
      if (g0 < 0.017 || g0 > 0.025) failures++;
      checks++;
      if (g2 < -0.01 || g2 > 0.03) failures++;
      checks++;
      if (sndr_a[i] < sndr_b[i] + 8.0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

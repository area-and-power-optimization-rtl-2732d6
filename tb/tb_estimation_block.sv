// tb_estimation_block: self-checking test of estimation_block at its default
// sizes (13-bit Y_PN cut to 7 bits, mu0 = 2^-22, mu2 = 2^-14, mu_e = 2^-19).
//
// Y_PN is built as s + a*PN with s a random residue and a known dither
// leak a, and the estimates are compared on every cycle with a 64-bit
// integer model of the update equations written out here. Independently of
// that model, two behavioural checks: the dg0 accumulator must grow by
// mu0 * E[PN*Y_PN] ~ mu0 * a per sample, and dg2 must move in the direction
// of E[PN*Y^3] - 3*E[PN*Y]*E[Y^2] = 3c*Var(s^2) > 0 for a leak c*PN*s^2.
module tb_estimation_block;
  import gain_cal_pkg::*;

  localparam int unsigned Y_W = 13;
  localparam int unsigned QW  = 7;
  localparam int unsigned K0  = 22;
  localparam int unsigned K2  = 14;
  localparam int unsigned KE  = 19;
  localparam int unsigned G   = 12;       // guard bits of the filters
  localparam real LSB = 1.0 / (2.0 ** (Y_W - 2));

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [Y_W-1:0] ypn;
  logic pn;
  gain_est_t est;

  int checks = 0;
  int failures = 0;

  estimation_block dut (.clk(clk), .rst_n(rst_n), .ypn(ypn), .pn(pn), .est(est));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  longint m_acc0, m_acc2, m_s1, m_s2, m_s3;

  function automatic longint lp(input longint s, input longint x);
    return s + (x <<< G) - ((s + (64'sd1 <<< (KE - 1))) >>> KE);
  endfunction

  task automatic ref_step(input logic signed [Y_W-1:0] yv, input logic pv);
    longint q, p1, q2, p3, e1, e2, e3, t;
    q  = longint'(yv) >>> (Y_W - QW);
    p1 = pv ? q : -q;
    q2 = q * q;
    p3 = pv ? q2 * q : -(q2 * q);
    e1 = m_s1 >>> G;
    e2 = m_s2 >>> G;
    e3 = m_s3 >>> G;
    t  = e3 - 3 * ((e1 * e2) >>> KE);
    m_acc0 = m_acc0 + p1;
    m_acc2 = m_acc2 + t;
    m_s1 = lp(m_s1, p1);
    m_s2 = lp(m_s2, q2);
    m_s3 = lp(m_s3, p3);
  endtask

  // drive one sample: y = s + a*PN (+ c*PN*s^2), checked after the edge
  task automatic sample(input real s, input real a, input real c);
    real yv;
    logic pv;
    @(negedge clk);
    pv  = 1'($urandom);
    yv  = s + (pv ? a : -a) + (pv ? c : -c) * s * s;
    pn  = pv;
    ypn = Y_W'($rtoi($floor(yv / LSB)));
    @(posedge clk);
    ref_step(ypn, pv);
    #1;
    checks++;
    if (longint'(est.dg0) != (m_acc0 <<< (COEF_FRAC - (QW - 2 + K0)))
        || longint'(est.dg2) != (m_acc2 >>> (3 * (QW - 2) + KE + K2 - COEF_FRAC))) begin
      failures++;
      if (failures < 10)
        $display("mismatch dg0=%0d/%0d dg2=%0d/%0d", est.dg0,
                 m_acc0 <<< (COEF_FRAC - (QW - 2 + K0)), est.dg2,
                 m_acc2 >>> (3 * (QW - 2) + KE + K2 - COEF_FRAC));
    end
  endtask

  initial begin
    real dg0_a, dg0_b, rate, dg2_a;
    ypn = '0;
    pn = 1'b0;
    m_acc0 = 0; m_acc2 = 0; m_s1 = 0; m_s2 = 0; m_s3 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // phase 1: dither leak a = 0.0625 (two LSBs of the 7-bit Y_PN)
    dg0_a = real'(est.dg0) / 2.0 ** COEF_FRAC;
    repeat (100000) sample((real'($urandom_range(2000)) - 1000.0) / 1000.0, 0.0625, 0.0);
    dg0_b = real'(est.dg0) / 2.0 ** COEF_FRAC;
    rate  = (dg0_b - dg0_a) / 100000.0 * (2.0 ** K0);
    checks++;
    if (rate < 0.055 || rate > 0.070) begin
      failures++;
      $display("dg0 rate %f, expected about 0.0625", rate);
    end
    // phase 2: a leak c*PN*s^2 makes E[PN Y^3] - 3E[PN Y]E[Y^2] = 3c Var(s^2) > 0
    dg2_a = real'(est.dg2) / 2.0 ** COEF_FRAC;
    repeat (150000) sample((real'($urandom_range(2000)) - 1000.0) / 800.0, 0.0, 0.25);
    checks++;
    if (!(real'(est.dg2) / 2.0 ** COEF_FRAC > dg2_a + 0.01)) begin
      failures++;
      $display("dg2 did not increase: %f -> %f", dg2_a, real'(est.dg2) / 2.0 ** COEF_FRAC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

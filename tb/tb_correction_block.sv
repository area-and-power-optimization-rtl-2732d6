// tb_correction_block: self-checking test of correction_block at its default
// sizes (13-bit Y, Y cut to 7 bits inside the square).
//
// For random Y and random gain-error estimates the output is compared with
// a real-valued evaluation of Ycal = Y*(1 + dg0 + dg2*Yr^2), Yr being Y
// floored to 7 bits and dg0/dg2 floored to 16 fraction bits; the result
// must lie within two LSBs (the two floors inside the block). Cases that
// push Ycal out of range must clamp and raise sat; in-range cases must not.
module tb_correction_block;
  import gain_cal_pkg::*;

  localparam int unsigned Y_W  = 13;
  localparam int unsigned YR_W = 7;
  localparam real LSB  = 1.0 / (2.0 ** (Y_W - 2));
  localparam real LSBR = 1.0 / (2.0 ** (YR_W - 2));

  logic signed [Y_W-1:0] y;
  gain_est_t             est;
  logic signed [Y_W-1:0] ycal;
  logic                  sat;

  int checks = 0;
  int failures = 0;
  int n_sat = 0;

  correction_block dut (.y(y), .est(est), .ycal(ycal), .sat(sat));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real q16(input coef_t c);
    return $floor(real'(c) / 2.0 ** (COEF_FRAC - 16)) / 2.0 ** 16;
  endfunction

  task automatic check(input int yv, input real g0, input real g2);
    real yr, expect_r, lo, hi;
    y       = Y_W'(yv);
    est.dg0 = coef_t'($rtoi($floor(g0 * 2.0 ** COEF_FRAC)));
    est.dg2 = coef_t'($rtoi($floor(g2 * 2.0 ** COEF_FRAC)));
    #1;
    yr       = $floor(real'(y) * LSB / LSBR) * LSBR;
    expect_r = real'(y) * LSB * (1.0 + q16(est.dg0) + q16(est.dg2) * yr * yr);
    lo = -(2.0 ** (Y_W - 1)) * LSB;
    hi = ((2.0 ** (Y_W - 1)) - 1.0) * LSB;
    checks++;
    if (expect_r > hi + LSB || expect_r < lo - LSB) begin
      // clearly out of range: must saturate to the proper end
      n_sat++;
      if (!sat || (expect_r > 0 && ycal != {1'b0, {(Y_W-1){1'b1}}})
               || (expect_r < 0 && ycal != {1'b1, {(Y_W-1){1'b0}}})) begin
        failures++;
        $display("sat fail y=%0d ycal=%0d sat=%0b expect=%f", y, ycal, sat, expect_r);
      end
    end else if (expect_r < hi - 2.0 * LSB && expect_r > lo + 2.0 * LSB) begin
      if (sat || real'(ycal) * LSB > expect_r + 0.5 * LSB
              || real'(ycal) * LSB < expect_r - 2.5 * LSB) begin
        failures++;
        $display("value fail y=%0d g0=%f g2=%f ycal=%0d expect=%f", y, g0, g2, ycal,
                 expect_r / LSB);
      end
    end
  endtask

  initial begin
    // no correction: Ycal = Y exactly
    for (int v = -4096; v < 4096; v += 37) check(v, 0.0, 0.0);
    // the gain error of the evaluated front end and random estimates
    repeat (5000) check(int'($urandom_range(8191)) - 4096, 0.02, 0.01);
    repeat (20000)
      check(int'($urandom_range(8191)) - 4096,
            (real'($urandom_range(20000)) - 10000.0) / 1.0e5,
            (real'($urandom_range(20000)) - 10000.0) / 1.0e5);
    // large estimates force clamping at both ends
    repeat (2000)
      check(int'($urandom_range(8191)) - 4096, 0.5, 0.25);
    check(4095, 0.5, 0.0);
    check(-4096, 0.5, 0.0);
    if (n_sat == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

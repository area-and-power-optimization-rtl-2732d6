// tb_compute_ypn: self-checking test of compute_ypn at 13-bit Y.
//
// Sweeps Ycal over its whole range for every sub-DAC level D (-3/2..+3/2 in
// half steps) and both dither values, and checks with real arithmetic that
// OUT_cal = (D + Ycal)/2 exactly and that Y_PN = Ycal + PN/2, clamped to
// the 13-bit range with ypn_sat raised exactly when clamping happened.
module tb_compute_ypn;
  import gain_cal_pkg::*;

  localparam int unsigned Y_W = 13;
  localparam real LSB = 1.0 / (2.0 ** (Y_W - 2));

  logic signed [Y_W-1:0] ycal;
  logic signed [D_W-1:0] d;
  logic                  pn;
  logic signed [Y_W:0]   out_cal;
  logic signed [Y_W-1:0] ypn;
  logic                  ypn_sat;

  int checks = 0;
  int failures = 0;
  int n_sat = 0;

  compute_ypn dut (.ycal(ycal), .d(d), .pn(pn), .out_cal(out_cal), .ypn(ypn),
                   .ypn_sat(ypn_sat));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real dv, yc, out_exp, ypn_exp, hi, lo, ypn_clamped;
    bit  clamp;
    hi = ((2.0 ** (Y_W - 1)) - 1.0) * LSB;
    lo = -(2.0 ** (Y_W - 1)) * LSB;
    for (int dd = -3; dd <= 3; dd++) begin
      for (int p = 0; p < 2; p++) begin
        for (int v = -4096; v < 4096; v += 3) begin
          ycal = Y_W'(v);
          d    = D_W'(dd);
          pn   = p[0];
          #1;
          dv      = real'(dd) / 2.0;
          yc      = real'(v) * LSB;
          out_exp = (dv + yc) / 2.0;
          ypn_exp = yc + (p != 0 ? 0.5 : -0.5);
          clamp   = ypn_exp > hi || ypn_exp < lo;
          ypn_clamped = ypn_exp > hi ? hi : (ypn_exp < lo ? lo : ypn_exp);
          if (clamp) n_sat++;
          checks++;
          if (real'(out_cal) / (2.0 ** (Y_W - 1)) != out_exp
              || real'(ypn) * LSB != ypn_clamped || ypn_sat != clamp) begin
            failures++;
            if (failures < 10)
              $display("fail ycal=%0d d=%0d pn=%0b out=%0d ypn=%0d sat=%0b", v, dd, p,
                       out_cal, ypn, ypn_sat);
          end
        end
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

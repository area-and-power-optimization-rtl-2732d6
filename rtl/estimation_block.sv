// estimation_block: background estimation of the zero- and second-order gain
// errors of stage 1 from the correlation between Y_PN and the dither PN.
//
//   dg0(n+1) = dg0(n) + mu0 * PN * Y_PN
//   dg2(n+1) = dg2(n) + mu2 * ( E[PN*Y_PN^3] - 3*E[PN*Y_PN]*E[Y_PN^2] )
//
// with mu0 = 2^-K0, mu2 = 2^-K2 and every E[.] a lowpass_filter with
// mu_e = 2^-KE. Multiplying by PN is a conditional negation and multiplying
// by a step size is a shift (the accumulators simply keep K0 / K2 more
// fraction bits than their increments). Y_PN is first truncated to YPN_W
// bits: this sets the size of the squarer, the cuber, the three filters and
// the E x E product, which dominate the area and power of the unit.
//
// Timing: one sample per clock. ypn and pn are sampled on the rising edge;
// the accumulators and filters are registers, so est reflects samples up to
// the previous cycle. Synchronous active-low reset clears everything.
// With SECOND_ORDER = 0 the block is a zero-order estimator: dg2 stays 0
// and the filters drive nothing, so synthesis removes them.
// Interface:
//   ypn  full-precision Y_PN, Q1.(Y_W-2); pn: 1 = +1, 0 = -1
//   est  dg0 and dg2 in Q2.29 (gain_cal_pkg::coef_t)
// The recurrences, the truncation of Y_PN and the step sizes follow the
// calibration method. Accumulator widths, clamping instead of wrapping and
// the rounding of the E x E product to E[PN*Y_PN^3]'s fraction bits are this
// design's choices.
module estimation_block
  import gain_cal_pkg::*;
#(
  parameter int unsigned Y_W   = Y_BITS,    // full precision of Y_PN
  parameter int unsigned YPN_W = YPN_BITS,  // precision Y_PN is cut to
  parameter int unsigned K0    = K0_SHIFT,  // mu0 = 2^-K0
  parameter int unsigned K2    = K2_SHIFT,  // mu2 = 2^-K2
  parameter int unsigned KE    = KE_SHIFT,  // mu_e = 2^-KE
  parameter bit          SECOND_ORDER = 1'b1 // 0: zero-order, dg2 held at 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [Y_W-1:0] ypn,
  input  logic                  pn,
  output gain_est_t             est
);

  localparam int unsigned QW  = YPN_W;          // truncated Y_PN
  localparam int unsigned QF  = YPN_W - 2;      // its fraction bits
  // filter states: widths and fraction bits
  localparam int unsigned W1  = QW + 1 + KE;    // E[PN*Y_PN]
  localparam int unsigned W2  = 2 * QW + KE;    // E[Y_PN^2]
  localparam int unsigned W3  = 3 * QW + 1 + KE;// E[PN*Y_PN^3]
  localparam int unsigned F3  = 3 * QF + KE;
  // accumulators: fraction bits and widths (range +/-4)
  localparam int unsigned A0F = QF + K0;
  localparam int unsigned A0W = A0F + 3;
  localparam int unsigned A2F = F3 + K2;
  localparam int unsigned A2W = A2F + 3;
  localparam int unsigned TW  = W3 + 3;         // update term of dg2

  logic signed [QW-1:0]     q;       // Y_PN cut to YPN_W bits
  logic signed [QW:0]       p1;      // PN * Y_PN
  logic signed [2*QW-1:0]   q2;      // Y_PN^2
  logic signed [3*QW-1:0]   q3;      // Y_PN^3
  logic signed [3*QW:0]     p3;      // PN * Y_PN^3
  logic signed [W1-1:0]     e1;
  logic signed [W2-1:0]     e2;
  logic signed [W3-1:0]     e3;
  logic signed [W1+W2-1:0]  e12;     // E[PN*Y_PN] * E[Y_PN^2]
  logic signed [W3-1:0]     e12_r;   // the same at F3 fraction bits
  logic signed [TW-1:0]     t2;      // E3 - 3*E1*E2
  logic signed [A0W-1:0]    acc0;
  logic signed [A2W-1:0]    acc2;
  localparam int unsigned N2 = ((A2W > TW) ? A2W : TW) + 1;
  logic signed [A0W:0]      acc0_next;
  logic signed [N2-1:0]     acc2_next;
  logic                     ovf0, ovf2;

  always_comb begin
    q  = QW'(ypn >>> (Y_W - YPN_W));
    p1 = pn ? (QW+1)'(q) : -(QW+1)'(q);
    q2 = q * q;
    q3 = q2 * q;
    p3 = pn ? (3*QW+1)'(q3) : -(3*QW+1)'(q3);
  end

  lowpass_filter #(.IN_W(QW + 1), .KE(KE)) u_e1 (
    .clk(clk), .rst_n(rst_n), .x(p1), .e(e1));
  lowpass_filter #(.IN_W(2 * QW), .KE(KE)) u_e2 (
    .clk(clk), .rst_n(rst_n), .x(q2), .e(e2));
  lowpass_filter #(.IN_W(3 * QW + 1), .KE(KE)) u_e3 (
    .clk(clk), .rst_n(rst_n), .x(p3), .e(e3));

  always_comb begin
    e12   = e1 * e2;
    // E1*E2 carries F3 + KE fraction bits; |E1*E2| < 8, so it fits W3 bits
    e12_r = W3'(e12 >>> KE);
    t2    = TW'(e3) - 3 * TW'(e12_r);
    acc0_next = acc0 + p1;
    acc2_next = acc2 + t2;
    // overflow when the bits above the accumulator's sign bit disagree
    ovf0 = acc0_next[A0W] != acc0_next[A0W-1];
    ovf2 = !((&acc2_next[N2-1:A2W-1]) || !(|acc2_next[N2-1:A2W-1]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc0 <= '0;
      acc2 <= '0;
    end else begin
      if (!ovf0)               acc0 <= A0W'(acc0_next);
      else if (acc0_next[A0W]) acc0 <= {1'b1, {(A0W-1){1'b0}}};
      else                     acc0 <= {1'b0, {(A0W-1){1'b1}}};
      if (!SECOND_ORDER)       acc2 <= '0;
      else if (!ovf2)          acc2 <= A2W'(acc2_next);
      else if (acc2_next[N2-1]) acc2 <= {1'b1, {(A2W-1){1'b0}}};
      else                     acc2 <= {1'b0, {(A2W-1){1'b1}}};
    end
  end

  always_comb begin
    est.dg0 = to_coef(128'(acc0),
                      (A0F < COEF_FRAC) ? COEF_FRAC - A0F : 0,
                      (A0F > COEF_FRAC) ? A0F - COEF_FRAC : 0);
    est.dg2 = to_coef(128'(acc2),
                      (A2F < COEF_FRAC) ? COEF_FRAC - A2F : 0,
                      (A2F > COEF_FRAC) ? A2F - COEF_FRAC : 0);
  end

endmodule

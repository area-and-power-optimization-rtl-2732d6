// unit_delay: the one-sample register that closes the calibration loop.
//
// The gain-error estimates leave the estimation block and reach the
// correction block one clock later, so the correction of sample n uses the
// estimates formed from samples up to n-1 and the loop has no combinational
// path. Interface: d is captured on every rising edge and appears on q.
// Synchronous active-low reset sets both estimates to zero (uncorrected
// start). The register follows the loop structure of the calibration unit;
// the reset value is this design's choice.
module unit_delay
  import gain_cal_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  gain_est_t d,
  output gain_est_t q
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule

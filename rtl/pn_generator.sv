// pn_generator: pseudorandom dither sequence PN = +/-1 for the stage-1
// background calibration.
//
// A 31-bit Fibonacci LFSR with the maximal-length polynomial x^31 + x^28 + 1
// (period 2^31 - 1) advances once per clock; its output bit is PN
// (1 = +1, 0 = -1). The same PN goes to the analog stage as dither and, after
// the pipeline's latency, to the calibration arithmetic. The calibration
// only needs a known, zero-mean sequence uncorrelated with the input; the
// LFSR length, polynomial and seed are this design's choices.
// Interface: pn is registered; synchronous active-low reset loads SEED.
module pn_generator #(
  parameter logic [30:0] SEED = 31'h5A5A_1234  // any non-zero value
) (
  input  logic clk,
  input  logic rst_n,
  output logic pn
);

  logic [30:0] lfsr;

  always_ff @(posedge clk) begin
    if (!rst_n) lfsr <= SEED;
    else        lfsr <= {lfsr[29:0], lfsr[30] ^ lfsr[27]};
  end

  assign pn = lfsr[30];

endmodule

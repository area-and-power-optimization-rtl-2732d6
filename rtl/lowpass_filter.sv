// lowpass_filter: first-order averaging filter E[x] used by the estimation
// block.
//
// Implements E(n+1) = E(n) + mu_e * (x - E(n)) with mu_e = 2^-KE. The state
// holds E with KE + GUARD fraction bits beyond those of x, so the update
// becomes s <= s + x*2^GUARD - round(s / 2^KE) and only the leak term is
// rounded. The guard bits matter: the leak can only be removed in whole
// state units, which lets E settle anywhere inside a band of 2^-GUARD input
// LSBs around the true mean. Without them (GUARD = 0) that band is a full
// input LSB, as large as the correlation the coarse PN*Y_PN filter has to
// measure.
//
// Interface: x is sampled on every rising clock edge. e is the registered
// state with the guard bits dropped (floor), i.e. E with KE more fraction
// bits than x; latency one cycle. Synchronous active-low reset clears the
// state. The filter equation and mu_e follow the calibration method; the
// scaled-state form, the guard bits, the rounding and the clamp at the range
// ends are this design's choices.
module lowpass_filter #(
  parameter int unsigned IN_W  = 8,   // width of the signed input
  parameter int unsigned KE    = 19,  // mu_e = 2^-KE
  parameter int unsigned GUARD = 12   // extra state fraction bits
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [IN_W-1:0]    x,
  output logic signed [IN_W+KE-1:0] e
);

  localparam int unsigned SW = IN_W + KE + GUARD;
  localparam logic signed [SW:0] HALF = (SW+1)'(64'sd1 <<< (KE - 1));

  logic signed [SW-1:0] s;
  logic signed [SW:0]   x_s;     // x aligned to the state
  logic signed [SW:0]   leak;    // round(s / 2^KE)
  logic signed [SW:0]   s_next;
  logic                 ovf;

  always_comb begin
    x_s    = (SW+1)'(x) <<< GUARD;
    leak   = (s + HALF) >>> KE;
    s_next = s + x_s - leak;
    ovf    = s_next[SW] != s_next[SW-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          s <= '0;
    else if (!ovf)       s <= SW'(s_next);
    else if (s_next[SW]) s <= {1'b1, {(SW-1){1'b0}}};
    else                 s <= {1'b0, {(SW-1){1'b1}}};
  end

  assign e = (IN_W+KE)'(s >>> GUARD);

endmodule

// adc_model_pkg: behavioural model of the analog front of the pipelined ADC
// for the calibration testbenches (not synthesizable, real arithmetic).
//
// Stage 1 is a 1.5-bit stage: comparators at +/-VREF/4 give the digit
// d in {-1,0,+1}; the sub-DAC applies D = d + PN/2, i.e. the dither enters
// the residue r = 2x - D. The residue amplifier has the input-dependent gain
// error dg = G0 + G2*y^2, so y = (1 - dg)*r, solved by fixed-point
// iteration. The later stages are ideal: they quantize y to a Y_W-bit code
// with Y_W-2 fraction bits (floor, clamped). VREF = 1.
package adc_model_pkg;

  typedef struct {
    int  y_code;   // Y as an integer code
    int  d_half;   // D in half units of VREF
    real y;        // analog residue
  } stage1_out_t;

  function automatic stage1_out_t stage1(input real x, input bit pn,
                                         input real g0, input real g2,
                                         input int y_w);
    stage1_out_t o;
    int  dig;
    real dac, r, y;
    real lsb;
    dig = (x > 0.25) ? 1 : ((x < -0.25) ? -1 : 0);
    o.d_half = 2 * dig + (pn ? 1 : -1);
    dac = o.d_half / 2.0;
    r = 2.0 * x - dac;
    y = r;
    for (int i = 0; i < 6; i++) y = (1.0 - (g0 + g2 * y * y)) * r;
    o.y = y;
    lsb = 2.0 ** (-(y_w - 2));
    o.y_code = $rtoi($floor(y / lsb));
    if (o.y_code >  (1 << (y_w - 1)) - 1) o.y_code =  (1 << (y_w - 1)) - 1;
    if (o.y_code < -(1 << (y_w - 1)))     o.y_code = -(1 << (y_w - 1));
    return o;
  endfunction

endpackage

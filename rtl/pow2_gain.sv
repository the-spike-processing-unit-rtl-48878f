// pow2_gain: power-of-two gain (shift block) of the SPU's IIR filter.
//
// Scales a 6-bit sample by one coefficient from
// {0, +-1, +-2, +-1/2, +-1/4, +-1/8}; the coefficient set is the model's.
// No multiplier is used: x2 is a left shift by one with saturation, the
// fractions are arithmetic right shifts (rounding toward minus infinity), and
// a negative sign is a saturating negation applied after the shift. The
// 4-bit coefficient code (sign, 3-bit magnitude) is defined in spu_pkg and is
// this design's choice. Purely combinational.
module pow2_gain
  import spu_pkg::*;
(
  input  sample_t din,
  input  coef_t   coef,
  output sample_t dout
);

  always_comb dout = pow2_scale_f(din, coef);

endmodule

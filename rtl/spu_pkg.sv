// spu_pkg: types, constants and arithmetic helpers shared by the Spike
// Processing Unit (SPU).
//
// Every value inside the SPU (synaptic weights, x[n], the filter state, the
// membrane potential y[n] and the threshold) is a 6-bit two's complement
// integer, and every adder clamps its result to [-32, +31]. Both rules are the
// model's own. IIR coefficients are restricted to
// {0, +-1, +-2, +-1/2, +-1/4, +-1/8}. Each one is stored as a 4-bit code, a
// sign bit and a 3-bit magnitude selector. That encoding is this design's
// choice; the model only says that a small configuration register selects a
// shift amount per coefficient.
//
// Right shifts are arithmetic, so halving rounds toward minus infinity. The
// x2 gain saturates. Both are choices of this design.
package spu_pkg;

  localparam int unsigned DATA_W = 6;

  typedef logic signed [DATA_W-1:0] sample_t;

  localparam sample_t SAMPLE_MAX = sample_t'(2 ** (DATA_W - 1) - 1);  // +31
  localparam sample_t SAMPLE_MIN = sample_t'(-(2 ** (DATA_W - 1)));   // -32

  // Magnitude part of a coefficient code. Codes 6 and 7 are unused and act
  // as a zero gain.
  typedef enum logic [2:0] {
    GAIN_ZERO   = 3'd0,
    GAIN_X2     = 3'd1,
    GAIN_X1     = 3'd2,
    GAIN_HALF   = 3'd3,
    GAIN_QUART  = 3'd4,
    GAIN_EIGHTH = 3'd5
  } gain_mag_e;

  // One power-of-two coefficient: value = (neg ? -1 : +1) * magnitude.
  typedef struct packed {
    logic      neg;
    gain_mag_e mag;
  } coef_t;


  // The five coefficients of Eq. 2, in the order of the training vector.
  typedef struct packed {
    coef_t b0;
    coef_t b1;
    coef_t b2;
    coef_t a1;
    coef_t a2;
  } iir_coefs_t;

  localparam int unsigned WIDE_W = DATA_W + 2;
  typedef logic signed [WIDE_W-1:0] wide_t;

  // Clamp a wider signed value into the 6-bit range.
  function automatic sample_t clamp(input wide_t v);
    if (v > wide_t'(SAMPLE_MAX))
      return SAMPLE_MAX;
    else if (v < wide_t'(SAMPLE_MIN))
      return SAMPLE_MIN;
    else
      return sample_t'(v);
  endfunction

  // Saturating 6-bit addition.
  function automatic sample_t sat_add_f(input sample_t a, input sample_t b);
    wide_t s;
    s = wide_t'(a) + wide_t'(b);
    return clamp(s);
  endfunction

  // Saturating negation: -(-32) gives +31.
  function automatic sample_t sat_neg_f(input sample_t a);
    wide_t s;
    s = -wide_t'(a);
    return clamp(s);
  endfunction

  // Multiply by a power-of-two coefficient using shifts only.
  function automatic sample_t pow2_scale_f(input sample_t v, input coef_t c);
    wide_t wide;
    sample_t mag_out;
    wide = wide_t'(v);
    unique case (c.mag)
      GAIN_X2:     mag_out = clamp(wide <<< 1);
      GAIN_X1:     mag_out = v;
      GAIN_HALF:   mag_out = v >>> 1;
      GAIN_QUART:  mag_out = v >>> 2;
      GAIN_EIGHTH: mag_out = v >>> 3;
      default:     mag_out = '0;
    endcase
    return c.neg ? sat_neg_f(mag_out) : mag_out;
  endfunction

endpackage

// spu_ref_pkg: reference model of the SPU arithmetic for the testbenches.
//
// Written with plain integers, independently of the RTL: sums are formed in
// 32-bit int and clamped, fractional gains use floor division rather than
// shifts. The coefficient code is the 4-bit {sign, magnitude} code of the
// RTL: magnitude 0 = 0, 1 = x2, 2 = x1, 3 = x1/2, 4 = x1/4, 5 = x1/8,
// 6 and 7 = 0.
package spu_ref_pkg;

  function automatic int ref_clamp(input int v);
    if (v > 31) return 31;
    if (v < -32) return -32;
    return v;
  endfunction

  function automatic int floor_div(input int v, input int d);
    int q;
    q = v / d;
    if ((v % d != 0) && (v < 0)) q = q - 1;
    return q;
  endfunction

  function automatic int ref_gain(input int v, input int code);
    int r;
    int mag;
    mag = code % 8;
    case (mag)
      1: r = ref_clamp(2 * v);
      2: r = v;
      3: r = floor_div(v, 2);
      4: r = floor_div(v, 4);
      5: r = floor_div(v, 8);
      default: r = 0;
    endcase
    if (code >= 8) r = ref_clamp(-r);
    return r;
  endfunction

  // Value of a coefficient code as a real number, for readable messages.
  function automatic real ref_coef_value(input int code);
    real m;
    case (code % 8)
      1: m = 2.0;
      2: m = 1.0;
      3: m = 0.5;
      4: m = 0.25;
      5: m = 0.125;
      default: m = 0.0;
    endcase
    if (m == 0.0) return 0.0;
    return (code >= 8) ? -m : m;
  endfunction

  // Flip the sign of a coefficient code (the -a1, -a2 feedback gains).
  function automatic int ref_neg_code(input int code);
    return (code >= 8) ? code - 8 : code + 8;
  endfunction

  // Reference direct form II filter with its two state values.
  class ref_iir;
    int b0, b1, b2, a1, a2;  // coefficient codes
    int s1, s2;
    int sat_events;          // adder results that had to be clamped

    function new();
      s1 = 0; s2 = 0; sat_events = 0;
      b0 = 0; b1 = 0; b2 = 0; a1 = 0; a2 = 0;
    endfunction

    function void set_coefs(int cb0, int cb1, int cb2, int ca1, int ca2);
      b0 = cb0; b1 = cb1; b2 = cb2; a1 = ca1; a2 = ca2;
    endfunction

    function void reset();
      s1 = 0; s2 = 0;
    endfunction

    function int add(int a, int b);
      int s;
      s = a + b;
      if (s > 31 || s < -32) sat_events++;
      return ref_clamp(s);
    endfunction

    // Output for input x with the present state (no state change).
    function int peek(int x, output int v);
      int fb, ff;
      fb = add(ref_gain(s1, ref_neg_code(a1)), ref_gain(s2, ref_neg_code(a2)));
      v  = add(x, fb);
      ff = add(ref_gain(s1, b1), ref_gain(s2, b2));
      return add(ref_gain(v, b0), ff);
    endfunction

    // Output for input x, then advance the state by one clock.
    function int step(int x);
      int v, y;
      y  = peek(x, v);
      s2 = s1;
      s1 = v;
      return y;
    endfunction
  endclass

endpackage

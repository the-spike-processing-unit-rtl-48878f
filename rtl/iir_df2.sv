// iir_df2: second-order IIR membrane filter of the SPU, direct form II.
//
// Computes y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]
// (Eq. 2 of the model) in direct form II, which needs only two 6-bit state
// registers, s1 = v[n-1] and s2 = v[n-2], of the internal signal
//   v[n] = x[n] + ( (-a1) s1 + (-a2) s2 )
//   y[n] = b0 v[n] + ( b1 s1 + b2 s2 ).
// The adders are grouped as in the model's filter drawing: the two feedback
// products are added first and then x[n]; the two delayed feed-forward
// products are added first and then the b0 product. Every product is a
// pow2_gain shift block and every adder a saturating sat_add, so all
// intermediate values stay in [-32, +31].
//
// Timing: y is combinational from x and the state registers; on each rising
// clock edge v[n] is shifted into s1 and s1 into s2. rst (synchronous, active
// high) clears both registers, the "known baseline" of the model; the choice
// of zero as that baseline and of a synchronous reset are this design's.
module iir_df2
  import spu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  sample_t    x,
  input  iir_coefs_t coefs,
  output sample_t    y
);

  sample_t s1, s2;            // v[n-1], v[n-2]
  sample_t fb1, fb2, fb_sum;  // feedback path
  sample_t v;                 // direct form II internal node
  sample_t ff0, ff1, ff2, ff_sum;
  coef_t   neg_a1, neg_a2;

  // The feedback gains are -a1 and -a2: flip the sign bit of the code.
  always_comb begin
    neg_a1 = coefs.a1;
    neg_a2 = coefs.a2;
    neg_a1.neg = ~coefs.a1.neg;
    neg_a2.neg = ~coefs.a2.neg;
  end

  pow2_gain u_ga1 (.din(s1), .coef(neg_a1), .dout(fb1));
  pow2_gain u_ga2 (.din(s2), .coef(neg_a2), .dout(fb2));
  sat_add   u_fb  (.a(fb1), .b(fb2), .sum(fb_sum));
  sat_add   u_in  (.a(x), .b(fb_sum), .sum(v));

  pow2_gain u_gb0 (.din(v),  .coef(coefs.b0), .dout(ff0));
  pow2_gain u_gb1 (.din(s1), .coef(coefs.b1), .dout(ff1));
  pow2_gain u_gb2 (.din(s2), .coef(coefs.b2), .dout(ff2));
  sat_add   u_ff  (.a(ff1), .b(ff2), .sum(ff_sum));
  sat_add   u_out (.a(ff0), .b(ff_sum), .sum(y));

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= v;
      s2 <= s1;
    end
  end

endmodule

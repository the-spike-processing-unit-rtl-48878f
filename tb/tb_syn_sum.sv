// tb_syn_sum: checks the saturating summation tree.
// The default four-input tree must compute clamp(clamp(a+b) + clamp(c+d));
// a three-input and a five-input tree check the zero padding. Random and
// corner operands are used, including sums that saturate in a leaf but not
// at the root.
module tb_syn_sum;
  import spu_pkg::*;
  import spu_ref_pkg::*;

  sample_t c4 [4];
  sample_t c3 [3];
  sample_t c5 [5];
  sample_t x4, x3, x5;
  int checks = 0, failures = 0;

  syn_sum dut4 (.contrib(c4), .x(x4));
  syn_sum #(.N_IN(3)) dut3 (.contrib(c3), .x(x3));
  syn_sum #(.N_IN(5)) dut5 (.contrib(c5), .x(x5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tree4(int a, int b, int c, int d);
    return ref_clamp(ref_clamp(a + b) + ref_clamp(c + d));
  endfunction

  task automatic check(input int got, input int expected, input string what);
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, expected);
    end
  endtask

  initial begin
    int v [5];
    // leaf saturates (30 + 30 -> 31), root does not (31 + -20 = 11)
    c4[0] = 30; c4[1] = 30; c4[2] = -10; c4[3] = -10;
    #1 check(int'(x4), 11, "leaf saturation");
    c4[0] = -32; c4[1] = -32; c4[2] = 31; c4[3] = 31;
    #1 check(int'(x4), -1, "opposite saturation");
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 5; i++) v[i] = $urandom_range(0, 63) - 32;
      for (int i = 0; i < 4; i++) c4[i] = sample_t'(v[i]);
      for (int i = 0; i < 3; i++) c3[i] = sample_t'(v[i]);
      for (int i = 0; i < 5; i++) c5[i] = sample_t'(v[i]);
      #1;
      check(int'(x4), tree4(v[0], v[1], v[2], v[3]), "4 inputs");
      check(int'(x3), tree4(v[0], v[1], v[2], 0), "3 inputs");
      check(int'(x5), ref_clamp(tree4(v[0], v[1], v[2], v[3]) + v[4]), "5 inputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_iir_df2: checks the second-order direct form II filter.
// 1. A hand-worked impulse response (b0 = 1, a1 = -1, a2 = 1/2, input 8).
// 2. Random coefficient sets driven by random sparse input streams, compared
//    cycle by cycle with the integer reference model, including runs that
//    saturate.
// 3. Reset clears the state: after rst the zero-input output is zero.
module tb_iir_df2;
  import spu_pkg::*;
  import spu_ref_pkg::*;

  logic       clk = 0, rst;
  sample_t    x, y;
  iir_coefs_t coefs;
  int checks = 0, failures = 0;
  ref_iir model;

  iir_df2 dut (.clk(clk), .rst(rst), .x(x), .coefs(coefs), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int expected, input string what);
    checks++;
    if (int'(y) != expected) begin
      failures++;
      $display("FAIL %s: y=%0d, expected %0d", what, y, expected);
    end
  endtask

  task automatic set_coefs(input int cb0, cb1, cb2, ca1, ca2);
    coefs.b0 = coef_t'(cb0);
    coefs.b1 = coef_t'(cb1);
    coefs.b2 = coef_t'(cb2);
    coefs.a1 = coef_t'(ca1);
    coefs.a2 = coef_t'(ca2);
    model.set_coefs(cb0, cb1, cb2, ca1, ca2);
  endtask

  initial begin
    int expected_impulse [9] = '{8, 8, 4, 0, -2, -2, -1, 0, 1};
    int sat_runs;
    model = new();
    rst = 1; x = '0;
    set_coefs(2, 0, 0, 10, 3);
    @(posedge clk); #1;
    rst = 0;
    // 1. hand-worked impulse response
    for (int n = 0; n < 9; n++) begin
      x = (n == 0) ? sample_t'(8) : '0;
      #1 check(expected_impulse[n], $sformatf("impulse n=%0d", n));
      @(posedge clk); #1;
    end
    // 2. random coefficients and inputs against the reference model
    sat_runs = 0;
    for (int run = 0; run < 200; run++) begin
      int sat_before;
      rst = 1; x = '0;
      @(posedge clk); #1;
      rst = 0;
      model.reset();
      set_coefs($urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 15),
                $urandom_range(0, 15), $urandom_range(0, 15));
      sat_before = model.sat_events;
      for (int n = 0; n < 40; n++) begin
        int xi, yr;
        xi = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 63)) - 32 : 0;
        x = sample_t'(xi);
        #1;
        yr = model.step(xi);
        check(yr, $sformatf("run %0d n=%0d", run, n));
        @(posedge clk); #1;
      end
      if (model.sat_events > sat_before) sat_runs++;
    end
    checks++;
    if (sat_runs == 0) begin
      failures++;
      $display("FAIL no random run saturated");
    end
    // 3. reset returns the state to zero
    set_coefs(2, 2, 2, 10, 0);
    x = sample_t'(20);
    @(posedge clk); #1;
    @(posedge clk); #1;
    x = '0;
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    #1 check(0, "after reset");
    $display("saturating runs: %0d of 200", sat_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_soma: checks the membrane filter and the threshold comparator.
// Random coefficient sets, thresholds and inputs are compared with the
// reference filter; spike_out must equal (y >= Vth) every cycle, including
// the equality case. Also checks that reset silences a firing neuron.
module tb_soma;
  import spu_pkg::*;
  import spu_ref_pkg::*;

  logic       clk = 0, rst;
  sample_t    x, vth, vmem;
  iir_coefs_t coefs;
  logic       spike_out;
  int checks = 0, failures = 0, spikes = 0, equal_hits = 0;
  ref_iir model;

  soma dut (.clk(clk), .rst(rst), .x(x), .coefs(coefs), .vth(vth), .vmem(vmem),
            .spike_out(spike_out));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = new();
    rst = 1; x = '0; vth = sample_t'(10); coefs = '0;
    @(posedge clk); #1;
    for (int run = 0; run < 200; run++) begin
      int cb0, cb1, cb2, ca1, ca2, th;
      rst = 1; x = '0;
      @(posedge clk); #1;
      rst = 0;
      model.reset();
      cb0 = $urandom_range(0, 15); cb1 = $urandom_range(0, 15); cb2 = $urandom_range(0, 15);
      ca1 = $urandom_range(0, 15); ca2 = $urandom_range(0, 15);
      th  = $urandom_range(0, 31) - 8;
      coefs.b0 = coef_t'(cb0); coefs.b1 = coef_t'(cb1); coefs.b2 = coef_t'(cb2);
      coefs.a1 = coef_t'(ca1); coefs.a2 = coef_t'(ca2);
      vth = sample_t'(th);
      model.set_coefs(cb0, cb1, cb2, ca1, ca2);
      for (int n = 0; n < 40; n++) begin
        int xi, yr;
        xi = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 63)) - 32 : 0;
        x = sample_t'(xi);
        #1;
        yr = model.step(xi);
        checks++;
        if (int'(vmem) != yr || spike_out != (yr >= th)) begin
          failures++;
          $display("FAIL run %0d n=%0d: vmem=%0d spike=%0d, expected %0d %0d (vth %0d)",
                   run, n, vmem, spike_out, yr, yr >= th, th);
        end
        if (yr >= th) spikes++;
        if (yr == th) equal_hits++;
        @(posedge clk); #1;
      end
    end
    // an integrating neuron (b0 = 1, -a1 = +1) held above threshold by one
    // input sample keeps spiking until it is reset
    rst = 1; x = '0;
    @(posedge clk); #1;
    rst = 0;
    coefs = '0;
    coefs.b0 = coef_t'(2);
    coefs.a1 = coef_t'(10);
    vth = sample_t'(5);
    x = sample_t'(9);
    #1;
    checks++;
    if (!spike_out || vmem != 9) begin failures++; $display("FAIL no spike at y=9, vth=5"); end
    @(posedge clk); #1;
    x = '0;
    #1;
    checks++;
    if (!spike_out || vmem != 9) begin
      failures++;
      $display("FAIL state did not hold above threshold: vmem=%0d", vmem);
    end
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    #1;
    checks++;
    if (spike_out || vmem != 0) begin
      failures++;
      $display("FAIL reset left vmem=%0d spike=%0d", vmem, spike_out);
    end
    checks++;
    if (spikes == 0 || equal_hits == 0) begin
      failures++;
      $display("FAIL coverage: spikes=%0d equal_hits=%0d", spikes, equal_hits);
    end
    $display("spikes %0d, threshold-equal cycles %0d", spikes, equal_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

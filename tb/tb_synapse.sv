// tb_synapse: checks the spike-gated weight of one synapse.
// Random spikes and weights are applied; one cycle after a spike is sampled
// the output must equal the weight, otherwise zero. Reset must clear a
// pending spike.
module tb_synapse;
  import spu_pkg::*;

  logic    clk = 0, rst;
  logic    spike_in;
  sample_t weight, contrib;
  int checks = 0, failures = 0;
  logic spike_prev;

  synapse dut (.clk(clk), .rst(rst), .spike_in(spike_in), .weight(weight), .contrib(contrib));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int expected, input string what);
    checks++;
    if (int'(contrib) != expected) begin
      failures++;
      $display("FAIL %s: contrib %0d, expected %0d", what, contrib, expected);
    end
  endtask

  initial begin
    rst = 1; spike_in = 0; weight = '0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    check(0, "after reset");
    spike_prev = 0;
    for (int n = 0; n < 300; n++) begin
      spike_in = 1'($urandom_range(0, 1));
      weight   = sample_t'($urandom_range(0, 63));
      #1;
      // before the edge the output reflects the previous sample
      check(spike_prev ? int'(weight) : 0, "before edge");
      @(posedge clk);
      #1;
      check(spike_in ? int'(weight) : 0, "after edge");
      spike_prev = spike_in;
    end
    // a spike captured and then reset: output must return to zero
    spike_in = 1; weight = sample_t'(-7);
    @(posedge clk); #1;
    check(-7, "spike captured");
    rst = 1; spike_in = 0;
    @(posedge clk); #1;
    spike_in = 1;
    check(0, "reset clears");
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

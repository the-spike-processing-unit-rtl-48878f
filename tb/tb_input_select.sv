// tb_input_select: checks the soma input multiplexer.
// With sel = 0 the local sum must pass, with sel = 1 the chained membrane
// potential.
module tb_input_select;
  import spu_pkg::*;

  logic    sel;
  sample_t x_local, vmem_chain, x_soma;
  int checks = 0, failures = 0;

  input_select dut (.sel(sel), .x_local(x_local), .vmem_chain(vmem_chain), .x_soma(x_soma));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      sel        = 1'(n % 2);
      x_local    = sample_t'($urandom_range(0, 63));
      vmem_chain = sample_t'($urandom_range(0, 63));
      if (vmem_chain == x_local) vmem_chain = x_local + 1;
      #1;
      checks++;
      if (x_soma != (sel ? vmem_chain : x_local)) begin
        failures++;
        $display("FAIL sel=%0d local=%0d chain=%0d out=%0d", sel, x_local, vmem_chain, x_soma);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

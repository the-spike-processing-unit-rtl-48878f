// tb_sat_add: exhaustive check of the saturating 6-bit adder.
// Every pair of operands is applied and the sum compared with the integer
// sum clamped to [-32, +31].
module tb_sat_add;
  import spu_pkg::*;
  import spu_ref_pkg::*;

  sample_t a, b, sum;
  int checks = 0, failures = 0, clamped = 0;

  sat_add dut (.a(a), .b(b), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -32; i < 32; i++) begin
      for (int j = -32; j < 32; j++) begin
        a = sample_t'(i);
        b = sample_t'(j);
        #1;
        checks++;
        if (int'(sum) != ref_clamp(i + j)) begin
          failures++;
          $display("FAIL %0d + %0d gave %0d, expected %0d", i, j, sum, ref_clamp(i + j));
        end
        if (i + j > 31 || i + j < -32) clamped++;
      end
    end
    checks++;
    if (clamped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

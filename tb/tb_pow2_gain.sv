// tb_pow2_gain: exhaustive check of the power-of-two gain block.
// All 64 inputs are scaled by all 16 coefficient codes and compared with an
// integer model using floor division; a few spot values are also checked
// against hand-worked numbers.
module tb_pow2_gain;
  import spu_pkg::*;
  import spu_ref_pkg::*;

  sample_t din, dout;
  coef_t   coef;
  int checks = 0, failures = 0;

  pow2_gain dut (.din(din), .coef(coef), .dout(dout));

  task automatic spot(input int v, input int code, input int expected);
    din  = sample_t'(v);
    coef = coef_t'(code);
    #1;
    checks++;
    if (int'(dout) != expected) begin
      failures++;
      $display("FAIL spot %0d * code %0d gave %0d, expected %0d", v, code, dout, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int v = -32; v < 32; v++) begin
        din  = sample_t'(v);
        coef = coef_t'(c);
        #1;
        checks++;
        if (int'(dout) != ref_gain(v, c)) begin
          failures++;
          $display("FAIL %0d * (%f) gave %0d, expected %0d", v, ref_coef_value(c), dout,
                   ref_gain(v, c));
        end
      end
    end
    // hand-worked values: x2 saturates, halves round down, -1 * -32 saturates
    spot(20, 1, 31);
    spot(-20, 1, -32);
    spot(-5, 3, -3);
    spot(5, 3, 2);
    spot(-1, 5, -1);
    spot(-32, 10, 31);
    spot(12, 12, -3);
    spot(7, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

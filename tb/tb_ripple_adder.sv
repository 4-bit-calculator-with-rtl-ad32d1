// tb_ripple_adder: all 256 operand pairs of the 4-bit adder, compared with the
// integer sum zero-extended to 8 bits.
module tb_ripple_adder;
  import calc_pkg::*;
  operand_t x, y;
  result_t  sum;
  int checks = 0, failures = 0;

  ripple_adder dut (.x(x), .y(y), .sum(sum));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        x = operand_t'(i);
        y = operand_t'(j);
        #1;
        checks++;
        if (sum != result_t'(i + j)) begin
          failures++;
          $display("FAIL %0d + %0d -> %0d", i, j, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

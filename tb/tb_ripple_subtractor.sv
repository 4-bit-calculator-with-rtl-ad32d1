// tb_ripple_subtractor: all 256 operand pairs of the 4-bit subtractor,
// compared with the integer difference as an 8-bit two's complement number.
module tb_ripple_subtractor;
  import calc_pkg::*;
  operand_t x, y;
  result_t  diff;
  int checks = 0, failures = 0;

  ripple_subtractor dut (.x(x), .y(y), .diff(diff));

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
        if ($signed(diff) != i - j) begin
          failures++;
          $display("FAIL %0d - %0d -> %0d", i, j, $signed(diff));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

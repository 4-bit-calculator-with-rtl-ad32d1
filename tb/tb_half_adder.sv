// tb_half_adder: exhaustive check of the one-bit half adder against x + y.
module tb_half_adder;
  logic x, y, cout, sum;
  int checks = 0, failures = 0;

  half_adder dut (.x(x), .y(y), .cout(cout), .sum(sum));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL x=%0b y=%0b -> cout=%0b sum=%0b", x, y, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

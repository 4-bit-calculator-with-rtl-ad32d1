// tb_full_adder: exhaustive check of the one-bit full adder against the
// integer sum x + y + cin. Prints TB_RESULT and stops; a watchdog ends a hung run.
module tb_full_adder;
  logic x, y, cin, cout, sum;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .cin(cin), .cout(cout), .sum(sum));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL x=%0b y=%0b cin=%0b -> cout=%0b sum=%0b", x, y, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

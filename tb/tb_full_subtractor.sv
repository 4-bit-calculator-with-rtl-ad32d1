// tb_full_subtractor: exhaustive check of the one-bit full subtractor. The
// reference is the integer a - b - bin: its low bit is diff, and borrow is set
// exactly when it is negative.
module tb_full_subtractor;
  logic a, b, bin, bout, diff;
  int checks = 0, failures = 0;

  full_subtractor dut (.a(a), .b(b), .bin(bin), .bout(bout), .diff(diff));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    for (int v = 0; v < 8; v++) begin
      {a, b, bin} = 3'(v);
      #1;
      r = int'(a) - int'(b) - int'(bin);
      checks++;
      if (diff != r[0] || bout != (r < 0)) begin
        failures++;
        $display("FAIL a=%0b b=%0b bin=%0b -> bout=%0b diff=%0b", a, b, bin, bout, diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

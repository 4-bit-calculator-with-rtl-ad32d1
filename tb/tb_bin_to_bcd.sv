// tb_bin_to_bcd: all 256 inputs of the binary-to-BCD converter, compared with
// the decimal digits v / 100, (v / 10) % 10 and v % 10. Includes 162, the
// worked example of the shift-and-add-3 method (digits 1, 6, 2).
module tb_bin_to_bcd;
  import calc_pkg::*;
  logic [7:0] binary;
  bcd3_t      bcd;
  int checks = 0, failures = 0;

  bin_to_bcd dut (.binary(binary), .bcd(bcd));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      binary = 8'(v);
      #1;
      checks++;
      if (bcd.hundreds != 4'(v / 100) || bcd.tens != 4'((v / 10) % 10) || bcd.ones != 4'(v % 10)) begin
        failures++;
        $display("FAIL %0d -> %0d %0d %0d", v, bcd.hundreds, bcd.tens, bcd.ones);
      end
    end
    binary = 8'b1010_0010;
    #1;
    checks++;
    if (bcd != {4'd1, 4'd6, 4'd2}) begin
      failures++;
      $display("FAIL worked example 162 -> %h", bcd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

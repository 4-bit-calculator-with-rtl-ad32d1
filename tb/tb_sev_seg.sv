// tb_sev_seg: every BCD code 0..15 on each of the three digit positions. The
// expected pattern is built from a list of which segments (a..g) each decimal
// digit lights, then inverted because the displays are active low; codes above
// 9 must blank the digit.
module tb_sev_seg;
  import calc_pkg::*;
  bcd3_t bcd;
  seg_t  hex0, hex1, hex2;
  int checks = 0, failures = 0;

  sev_seg dut (.bcd(bcd), .hex0(hex0), .hex1(hex1), .hex2(hex2));

  // Lit segments of each digit, as the letters a..g.
  function automatic seg_t expected(input int d);
    string lit;
    seg_t  on;
    case (d)
      0: lit = "abcdef";
      1: lit = "bc";
      2: lit = "abdeg";
      3: lit = "abcdg";
      4: lit = "bcfg";
      5: lit = "acdfg";
      6: lit = "acdefg";
      7: lit = "abc";
      8: lit = "abcdefg";
      9: lit = "abcdfg";
      default: lit = "";
    endcase
    on = '0;
    for (int k = 0; k < lit.len(); k++) on[lit[k] - "a"] = 1'b1;
    return ~on;
  endfunction

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      // rotate the digit through the three positions
      bcd = '{hundreds: 4'((d + 2) % 16), tens: 4'((d + 1) % 16), ones: 4'(d)};
      #1;
      checks += 3;
      if (hex0 != expected(d))            begin failures++; $display("FAIL ones %0d -> %b", d, hex0); end
      if (hex1 != expected((d + 1) % 16)) begin failures++; $display("FAIL tens %0d -> %b", (d + 1) % 16, hex1); end
      if (hex2 != expected((d + 2) % 16)) begin failures++; $display("FAIL hundreds %0d -> %b", (d + 2) % 16, hex2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// bin_to_bcd: converts an 8-bit binary number (0..255) to three BCD digits
// with the shift-and-add-3 ("double dabble") method.
//
// The binary value is shifted into the ones/tens/hundreds digits one bit at a
// time, most significant bit first. Before each shift, every digit that holds
// 5 or more gets 3 added, so that the shift carries it correctly into the next
// decimal digit. After eight shifts the digits hold the decimal value; for
// example 1010_0010 (162) ends as 1 / 6 / 2. The loop is unrolled into
// combinational logic: no clock, the output follows the input.
// The algorithm is the source design's; the width parameter is this design's.
module bin_to_bcd
  import calc_pkg::*;
#(
  parameter int unsigned W = RES_W   // binary width, at most 9 for three digits
) (
  input  logic [W-1:0] binary,
  output bcd3_t        bcd
);
  always_comb begin
    bcd3_t d;
    d = '0;
    for (int i = W - 1; i >= 0; i--) begin
      if (d.hundreds >= 4'd5) d.hundreds = d.hundreds + 4'd3;
      if (d.tens     >= 4'd5) d.tens     = d.tens     + 4'd3;
      if (d.ones     >= 4'd5) d.ones     = d.ones     + 4'd3;
      d = {d[10:0], binary[i]};
    end
    bcd = d;
  end
endmodule

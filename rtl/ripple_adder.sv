// ripple_adder: adds the two 4-bit operands bit by bit, least significant bit
// first, with the carry of each full adder feeding the next.
//
// The carry out of the top bit becomes result bit 4; bits 7..5 are zero, so the
// 8-bit result is the unsigned sum 0..30. Purely combinational.
// The bit-serial ripple structure follows the source design; the zero
// extension to the shared 8-bit result width is this design's choice.
module ripple_adder
  import calc_pkg::*;
(
  input  operand_t x,
  input  operand_t y,
  output result_t  sum
);
  logic [OPND_W:0]   carry;
  logic [OPND_W-1:0] s;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < OPND_W; i++) begin : g_bit
    full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (carry[i]),
      .cout(carry[i+1]),
      .sum (s[i])
    );
  end

  assign sum = result_t'({carry[OPND_W], s});
endmodule

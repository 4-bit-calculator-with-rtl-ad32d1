// ripple_subtractor: computes x - y bit by bit, least significant bit first,
// each full subtractor passing its borrow to the next.
//
// The borrow out of the top bit is the sign of the 5-bit two's complement
// difference; it is copied into bits 7..4 so the 8-bit result is x - y in
// two's complement (-15..15; e.g. 3 - 5 gives 8'hFE). Purely combinational.
// The ripple-borrow structure and the two's complement result follow the source
// design; the sign extension to 8 bits is this design's reading of it.
module ripple_subtractor
  import calc_pkg::*;
(
  input  operand_t x,
  input  operand_t y,
  output result_t  diff
);
  logic [OPND_W:0]   borrow;
  logic [OPND_W-1:0] d;

  assign borrow[0] = 1'b0;

  for (genvar i = 0; i < OPND_W; i++) begin : g_bit
    full_subtractor u_fs (
      .a   (x[i]),
      .b   (y[i]),
      .bin (borrow[i]),
      .bout(borrow[i+1]),
      .diff(d[i])
    );
  end

  assign diff = {{(RES_W-OPND_W){borrow[OPND_W]}}, d};
endmodule

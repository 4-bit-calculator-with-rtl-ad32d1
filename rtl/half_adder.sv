// half_adder: one-bit half adder, used at the edges of the array multiplier
// where only two bits meet.
//
// sum = x XOR y, cout = x AND y. Purely combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic cout,
  output logic sum
);
  assign sum  = x ^ y;
  assign cout = x & y;
endmodule

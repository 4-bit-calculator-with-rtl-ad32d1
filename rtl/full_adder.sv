// full_adder: one-bit full adder, the building cell of the ripple adder and of
// the array multiplier.
//
// sum is the XOR of the three inputs; cout is their majority. Purely
// combinational, no clock.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic cout,
  output logic sum
);
  assign sum  = x ^ y ^ cin;
  assign cout = (x & y) | (x & cin) | (y & cin);
endmodule

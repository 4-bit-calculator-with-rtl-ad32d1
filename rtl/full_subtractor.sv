// full_subtractor: one-bit full subtractor, the cell of the ripple-borrow
// subtractor.
//
// Computes a - b - bin: diff is the XOR of the three inputs; bout is set when
// the minuend bit a is too small, i.e. (~a & b) | (~a & bin) | (b & bin).
// Purely combinational.
module full_subtractor (
  input  logic a,
  input  logic b,
  input  logic bin,
  output logic bout,
  output logic diff
);
  assign diff = a ^ b ^ bin;
  assign bout = (~a & b) | (b & bin) | (~a & bin);
endmodule

// array_multiplier: N x N unsigned parallel array multiplier (N = 4 gives the
// 4 x 4 -> 8-bit multiplier of the calculator).
//
// All partial-product bits x[i] & y[j] are formed at once by AND gates. Row j
// (j = 1..N-1) then adds partial-product row j to the upper N bits of the
// running sum with a ripple row of adders: a half adder in column 0, full
// adders elsewhere, and a half adder in the last column of the first row, where
// only the carry and one product bit meet. Each row retires one product bit;
// the last row delivers the top N bits. For N = 4 this is 8 full adders and
// 4 half adders. Purely combinational; the delay is about 2N adder stages.
// The AND array plus full/half adder rows follows the source design; the
// generic row-by-row generate is this design's way of writing it.
module array_multiplier #(
  parameter int unsigned N = 4   // operand width, at least 2
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  // pp[j][i] = x[i] & y[j]
  logic [N-1:0][N-1:0] pp;
  for (genvar j = 0; j < N; j++) begin : g_pp
    assign pp[j] = x & {N{y[j]}};
  end

  // acc[j]: the N bits carried into row j+1 (the running sum shifted right by one)
  logic [N-1:0][N-1:0] acc;
  logic [N-1:1][N-1:0] s;      // row sums
  logic [N-1:1][N:0]   c;      // row carries

  assign acc[0] = {1'b0, pp[0][N-1:1]};
  assign p[0]   = pp[0][0];

  for (genvar j = 1; j < N; j++) begin : g_row
    assign c[j][0] = 1'b0;
    for (genvar i = 0; i < N; i++) begin : g_col
      if (i == 0) begin : g_ha0
        half_adder u_ha (
          .x   (acc[j-1][0]),
          .y   (pp[j][0]),
          .cout(c[j][1]),
          .sum (s[j][0])
        );
      end else if (j == 1 && i == N-1) begin : g_ha_top
        // acc[0][N-1] is a constant zero in the first row
        half_adder u_ha (
          .x   (pp[j][i]),
          .y   (c[j][i]),
          .cout(c[j][i+1]),
          .sum (s[j][i])
        );
      end else begin : g_fa
        full_adder u_fa (
          .x   (acc[j-1][i]),
          .y   (pp[j][i]),
          .cin (c[j][i]),
          .cout(c[j][i+1]),
          .sum (s[j][i])
        );
      end
    end
    assign p[j]   = s[j][0];
    assign acc[j] = {c[j][N], s[j][N-1:1]};
  end

  assign p[2*N-1:N] = acc[N-1];
endmodule

// calculator: the arithmetic core. Computes a + b, a - b, a * b and a / b in
// parallel and lets the operator pushbuttons pick which one drives the 8-bit
// result.
//
// Addition, subtraction and multiplication are combinational (ripple_adder,
// ripple_subtractor, array_multiplier). Division is clocked (divider): raise and
// lower start, then the quotient appears after at most 16 cycles and div_done
// rises. butt is the active-low pushbutton vector KEY[3:0]; exactly one held
// button selects an operator (1110 add, 1101 subtract, 1011 multiply,
// 0111 divide). No button, or more than one, gives a result of zero. The
// selection is combinational, so result follows the buttons in the same cycle.
//
// The operator set, the button codes and the zero default follow the source
// design. Bringing the divider's done flag out as div_done is this design's
// choice; the division remainder is computed but not shown.
module calculator
  import calc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  operand_t   a,
  input  operand_t   b,
  input  logic [3:0] butt,
  output result_t    result,
  output logic       div_done
);
  result_t sum, diff, prod, quot, rem;

  ripple_adder      u_add (.x(a), .y(b), .sum(sum));
  ripple_subtractor u_sub (.x(a), .y(b), .diff(diff));
  array_multiplier #(.N(OPND_W)) u_mul (.x(a), .y(b), .p(prod));
  divider u_div (
    .clk  (clk),
    .rst  (rst),
    .start(start),
    .num  (a),
    .den  (b),
    .quot (quot),
    .rem  (rem),
    .done (div_done)
  );

  always_comb begin
    unique case (butt)
      OP_ADD:  result = sum;
      OP_SUB:  result = diff;
      OP_MUL:  result = prod;
      OP_DIV:  result = quot;
      default: result = '0;
    endcase
  end

  logic unused_rem;
  assign unused_rem = ^rem;
endmodule

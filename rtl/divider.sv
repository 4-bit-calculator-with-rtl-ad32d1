// divider: clocked unsigned divider by repeated subtraction.
//
// Holding start high loads the dividend (num) and divisor (den), clears the
// quotient and drops done. After start returns low, each clock cycle either
// subtracts the divisor from the working remainder and increments the
// quotient, or, once the remainder is smaller than the divisor, stops and
// raises done. done stays high, with quot and rem holding the answer, until the
// next start or rst. A division with quotient q therefore takes q + 1 cycles
// after start falls (at most 16 for 4-bit operands). rst is synchronous and
// active high.
//
// The load-on-start, one-subtraction-per-cycle algorithm follows the source
// design. Clearing the quotient on every start (rather than only on rst) and the
// divide-by-zero rule (done after one cycle with quot = 8'hFF and rem = num,
// instead of never finishing) are this design's choices.
module divider
  import calc_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  operand_t num,
  input  operand_t den,
  output result_t  quot,
  output result_t  rem,
  output logic     done
);
  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_DONE} state_e;

  state_e   state;
  operand_t num_r, den_r;
  result_t  quot_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      num_r  <= '0;
      den_r  <= '0;
      quot_r <= '0;
    end else if (start) begin
      state  <= S_BUSY;
      num_r  <= num;
      den_r  <= den;
      quot_r <= '0;
    end else if (state == S_BUSY) begin
      if (den_r == '0) begin
        quot_r <= '1;
        state  <= S_DONE;
      end else if (num_r >= den_r) begin
        num_r  <= num_r - den_r;
        quot_r <= quot_r + result_t'(1);
      end else begin
        state  <= S_DONE;
      end
    end
  end

  assign quot = quot_r;
  assign rem  = result_t'(num_r);
  assign done = (state == S_DONE);

  // The working remainder never grows while busy.
  property p_rem_shrinks;
    @(posedge clk) disable iff (rst)
      (state == S_BUSY && !start) |=> (start || rst || num_r <= $past(num_r));
  endproperty
  a_rem_shrinks: assert property (p_rem_shrinks);
endmodule

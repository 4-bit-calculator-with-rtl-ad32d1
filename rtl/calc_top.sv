// calc_top: board-level top of the 4-bit calculator.
//
// Two operands come from four switches each (a, b); the four active-low
// pushbuttons (key) pick add, subtract, multiply or divide; two more switches
// give the divider its start and rst. The 8-bit result is shown in binary on
// the eight green LEDs (ledg) and in decimal, 000..255, on three active-low
// seven-segment displays (hex2 hundreds, hex1 tens, hex0 ones). A negative
// difference is shown as its 8-bit two's complement pattern, so 3 - 5 shows
// 1111_1110 on the LEDs and 254 on the displays.
//
// Path: calculator -> bin_to_bcd -> sev_seg, all combinational except the
// divider, which needs clk and finishes within 16 cycles of start falling.
// The structure (calculator, BCD converter, seven-segment decoder, LEDs and
// displays) follows the source design. The plain port names in place of
// board pin names and the div_done output are this design's choices.
module calc_top
  import calc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  operand_t   a,
  input  operand_t   b,
  input  logic [3:0] key,
  output result_t    ledg,
  output seg_t       hex0,
  output seg_t       hex1,
  output seg_t       hex2,
  output logic       div_done
);
  result_t result;
  bcd3_t   bcd;

  calculator u_calc (
    .clk     (clk),
    .rst     (rst),
    .start   (start),
    .a       (a),
    .b       (b),
    .butt    (key),
    .result  (result),
    .div_done(div_done)
  );

  bin_to_bcd #(.W(RES_W)) u_bcd (.binary(result), .bcd(bcd));

  sev_seg u_seg (.bcd(bcd), .hex0(hex0), .hex1(hex1), .hex2(hex2));

  assign ledg = result;
endmodule

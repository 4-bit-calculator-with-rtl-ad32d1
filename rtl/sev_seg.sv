// sev_seg: drives the three seven-segment displays from the three BCD digits.
//
// Each digit 0..9 is decoded to a 7-bit pattern, bit 0 = segment a through
// bit 6 = segment g, active low as on the board ("0" lights a segment). A value
// above 9 blanks the digit. Purely combinational.
// The segment patterns and the blank default follow the source design.
module sev_seg
  import calc_pkg::*;
(
  input  bcd3_t bcd,
  output seg_t  hex0,   // ones
  output seg_t  hex1,   // tens
  output seg_t  hex2    // hundreds
);
  function automatic seg_t decode(input logic [3:0] digit);
    unique case (digit)
      4'd0:    return 7'b100_0000;
      4'd1:    return 7'b111_1001;
      4'd2:    return 7'b010_0100;
      4'd3:    return 7'b011_0000;
      4'd4:    return 7'b001_1001;
      4'd5:    return 7'b001_0010;
      4'd6:    return 7'b000_0010;
      4'd7:    return 7'b111_1000;
      4'd8:    return 7'b000_0000;
      4'd9:    return 7'b001_0000;
      default: return SEG_BLANK;
    endcase
  endfunction

  assign hex0 = decode(bcd.ones);
  assign hex1 = decode(bcd.tens);
  assign hex2 = decode(bcd.hundreds);
endmodule

// calc_pkg: types and constants shared by the 4-bit calculator.
//
// The calculator takes two 4-bit operands and produces one 8-bit result that is
// shown in binary on eight LEDs and in decimal on three seven-segment digits.
// The four operator pushbuttons of the board are active low; exactly one held
// button selects an operator, which gives the four one-cold codes below.
package calc_pkg;

  localparam int unsigned OPND_W = 4;  // operand width (four switches each)
  localparam int unsigned RES_W  = 8;  // result width (eight green LEDs)
  localparam int unsigned SEG_W  = 7;  // segments per display digit

  typedef logic [OPND_W-1:0] operand_t;
  typedef logic [RES_W-1:0]  result_t;
  typedef logic [SEG_W-1:0]  seg_t;     // bit 0 = segment a ... bit 6 = segment g, 0 = lit

  // Pushbutton codes, KEY[3:0], active low: one held button selects the operator.
  typedef enum logic [3:0] {
    OP_ADD = 4'b1110,   // KEY0
    OP_SUB = 4'b1101,   // KEY1
    OP_MUL = 4'b1011,   // KEY2
    OP_DIV = 4'b0111    // KEY3
  } op_sel_e;

  // One BCD digit per display position.
  typedef struct packed {
    logic [3:0] hundreds;
    logic [3:0] tens;
    logic [3:0] ones;
  } bcd3_t;

  localparam seg_t SEG_BLANK = 7'b111_1111;

endpackage

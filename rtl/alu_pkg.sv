// alu_pkg: select-signal encodings shared by the 64-bit ALU and its units.
//
// The ALU is controlled by four select lines S3..S0 and the input carry Cin.
// S3S2 picks the result class at the output multiplexer, S1S0 picks the
// operation inside the class. The class encodings and the arithmetic and
// logic encodings follow the document; the shift-kind encoding on S1S0 is
// this design's own choice (the document gives six shift operations but not
// their codes).
package alu_pkg;

  // S3S2: result class, also the data-input index of the output mux
  typedef enum logic [1:0] {
    CLASS_ARITH = 2'b00,
    CLASS_LOGIC = 2'b01,
    CLASS_SHR   = 2'b10,
    CLASS_SHL   = 2'b11
  } alu_class_e;

  // S1S0 in the arithmetic class: second adder operand Y
  typedef enum logic [1:0] {
    Y_B    = 2'b00,   // Y = B      : A + B        / A + B + 1
    Y_NOTB = 2'b01,   // Y = ~B     : A - B - 1    / A - B
    Y_ZERO = 2'b10,   // Y = 0      : A            / A + 1
    Y_ONES = 2'b11    // Y = all 1s : A - 1        / A
  } yop_e;

  // S1S0 in the logic class
  typedef enum logic [1:0] {
    LOG_AND = 2'b00,
    LOG_OR  = 2'b01,
    LOG_XOR = 2'b10,
    LOG_NOT = 2'b11
  } logop_e;

  // S1S0 in the two shift classes (this design's own encoding)
  typedef enum logic [1:0] {
    SH_LOGICAL    = 2'b00,  // vacated bit gets 0
    SH_ARITHMETIC = 2'b01,  // right: sign bit kept; left: same as logical
    SH_CIRCULAR   = 2'b10,  // bit shifted out re-enters at the other end
    SH_SPARE      = 2'b11   // unused code, behaves as logical
  } shkind_e;

  // Full operation select as seen on the ALU pins
  typedef struct packed {
    alu_class_e  cls;  // S3 S2
    logic [1:0]  op;   // S1 S0
  } alu_sel_t;

endpackage

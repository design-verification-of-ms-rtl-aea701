// alu64: 64-bit arithmetic logic unit with a carry-lookahead adder.
//
// Operands enter through Register A and Register B. The arithmetic unit forms
// A + Y + Cin (Y = B, ~B, 0 or all 1s by S1S0), the logical unit forms AND,
// OR, XOR, NOT A and the one-position right and left shifts of A, and a 4:1
// output multiplexer selects by S3S2: 00 arithmetic, 01 logic, 10 shift
// right, 11 shift left. C64 is the adder's carry out; it is meaningful for
// arithmetic codes only. Cin acts only in the arithmetic class.
//
// Timing: a_in/b_in are captured on the rising clock edge; f and c64 are then
// combinational functions of the registered operands and of the live s and
// cin inputs, so a result is ready one clock after its operands are applied.
// The register stage on A and B follows the document's block diagram; the
// unregistered select/carry inputs and the reset are this design's choices.
module alu64
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 64   // word size, power of four
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a_in,
  input  logic [WIDTH-1:0] b_in,
  input  alu_sel_t         s,      // {S3, S2, S1, S0}
  input  logic             cin,    // C0
  output logic [WIDTH-1:0] f,      // F[WIDTH-1:0]
  output logic             c64     // adder carry out
);
  logic [WIDTH-1:0] a_q, b_q;
  logic [WIDTH-1:0] arith_y, logic_y, shr_y, shl_y;

  operand_register #(.WIDTH(WIDTH)) u_reg_a (.clk(clk), .rst_n(rst_n), .d(a_in), .q(a_q));
  operand_register #(.WIDTH(WIDTH)) u_reg_b (.clk(clk), .rst_n(rst_n), .d(b_in), .q(b_q));

  arithmetic_unit #(.WIDTH(WIDTH)) u_au (
    .a(a_q), .b(b_q), .s(s.op), .cin(cin), .d(arith_y), .cout(c64)
  );

  logical_unit #(.WIDTH(WIDTH)) u_lu (
    .a(a_q), .b(b_q), .s(s.op), .logic_y(logic_y), .shr(shr_y), .shl(shl_y)
  );

  mux4 #(.WIDTH(WIDTH)) u_out_mux (
    .i0(arith_y), .i1(logic_y), .i2(shr_y), .i3(shl_y), .s(s.cls), .y(f)
  );
endmodule

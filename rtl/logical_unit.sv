// logical_unit: the ALU's logical unit, logic gates plus shift unit.
//
// The logic-gate block combines A and B bitwise (AND, OR, XOR, NOT A by S1S0);
// the shift unit moves A one position right and left (logical, arithmetic or
// circular by S1S0). All three results go to the ALU output multiplexer.
// In the document this unit runs from the lower supply (0.6 V) because it has
// timing slack; that is an electrical property with no RTL counterpart.
// Combinational.
module logical_unit #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [1:0]       s,       // {S1, S0}
  output logic [WIDTH-1:0] logic_y,
  output logic [WIDTH-1:0] shr,
  output logic [WIDTH-1:0] shl
);
  logic_gates #(.WIDTH(WIDTH)) u_gates (.a(a), .b(b), .s(s), .y(logic_y));
  shift_unit  #(.WIDTH(WIDTH)) u_shift (.a(a), .s(s), .shr(shr), .shl(shl));
endmodule

// arithmetic_unit: D = A + Y + Cin, with Y chosen by S1S0.
//
// A goes straight to the adder's X input; the second operand selection block
// turns B into Y (B, ~B, all 0s or all 1s). Together with Cin this gives the
// eight arithmetic codes: add, add with carry, subtract with borrow, subtract,
// transfer, increment, decrement, transfer. Cout is the adder's carry out
// (C64 for the 64-bit unit). In the document this unit lies on the critical
// path and runs from the higher supply (1.2 V); the supply split is electrical
// and has no RTL counterpart. Combinational.
module arithmetic_unit #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [1:0]       s,      // {S1, S0}
  input  logic             cin,
  output logic [WIDTH-1:0] d,
  output logic             cout
);
  logic [WIDTH-1:0] y;

  operand_select #(.WIDTH(WIDTH)) u_sel (.b(b), .s(s), .y(y));

  cla_adder #(.WIDTH(WIDTH)) u_add (
    .x(a), .y(y), .cin(cin), .sum(d), .cout(cout)
  );
endmodule

// operand_select: second operand selection block of the arithmetic unit.
//
// For every bit a 4:1 multiplexer picks the adder's Y input from B, the
// complement of B, logic 0 or logic 1 under control of S1S0 (00, 01, 10, 11
// in that order, as the document's operation list gives them). Combinational.
module operand_select #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] b,
  input  logic [1:0]       s,     // {S1, S0}
  output logic [WIDTH-1:0] y
);
  mux4 #(.WIDTH(WIDTH)) u_mux (
    .i0(b),
    .i1(~b),
    .i2({WIDTH{1'b0}}),
    .i3({WIDTH{1'b1}}),
    .s (s),
    .y (y)
  );
endmodule

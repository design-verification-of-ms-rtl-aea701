// logic_gates: bitwise logic block of the logical unit.
//
// Every bit has an AND, an OR and an XOR gate on A_i and B_i and an inverter
// on A_i; a 4:1 multiplexer controlled by S1S0 passes one of them to Y_i
// (00 AND, 01 OR, 10 XOR, 11 NOT A, the data-input numbers of the document's
// one-bit stage). The stage is repeated WIDTH times with shared selects.
// Combinational.
module logic_gates #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [1:0]       s,     // {S1, S0}
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] and_o, or_o, xor_o, not_o;

  always_comb begin
    and_o = a & b;
    or_o  = a | b;
    xor_o = a ^ b;
    not_o = ~a;
  end

  mux4 #(.WIDTH(WIDTH)) u_mux (
    .i0(and_o), .i1(or_o), .i2(xor_o), .i3(not_o), .s(s), .y(y)
  );
endmodule

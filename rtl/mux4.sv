// mux4: two-level 4:1 multiplexer, WIDTH bits wide, one select pair for all bits.
//
// Structure as in the document's transmission-gate schematic: the first level
// picks I0/I1 and I2/I3 with s[0], the second level picks between the two
// first-level results with s[1]. So y = I[s]. Purely combinational.
// The same cell serves as the per-bit multiplexer of the second operand
// selection block, of the logic gates and as the ALU output multiplexer.
module mux4 #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] i0,
  input  logic [WIDTH-1:0] i1,
  input  logic [WIDTH-1:0] i2,
  input  logic [WIDTH-1:0] i3,
  input  logic [1:0]       s,     // {S1, S0}
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] x0, x1;   // first-level outputs, named as in the schematic

  always_comb begin
    x0 = s[0] ? i1 : i0;
    x1 = s[0] ? i3 : i2;
    y  = s[1] ? x1 : x0;
  end
endmodule

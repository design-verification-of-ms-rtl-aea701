// cla_adder: WIDTH-bit carry-lookahead adder, sum = x + y + cin.
//
// Bit generate g = x & y and propagate p = x ^ y feed a radix-4 lookahead tree
// (cla_tree) that returns the carry into every position; the sum bit is
// p ^ carry and the carry out is G | P & cin of the whole word. The document
// names a modified carry-lookahead adder in MS-CMOS logic but does not give
// its internal grouping; the radix-4 tree is this design's choice. The
// circuit style (MS-CMOS, skewed gates) has no counterpart in RTL.
// WIDTH must be a power of four (4, 16, 64, ...). Combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] g, p, c;
  logic             gg, gp;

  always_comb begin
    g = x & y;
    p = x ^ y;
  end

  cla_tree #(.WIDTH(WIDTH)) u_tree (.g(g), .p(p), .cin(cin), .c(c), .gg(gg), .gp(gp));

  always_comb begin
    sum  = p ^ c;
    cout = gg | (gp & cin);
  end
endmodule

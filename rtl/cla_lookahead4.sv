// cla_lookahead4: 4-bit carry-lookahead unit.
//
// From four generate/propagate pairs and the carry into the group it forms the
// carries into positions 1..3 as flat two-level sum-of-products terms
// (c[i+1] = g[i] | p[i]&c[i] expanded so that no carry ripples), plus the
// group generate and group propagate used by the next lookahead level.
// c[0] is the incoming carry passed through. Combinational.
module cla_lookahead4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:0] c,     // carry into each of the four positions
  output logic       gg,    // group generate
  output logic       gp     // group propagate
);
  always_comb begin
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp   = &p;
  end
endmodule

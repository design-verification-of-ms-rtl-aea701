// cla_tree: radix-4 carry-lookahead tree over WIDTH bit positions.
//
// WIDTH must be a power of four. The tree has LEVELS = log4(WIDTH) levels of
// 4-bit lookahead units. Going up, each unit merges four generate/propagate
// pairs of the level below into one group pair; going down, it turns the
// carry into its group into the carries of its four sub-groups. For 64 bits
// this is 16 + 4 + 1 = 21 units, and every carry passes through at most three
// levels up and three down instead of rippling through 64 positions.
//
// All nodes of all levels live in one set of flat vectors: level 0 (the bit
// positions) first, then level 1, and so on up to the single root node, whose
// carry is the carry in. Combinational.
module cla_tree #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] g,
  input  logic [WIDTH-1:0] p,
  input  logic             cin,
  output logic [WIDTH-1:0] c,     // carry into each bit position
  output logic             gg,    // generate of the whole WIDTH-bit group
  output logic             gp     // propagate of the whole WIDTH-bit group
);
  localparam int unsigned LEVELS = $clog2(WIDTH) / 2;

  // index of the first node of a level in the flat node vectors
  function automatic int unsigned level_base(input int unsigned lvl);
    int unsigned base = 0;
    for (int unsigned j = 0; j < lvl; j++) base += WIDTH >> (2 * j);
    return base;
  endfunction

  localparam int unsigned NODES = level_base(LEVELS) + 1;

  if (WIDTH < 4 || (1 << (2 * LEVELS)) != WIDTH) begin : g_bad_width
    $error("cla_tree: WIDTH must be a power of four");
  end

  logic [NODES-1:0] node_g, node_p, node_c;

  always_comb begin
    node_g[WIDTH-1:0] = g;
    node_p[WIDTH-1:0] = p;
    node_c[NODES-1]   = cin;
  end

  for (genvar lvl = 1; lvl <= LEVELS; lvl++) begin : g_level
    localparam int unsigned BELOW = level_base(lvl - 1);
    localparam int unsigned HERE  = level_base(lvl);
    for (genvar i = 0; i < (WIDTH >> (2 * lvl)); i++) begin : g_unit
      cla_lookahead4 u_la (
        .g  (node_g[BELOW + 4*i +: 4]),
        .p  (node_p[BELOW + 4*i +: 4]),
        .cin(node_c[HERE + i]),
        .c  (node_c[BELOW + 4*i +: 4]),
        .gg (node_g[HERE + i]),
        .gp (node_p[HERE + i])
      );
    end
  end

  always_comb begin
    c  = node_c[WIDTH-1:0];
    gg = node_g[NODES-1];
    gp = node_p[NODES-1];
  end
endmodule

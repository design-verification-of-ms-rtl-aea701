// shifter: WIDTH-bit one-position combinational shifter built from 2:1 muxes.
//
// One multiplexer per output bit H_i. With sel = 0 the word moves one place
// right (toward bit 0): H_i = A_(i+1) and the top bit takes the serial input
// IR. With sel = 1 it moves one place left: H_i = A_(i-1) and bit 0 takes the
// serial input IL. This is the document's 4-bit function table extended to
// WIDTH bits. Combinational.
module shifter #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic             sel,   // 0: shift right, 1: shift left
  input  logic             ir,    // serial input for shift right
  input  logic             il,    // serial input for shift left
  output logic [WIDTH-1:0] h
);
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      if (sel) h[i] = (i == 0)         ? il : a[i-1];
      else     h[i] = (i == WIDTH - 1) ? ir : a[i+1];
    end
  end
endmodule

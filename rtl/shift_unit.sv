// shift_unit: right-shift and left-shift results of the logical unit.
//
// Two one-position shifters, one fixed to shift right and one fixed to shift
// left, deliver both results at once to the ALU output multiplexer, where S3S2
// picks one. S1S0 only decides what enters the vacated bit:
//   00 logical    : 0 in both directions
//   01 arithmetic : right copies the sign bit A[W-1]; left shifts in 0
//   10 circular   : right feeds A[0] to the top; left feeds A[W-1] to bit 0
//   11 unused     : behaves as logical
// The document lists logical, arithmetic and circular shifts in both
// directions (six shift operations) but its code table is not reproduced, so
// this S1S0 assignment is this design's choice. Combinational.
module shift_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [1:0]       s,     // {S1, S0}
  output logic [WIDTH-1:0] shr,
  output logic [WIDTH-1:0] shl
);
  logic ir, il;

  always_comb begin
    unique case (shkind_e'(s))
      SH_ARITHMETIC: begin ir = a[WIDTH-1]; il = 1'b0;       end
      SH_CIRCULAR:   begin ir = a[0];       il = a[WIDTH-1]; end
      default:       begin ir = 1'b0;       il = 1'b0;       end
    endcase
  end

  shifter #(.WIDTH(WIDTH)) u_right (.a(a), .sel(1'b0), .ir(ir), .il(il), .h(shr));
  shifter #(.WIDTH(WIDTH)) u_left  (.a(a), .sel(1'b1), .ir(ir), .il(il), .h(shl));
endmodule

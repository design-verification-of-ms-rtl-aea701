// alu_ref_pkg: behavioural reference of the ALU for the testbenches.
//
// alu_ref() computes the expected result and carry out of one ALU operation
// for a word of w bits (1 < w <= 64) held in the low bits of 64-bit values.
// It is written from the operation list (add, subtract, increment, ...) with
// plain arithmetic and shifts, independently of the RTL structure.
package alu_ref_pkg;

  typedef struct packed {
    logic [63:0] f;
    logic        c;
  } alu_res_t;

  function automatic alu_res_t alu_ref(input logic [63:0] a, input logic [63:0] b,
                                       input logic [3:0] s, input logic cin, input int w);
    logic [63:0]  mask, msb, nb;
    logic [127:0] wide;
    alu_res_t     r;
    mask = (w == 64) ? '1 : ((64'd1 << w) - 64'd1);
    msb  = 64'd1 << (w - 1);
    a = a & mask;
    b = b & mask;
    nb = ~b & mask;
    r.c = 1'b0;
    case (s[3:2])
      2'b00: begin
        case ({s[1:0], cin})
          3'b000: wide = 128'(a) + 128'(b);                       // A + B
          3'b001: wide = 128'(a) + 128'(b) + 1;                   // A + B + 1
          3'b010: wide = 128'(a) + 128'(nb);               // A - B - 1
          3'b011: wide = 128'(a) + 128'(nb) + 1;           // A - B
          3'b100: wide = 128'(a);                                 // A
          3'b101: wide = 128'(a) + 1;                             // A + 1
          3'b110: wide = 128'(a) + 128'(mask);                    // A - 1
          default: wide = 128'(a) + 128'(mask) + 1;               // A
        endcase
        r.f = wide[63:0] & mask;
        r.c = wide[w];
      end
      2'b01: begin
        case (s[1:0])
          2'b00: r.f = a & b;
          2'b01: r.f = a | b;
          2'b10: r.f = a ^ b;
          default: r.f = ~a & mask;
        endcase
      end
      2'b10: begin
        r.f = a >> 1;
        if (s[1:0] == 2'b01 && (a & msb) != 0) r.f = r.f | msb;   // arithmetic
        if (s[1:0] == 2'b10 && a[0])           r.f = r.f | msb;   // circular
      end
      default: begin
        r.f = (a << 1) & mask;
        if (s[1:0] == 2'b10 && (a & msb) != 0) r.f = r.f | 64'd1; // circular
      end
    endcase
    return r;
  endfunction

  // Name of the operation selected by {S3..S0, Cin}, for the coverage report.
  function automatic string op_name(input logic [3:0] s, input logic cin);
    case (s[3:2])
      2'b00: case ({s[1:0], cin})
               3'b000: return "add";
               3'b001: return "add_carry";
               3'b010: return "sub_borrow";
               3'b011: return "sub";
               3'b100: return "transfer";
               3'b101: return "increment";
               3'b110: return "decrement";
               default: return "transfer";
             endcase
      2'b01: case (s[1:0])
               2'b00: return "and";
               2'b01: return "or";
               2'b10: return "xor";
               default: return "not";
             endcase
      2'b10: case (s[1:0])
               2'b01: return "shr_arith";
               2'b10: return "shr_circ";
               default: return "shr_logic";
             endcase
      default: case (s[1:0])
               2'b01: return "shl_arith";
               2'b10: return "shl_circ";
               default: return "shl_logic";
             endcase
    endcase
  endfunction

endpackage

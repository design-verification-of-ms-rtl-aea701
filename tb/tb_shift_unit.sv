// tb_shift_unit: self-checking test of the shift unit.
// For random A and every S1S0 it compares the right result with A>>1,
// A>>>1 (sign kept) or A rotated right, and the left result with A<<1 or A
// rotated left, following the shift-kind encoding of alu_pkg. Words with the
// top bit set and with bit 0 set are forced so every serial input is seen at 1.
module tb_shift_unit;
  import alu_pkg::*;
  localparam int unsigned W = 64;
  logic [W-1:0] a, shr, shl, er, el;
  logic [1:0]   s;
  int checks = 0, failures = 0;

  shift_unit #(.WIDTH(W)) dut (.a(a), .s(s), .shr(shr), .shl(shl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      a = {$urandom, $urandom};
      if (n % 4 == 1) a[W-1] = 1'b1;
      if (n % 4 == 2) a[0] = 1'b1;
      for (int k = 0; k < 4; k++) begin
        s = 2'(k);
        #1;
        case (shkind_e'(s))
          SH_ARITHMETIC: begin er = W'($signed(a) >>> 1); el = a << 1; end
          SH_CIRCULAR:   begin er = {a[0], a[W-1:1]};     el = {a[W-2:0], a[W-1]}; end
          default:       begin er = a >> 1;               el = a << 1; end
        endcase
        checks += 2;
        if (shr !== er) begin
          failures++;
          $display("right s=%0d a=%h got %h expected %h", s, a, shr, er);
        end
        if (shl !== el) begin
          failures++;
          $display("left s=%0d a=%h got %h expected %h", s, a, shl, el);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

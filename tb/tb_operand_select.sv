// tb_operand_select: self-checking test of the second operand selection block.
// For random B and every S1S0 it compares Y with B, ~B, all zeros or all ones.
module tb_operand_select;
  localparam int unsigned W = 64;
  logic [W-1:0] b, y, exp_y;
  logic [1:0]   s;
  int checks = 0, failures = 0;

  operand_select #(.WIDTH(W)) dut (.b(b), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      b = {$urandom, $urandom};
      for (int k = 0; k < 4; k++) begin
        s = 2'(k);
        #1;
        case (k)
          0: exp_y = b;
          1: exp_y = ~b;
          2: exp_y = '0;
          default: exp_y = '1;
        endcase
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("mismatch s=%0d b=%h y=%h exp=%h", s, b, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

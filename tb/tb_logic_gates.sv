// tb_logic_gates: self-checking test of the logic-gate block.
// Random A, B for every S1S0; Y must be A&B, A|B, A^B or ~A.
module tb_logic_gates;
  localparam int unsigned W = 64;
  logic [W-1:0] a, b, y, exp_y;
  logic [1:0]   s;
  int checks = 0, failures = 0;

  logic_gates #(.WIDTH(W)) dut (.a(a), .b(b), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      for (int k = 0; k < 4; k++) begin
        s = 2'(k);
        #1;
        case (k)
          0: exp_y = a & b;
          1: exp_y = a | b;
          2: exp_y = a ^ b;
          default: exp_y = ~a;
        endcase
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("s=%0d a=%h b=%h y=%h expected %h", s, a, b, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

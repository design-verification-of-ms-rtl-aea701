// tb_mux4: self-checking test of the 4:1 multiplexer (also the ALU output mux).
// Drives random data on the four inputs for every select value and compares y
// with the input whose index equals the select. Combinational, so each check
// follows a 1-time-unit settle delay; a watchdog ends a hung run.
module tb_mux4;
  localparam int unsigned W = 64;
  logic [W-1:0] i0, i1, i2, i3, y, exp_y;
  logic [1:0]   s;
  int checks = 0, failures = 0;

  mux4 #(.WIDTH(W)) dut (.i0(i0), .i1(i1), .i2(i2), .i3(i3), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      i0 = {$urandom, $urandom}; i1 = {$urandom, $urandom};
      i2 = {$urandom, $urandom}; i3 = {$urandom, $urandom};
      for (int k = 0; k < 4; k++) begin
        s = 2'(k);
        #1;
        case (k)
          0: exp_y = i0;
          1: exp_y = i1;
          2: exp_y = i2;
          default: exp_y = i3;
        endcase
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("mismatch s=%0d y=%h exp=%h", s, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

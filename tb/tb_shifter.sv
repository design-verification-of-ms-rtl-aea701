// tb_shifter: self-checking test of the one-position combinational shifter.
// The 4-bit instance is checked against the function table of the 4-bit
// shifter (S=0: H3..H0 = IR A3 A2 A1; S=1: H3..H0 = A2 A1 A0 IL) for every
// input; the 64-bit instance is checked against concatenation references.
module tb_shifter;
  int checks = 0, failures = 0;

  logic [3:0]  a4, h4, e4;
  logic [63:0] a64, h64, e64;
  logic        sel, ir, il;

  shifter #(.WIDTH(4))  dut4  (.a(a4),  .sel(sel), .ir(ir), .il(il), .h(h4));
  shifter #(.WIDTH(64)) dut64 (.a(a64), .sel(sel), .ir(ir), .il(il), .h(h64));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16 * 8; v++) begin
      a4 = 4'(v); sel = 1'(v >> 4); ir = 1'(v >> 5); il = 1'(v >> 6);
      a64 = {$urandom, $urandom};
      #1;
      if (!sel) e4 = {ir, a4[3], a4[2], a4[1]};
      else      e4 = {a4[2], a4[1], a4[0], il};
      if (!sel) e64 = {ir, a64[63:1]};
      else      e64 = {a64[62:0], il};
      checks += 2;
      if (h4 !== e4) begin
        failures++;
        $display("4b sel=%b ir=%b il=%b a=%b h=%b expected %b", sel, ir, il, a4, h4, e4);
      end
      if (h64 !== e64) begin
        failures++;
        $display("64b sel=%b a=%h h=%h expected %h", sel, a64, h64, e64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_logical_unit: self-checking test of the logical unit (logic gates plus
// shift unit). Random A, B for every S1S0; all three outputs are compared with
// independently computed bitwise and shift results.
module tb_logical_unit;
  localparam int unsigned W = 64;
  logic [W-1:0] a, b, ly, shr, shl, ey, er, el;
  logic [1:0]   s;
  int checks = 0, failures = 0;

  logical_unit #(.WIDTH(W)) dut (.a(a), .b(b), .s(s), .logic_y(ly), .shr(shr), .shl(shl));

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
      if (n % 2 == 1) begin a[W-1] = 1'b1; a[0] = 1'b1; end
      for (int k = 0; k < 4; k++) begin
        s = 2'(k);
        #1;
        case (k)
          0: begin ey = a & b; er = a >> 1;                   el = a << 1; end
          1: begin ey = a | b; er = {a[W-1], a[W-1:1]};       el = a << 1; end
          2: begin ey = a ^ b; er = {a[0], a[W-1:1]};         el = {a[W-2:0], a[W-1]}; end
          default: begin ey = ~a; er = a >> 1;                el = a << 1; end
        endcase
        checks += 3;
        if (ly !== ey)   begin failures++; $display("logic s=%0d got %h exp %h", s, ly, ey); end
        if (shr !== er)  begin failures++; $display("shr s=%0d got %h exp %h", s, shr, er); end
        if (shl !== el)  begin failures++; $display("shl s=%0d got %h exp %h", s, shl, el); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

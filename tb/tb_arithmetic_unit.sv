// tb_arithmetic_unit: self-checking test of the arithmetic unit.
// For random and corner-case A, B it runs all eight (S1S0, Cin) codes and
// compares D with the operation each code stands for (A+B, A+B+1, A-B-1,
// A-B, A, A+1, A-1, A) and Cout with the carry of the 65-bit sum A+Y+Cin.
module tb_arithmetic_unit;
  localparam int unsigned W = 64;
  logic [W-1:0] a, b, d, exp_d, y;
  logic [1:0]   s;
  logic         cin, cout;
  logic [W:0]   wide;
  int checks = 0, failures = 0;

  arithmetic_unit #(.WIDTH(W)) dut (.a(a), .b(b), .s(s), .cin(cin), .d(d), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] av, input logic [W-1:0] bv);
    a = av; b = bv;
    for (int k = 0; k < 8; k++) begin
      s   = 2'(k >> 1);
      cin = 1'(k);
      #1;
      case (k)
        0: exp_d = av + bv;          // add
        1: exp_d = av + bv + 1;      // add with carry
        2: exp_d = av - bv - 1;      // subtract with borrow
        3: exp_d = av - bv;          // subtract
        4: exp_d = av;               // transfer
        5: exp_d = av + 1;           // increment
        6: exp_d = av - 1;           // decrement
        default: exp_d = av;         // transfer
      endcase
      case (s)
        2'b00: y = bv;
        2'b01: y = ~bv;
        2'b10: y = '0;
        default: y = '1;
      endcase
      wide = {1'b0, av} + {1'b0, y} + (W+1)'(cin);
      checks++;
      if (d !== exp_d || cout !== wide[W]) begin
        failures++;
        $display("s=%b cin=%b a=%h b=%h d=%h cout=%b expected %h %b", s, cin, av, bv, d, cout, exp_d, wide[W]);
      end
    end
  endtask

  initial begin
    run('0, '0);
    run('1, '0);
    run('1, '1);
    run('0, '1);
    run(64'h8000_0000_0000_0000, 64'h7FFF_FFFF_FFFF_FFFF);
    for (int n = 0; n < 1000; n++) run({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cla_adder: self-checking test of the carry-lookahead adder.
// The 4-bit adder is tested exhaustively (all x, y, cin); the 16-bit and
// 64-bit adders get carry-chain corner cases (all-ones plus one, alternating
// patterns, long propagate runs broken at one place) and random operands.
// The reference is the behavioural sum {1'b0,x} + y + cin.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [3:0]  x4, y4, s4;   logic c4, co4;
  logic [15:0] x16, y16, s16; logic c16, co16;
  logic [63:0] x64, y64, s64; logic c64, co64;

  cla_adder #(.WIDTH(4))  dut4  (.x(x4),  .y(y4),  .cin(c4),  .sum(s4),  .cout(co4));
  cla_adder #(.WIDTH(16)) dut16 (.x(x16), .y(y16), .cin(c16), .sum(s16), .cout(co16));
  cla_adder #(.WIDTH(64)) dut64 (.x(x64), .y(y64), .cin(c64), .sum(s64), .cout(co64));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run64(input logic [63:0] x, input logic [63:0] y, input logic ci);
    logic [64:0] exp;
    x64 = x; y64 = y; c64 = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 65'(ci);
    checks++;
    if ({co64, s64} !== exp) begin
      failures++;
      $display("64b %h + %h + %0d = %b_%h expected %h", x, y, ci, co64, s64, exp);
    end
  endtask

  task automatic run16(input logic [15:0] x, input logic [15:0] y, input logic ci);
    logic [16:0] exp;
    x16 = x; y16 = y; c16 = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 17'(ci);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      $display("16b %h + %h + %0d = %b_%h expected %h", x, y, ci, co16, s16, exp);
    end
  endtask

  initial begin
    // 4 bits, exhaustive
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 2; c++) begin
          x4 = 4'(a); y4 = 4'(b); c4 = 1'(c);
          #1;
          checks++;
          if ({co4, s4} !== 5'(a + b + c)) begin
            failures++;
            $display("4b %0d + %0d + %0d = %0d", a, b, c, {co4, s4});
          end
        end
    // 64 bits, corner cases
    run64('1, 64'd0, 1'b1);
    run64('1, 64'd1, 1'b0);
    run64('1, '1, 1'b1);
    run64(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    run64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    for (int k = 0; k < 64; k++) begin
      // a single generate at bit k followed by propagates up to the top
      run64(~(64'd1 << k) | (64'd1 << k), 64'd1 << k, 1'b0);
      // a propagate run from bit 0 broken at bit k
      run64('1 ^ (64'd1 << k), 64'd0, 1'b1);
      run64(64'd1 << k, '1, 1'b0);
    end
    for (int n = 0; n < 2000; n++) run64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    // 16 bits
    run16('1, 16'd0, 1'b1);
    for (int n = 0; n < 1000; n++) run16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

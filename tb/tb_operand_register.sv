// tb_operand_register: self-checking test of the operand register.
// Checks that reset clears the register, that a value appears on q exactly one
// rising edge after it is driven on d (and not before), and that it holds
// between edges. A watchdog counts a failure if the run hangs.
module tb_operand_register;
  localparam int unsigned W = 64;
  logic         clk = 1'b0, rst_n;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  operand_register #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: q=%h expected %h", what, got, exp);
    end
  endtask

  initial begin
    d = {$urandom, $urandom};
    rst_n = 1'b1;
    #1 rst_n = 1'b0;   // falling edge for the asynchronous reset
    #1;
    check(q, '0, "async reset");
    @(posedge clk); #1;
    check(q, '0, "held in reset");
    rst_n = 1'b1;
    prev = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      d = {$urandom, $urandom};
      #1;
      check(q, prev, "before edge");   // new d must not show yet
      @(posedge clk); #1;
      check(q, d, "one edge later");
      prev = d;
    end
    rst_n = 1'b0;
    #1;
    check(q, '0, "reset while running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

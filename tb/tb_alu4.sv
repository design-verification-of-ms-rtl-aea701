// tb_alu4: the ALU built 4 bits wide, the width of the document's worked
// examples (4-bit arithmetic unit and 4-bit shifter), tested exhaustively:
// every A, every B and all 32 combinations of S3..S0 and Cin, with F and the
// carry out C4 compared against alu_ref_pkg, plus the one-cycle operand latency.
module tb_alu4;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  localparam int unsigned W = 4;

  logic         clk = 1'b0, rst_n;
  logic [W-1:0] a_in, b_in, f;
  alu_sel_t     s;
  logic         cin, c4;
  alu_res_t     exp_r;
  int checks = 0, failures = 0;

  alu64 #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .a_in(a_in), .b_in(b_in), .s(s), .cin(cin), .f(f), .c64(c4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_in = '0; b_in = '0; s = alu_sel_t'(4'b0000); cin = 1'b0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int av = 0; av < 16; av++)
      for (int bv = 0; bv < 16; bv++) begin
        @(negedge clk);
        a_in = W'(av); b_in = W'(bv);
        @(posedge clk);
        for (int k = 0; k < 32; k++) begin
          s = alu_sel_t'(4'(k >> 1));
          cin = 1'(k);
          #1;
          exp_r = alu_ref(64'(av), 64'(bv), 4'(k >> 1), 1'(k), W);
          checks++;
          if (f !== exp_r.f[W-1:0] || (k < 8 && c4 !== exp_r.c)) begin
            failures++;
            $display("S=%b cin=%b a=%h b=%h f=%h c4=%b expected %h %b",
                     4'(k >> 1), 1'(k), av, bv, f, c4, exp_r.f[W-1:0], exp_r.c);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

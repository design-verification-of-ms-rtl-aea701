// tb_alu64: end-to-end test of the 64-bit ALU at its default parameters.
//
// Operands are applied on the falling clock edge and captured by Register A/B
// on the rising edge. The test checks the one-cycle latency (F still shows the
// old operands before the edge and the new ones right after it), then sweeps
// all 32 combinations of S3..S0 and Cin over the registered operands and
// compares F (and C64 in the arithmetic class) with alu_ref_pkg. Each of the
// seventeen distinct operations (the eight arithmetic codes hold transfer
// twice), a carry out of 1 and of 0, a sign bit shifted in and bits wrapped
// by both circular shifts are counted; one that never happened counts as a
// failure. A reset check and a watchdog complete it.
module tb_alu64;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  localparam int unsigned W = 64;

  logic         clk = 1'b0, rst_n;
  logic [W-1:0] a_in, b_in, f, a_now, b_now;
  alu_sel_t     s;
  logic         cin, c64;
  alu_res_t     exp_r;
  int checks = 0, failures = 0;
  int op_count[string];
  int carry1 = 0, carry0 = 0, sign_in = 0, wrap_r = 0, wrap_l = 0, latency_ok = 0;

  alu64 dut (.clk(clk), .rst_n(rst_n), .a_in(a_in), .b_in(b_in), .s(s), .cin(cin), .f(f), .c64(c64));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_code(input logic [3:0] code, input logic ci, input logic [W-1:0] av,
                            input logic [W-1:0] bv, input string what);
    s = alu_sel_t'(code);
    cin = ci;
    #1;
    exp_r = alu_ref(64'(av), 64'(bv), code, ci, W);
    checks++;
    if (f !== exp_r.f[W-1:0] || (code[3:2] == 2'b00 && c64 !== exp_r.c)) begin
      failures++;
      $display("%s: S=%b cin=%b a=%h b=%h f=%h c64=%b expected %h %b",
               what, code, ci, av, bv, f, c64, exp_r.f[W-1:0], exp_r.c);
    end
  endtask

  task automatic apply(input logic [W-1:0] av, input logic [W-1:0] bv);
    @(negedge clk);
    a_in = av; b_in = bv;
    // before the edge F still belongs to the old operands (A + B + 0)
    check_code(4'b0000, 1'b0, a_now, b_now, "before edge");
    @(posedge clk);
    check_code(4'b0000, 1'b0, av, bv, "after edge");
    latency_ok++;
    a_now = av; b_now = bv;
    for (int k = 0; k < 32; k++) begin
      check_code(4'(k >> 1), 1'(k), av, bv, "sweep");
      op_count[op_name(4'(k >> 1), 1'(k))]++;
      if (k < 8) begin
        if (c64) carry1++; else carry0++;
      end
    end
    if (av[W-1]) sign_in++;
    if (av[0])   wrap_r++;
    if (av[W-1]) wrap_l++;
  endtask

  initial begin
    a_in = '0; b_in = '0; s = alu_sel_t'(4'b0000); cin = 1'b0;
    a_now = '0; b_now = '0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;   // falling edge for the asynchronous reset
    #1;
    check_code(4'b0100, 1'b0, '0, '0, "reset");   // A + 0 with A cleared
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    apply('1, 64'd1);
    apply('0, '0);
    apply(64'h8000_0000_0000_0001, 64'h7FFF_FFFF_FFFF_FFFF);
    apply(64'h0123_4567_89AB_CDEF, 64'hFEDC_BA98_7654_3210);
    for (int n = 0; n < 300; n++) apply({$urandom, $urandom}, {$urandom, $urandom});

    foreach (op_count[name]) $display("op %-10s seen %0d times", name, op_count[name]);
    $display("carry out 1: %0d, 0: %0d, sign shifted in: %0d, wrap right: %0d, wrap left: %0d, latency checks: %0d",
             carry1, carry0, sign_in, wrap_r, wrap_l, latency_ok);
    checks++;
    if (op_count.num() != 17) begin
      failures++;
      $display("only %0d of 17 distinct operations exercised", op_count.num());
    end
    checks++;
    if (carry1 == 0 || carry0 == 0 || sign_in == 0 || wrap_r == 0 || wrap_l == 0 || latency_ok == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

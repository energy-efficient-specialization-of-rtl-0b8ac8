// tb_madd: issues a random MUL/MADD/MSUB (or idle) every cycle and checks
// that exactly the operation issued one cycle earlier is presented, with
// `valid`, so that the PE output register holds it two cycles after issue.
`include "tb_util.svh"
module tb_madd;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fu_op_e      op;
  logic [31:0] a, b, c, y;
  logic        valid;
  logic [31:0] exp_y;
  logic        exp_v;

  madd dut (.clk(clk), .rst_n(rst_n), .op(op), .a(a), .b(b), .c(c), .y(y), .valid(valid));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned p;
    op = OP_NOP; a = 0; b = 0; c = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 1000; n++) begin
      int k;
      k = $urandom_range(0, 3);
      op = (k == 0) ? OP_MUL : (k == 1) ? OP_MADD : (k == 2) ? OP_MSUB : OP_ADD;
      a = $urandom; b = $urandom; c = $urandom;
      p = longint'(a) * longint'(b);
      exp_v = (k != 3);
      exp_y = (k == 0) ? p[31:0] : (k == 1) ? p[31:0] + c : p[31:0] - c;
      @(negedge clk);        // one clock edge later the result is presented
      `CHECK_EQ(valid, exp_v, "valid")
      if (exp_v) `CHECK_EQ(y, exp_y, $sformatf("y n=%0d", n))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

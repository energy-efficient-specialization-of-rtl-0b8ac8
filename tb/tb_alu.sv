// tb_alu: random and corner-case check of every ALU operation against
// reference expressions written independently of the design.
`include "tb_util.svh"
module tb_alu;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fu_op_e      op;
  logic [31:0] a, b, y, ey;
  logic        pred, flag, ef;

  alu dut (.op(op), .a(a), .b(b), .pred(pred), .y(y), .flag(flag));

  task automatic ref_model();
    ef = 0;
    case (op)
      OP_ADD:  ey = a + b;
      OP_SUB:  ey = a + ~b + 1;
      OP_NEG:  ey = ~a + 1;
      OP_AND:  ey = a & b;
      OP_OR:   ey = a | b;
      OP_XOR:  ey = a ^ b;
      OP_NOT:  ey = ~a;
      OP_PASS: ey = a;
      OP_EQ:   ef = (a == b);
      OP_NE:   ef = (a != b);
      OP_LT:   ef = (a[31] != b[31]) ? a[31] : (a < b);
      OP_LTU:  ef = (a < b);
      OP_LE:   ef = (a[31] != b[31]) ? a[31] : (a <= b);
      OP_LEU:  ef = (a <= b);
      OP_SEL:  ey = pred ? a : b;
      default: ey = 0;
    endcase
    if (op inside {OP_EQ, OP_NE, OP_LT, OP_LTU, OP_LE, OP_LEU}) ey = {31'b0, ef};
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};
    for (int o = 0; o <= 24; o++) begin
      for (int n = 0; n < 60; n++) begin
        op   = fu_op_e'(o);
        a    = (n < 36) ? corners[n % 6] : $urandom;
        b    = (n < 36) ? corners[n / 6] : ((n % 3 == 0) ? a : $urandom);
        pred = n[0];
        #1;
        ref_model();
        `CHECK_EQ(y, ey, $sformatf("y op=%s a=%h b=%h", op.name(), a, b))
        `CHECK_EQ(flag, ef, $sformatf("flag op=%s a=%h b=%h", op.name(), a, b))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

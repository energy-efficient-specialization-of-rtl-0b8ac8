// tb_s_alu: checks that the S-ALU executes ALU, select and shift operations
// through its shared ports, flags comparisons, and refuses MADD and FSHR.
`include "tb_util.svh"
module tb_s_alu;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fu_op_e      op;
  logic [31:0] a, b, y, ey;
  logic        pred, flag, yv, fv;

  s_alu dut (.op(op), .a(a), .b(b), .pred(pred), .y(y), .flag(flag), .y_valid(yv), .flag_valid(fv));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      op = fu_op_e'($urandom_range(0, 24));
      a = $urandom; b = (n % 5 == 0) ? a : $urandom; pred = $urandom;
      #1;
      case (op)
        OP_ADD:  ey = a + b;
        OP_SUB:  ey = a - b;
        OP_NEG:  ey = 0 - a;
        OP_AND:  ey = a & b;
        OP_OR:   ey = a | b;
        OP_XOR:  ey = a ^ b;
        OP_NOT:  ey = ~a;
        OP_PASS: ey = a;
        OP_EQ:   ey = 32'(a == b);
        OP_NE:   ey = 32'(a != b);
        OP_LT:   ey = 32'($signed(a) < $signed(b));
        OP_LTU:  ey = 32'(a < b);
        OP_LE:   ey = 32'($signed(a) <= $signed(b));
        OP_LEU:  ey = 32'(a <= b);
        OP_SEL:  ey = pred ? a : b;
        OP_SLL:  ey = a << b[4:0];
        OP_SRL:  ey = a >> b[4:0];
        OP_SRA:  ey = $signed(a) >>> b[4:0];
        OP_ROTL: ey = {a, a} >> (32 - b[4:0]);
        OP_ROTR: ey = 32'({a, a} >> b[4:0]);
        default: ey = 'x;
      endcase
      if (op == OP_ROTL) ey = 32'({a, a} >> (6'd32 - {1'b0, b[4:0]}));
      `CHECK_EQ(yv, (op inside {[OP_ADD:OP_ROTR]}), $sformatf("y_valid %s", op.name()))
      `CHECK_EQ(fv, (op inside {[OP_EQ:OP_LEU]}), $sformatf("flag_valid %s", op.name()))
      if (op inside {[OP_ADD:OP_ROTR]}) `CHECK_EQ(y, ey, $sformatf("y %s a=%h b=%h", op.name(), a, b))
      if (op inside {[OP_EQ:OP_LEU]})   `CHECK_EQ(flag, ey[0], $sformatf("flag %s", op.name()))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

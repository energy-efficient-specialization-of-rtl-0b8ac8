// tb_funnel_shifter: checks every shift amount of every shift operation
// against plain SystemVerilog shift operators.
`include "tb_util.svh"
module tb_funnel_shifter;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fu_op_e      op;
  logic [31:0] a, b, c, y, ey;
  logic [63:0] t;

  funnel_shifter dut (.op(op), .a(a), .b(b), .c(c), .y(y));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fu_op_e ops [6] = '{OP_SLL, OP_SRL, OP_SRA, OP_ROTL, OP_ROTR, OP_FSHR};
    for (int k = 0; k < 6; k++) begin
      for (int s = 0; s < 32; s++) begin
        for (int n = 0; n < 4; n++) begin
          op = ops[k];
          a  = (n == 0) ? 32'h8000_0001 : $urandom;
          c  = $urandom;
          b  = {$urandom, 5'(s)};
          #1;
          case (op)
            OP_SLL:  ey = a << s;
            OP_SRL:  ey = a >> s;
            OP_SRA:  ey = $signed(a) >>> s;
            OP_ROTL: ey = (s == 0) ? a : ((a << s) | (a >> (32 - s)));
            OP_ROTR: ey = (s == 0) ? a : ((a >> s) | (a << (32 - s)));
            default: begin t = {a, c} >> s; ey = t[31:0]; end
          endcase
          `CHECK_EQ(y, ey, $sformatf("%s a=%h s=%0d", op.name(), a, s))
        end
      end
    end
    op = OP_ADD; a = $urandom; b = 3; #1;
    `CHECK_EQ(y, 32'h0, "non-shift op gives 0")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

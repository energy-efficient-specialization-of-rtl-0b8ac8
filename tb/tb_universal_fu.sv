// tb_universal_fu: random legal schedules on the Universal FU. Single-cycle
// operations must be presented in their issue cycle, MUL/MADD/MSUB exactly one
// cycle later (two cycles through the PE output register), and FSHR must use
// the fourth operand port. The schedule never lets a MADD result and a
// single-cycle result meet, as the static schedule must guarantee.
`include "tb_util.svh"
module tb_universal_fu;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  int n_madd = 0, n_single = 0, n_fshr = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fu_op_e      op;
  logic [31:0] a, b, c, d, y;
  logic        pred, yv, flag, fv;

  universal_fu dut (.clk(clk), .rst_n(rst_n), .op(op), .a(a), .b(b), .c(c), .d(d), .pred(pred),
                    .y(y), .y_valid(yv), .flag(flag), .flag_valid(fv));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        pend_v;     // MADD issued last cycle
    logic [31:0] pend_y;
    logic [63:0] t;
    op = OP_NOP; a = 0; b = 0; c = 0; d = 0; pred = 0;
    pend_v = 0; pend_y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 1500; n++) begin
      logic [31:0] ey;
      logic        ev, issue_madd;
      a = $urandom; b = $urandom; c = $urandom; d = $urandom; pred = $urandom;
      // after a MADD the next cycle may hold only another MADD or nothing
      if (pend_v) op = ($urandom_range(0, 1) == 0) ? OP_NOP : fu_op_e'($urandom_range(22, 24));
      else        op = fu_op_e'($urandom_range(0, 24));
      issue_madd = op inside {OP_MUL, OP_MADD, OP_MSUB};
      t = {a, d} >> b[4:0];
      case (op)
        OP_ADD:  ey = a + b;
        OP_SUB:  ey = a - b;
        OP_XOR:  ey = a ^ b;
        OP_SEL:  ey = pred ? a : b;
        OP_LTU:  ey = 32'(a < b);
        OP_SRA:  ey = $signed(a) >>> b[4:0];
        OP_FSHR: ey = t[31:0];
        default: ey = 'x;
      endcase
      #1;
      ev = pend_v || (op inside {[OP_ADD:OP_FSHR]});
      `CHECK_EQ(yv, ev, $sformatf("y_valid n=%0d op=%s", n, op.name()))
      if (pend_v) begin
        `CHECK_EQ(y, pend_y, $sformatf("madd result n=%0d", n))
        n_madd++;
      end else if (op inside {OP_ADD, OP_SUB, OP_XOR, OP_SEL, OP_LTU, OP_SRA, OP_FSHR}) begin
        `CHECK_EQ(y, ey, $sformatf("single result %s", op.name()))
        n_single++;
        if (op == OP_FSHR) n_fshr++;
      end
      `CHECK_EQ(fv, (op inside {[OP_EQ:OP_LEU]}), "flag_valid")
      if (op == OP_LTU) `CHECK_EQ(flag, (a < b), "flag LTU")
      pend_v = issue_madd;
      if (issue_madd) begin
        logic [31:0] p;
        p = a * b;
        pend_y = (op == OP_MUL) ? p : (op == OP_MADD) ? p + c : p - c;
      end
      @(negedge clk);
    end
    if (n_madd < 10 || n_single < 10 || n_fshr < 2) begin
      failures++;
      $display("FAIL coverage madd=%0d single=%0d fshr=%0d", n_madd, n_single, n_fshr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

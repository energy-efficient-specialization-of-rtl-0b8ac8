// tb_pe: drives a Universal PE, an S-ALU PE and a MADD PE with per-cycle
// configurations and checks operand sourcing (crossbar, retiming register,
// private register file, own output), register-file rotation, result and
// predicate registers, and the 1-cycle (ALU) and 2-cycle (MADD) latencies.
`include "tb_util.svh"
module tb_pe;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pe_cfg_t                   cu, cs, cm;
  logic                      rotate, pred;
  logic [3:0][31:0]          x;
  logic [31:0]               ou, os, om;
  logic                      fu_, fs, fm;

  pe #(.KIND(FU_UNIVERSAL)) dut_u (.clk(clk), .rst_n(rst_n), .cfg(cu), .rotate(rotate), .xin(x), .pred_in(pred), .out(ou), .flag_out(fu_));
  pe #(.KIND(FU_SALU))      dut_s (.clk(clk), .rst_n(rst_n), .cfg(cs), .rotate(rotate), .xin(x), .pred_in(pred), .out(os), .flag_out(fs));
  pe #(.KIND(FU_MADD))      dut_m (.clk(clk), .rst_n(rst_n), .cfg(cm), .rotate(rotate), .xin(x), .pred_in(pred), .out(om), .flag_out(fm));

  function automatic pe_cfg_t mk(fu_op_e op, opnd_src_e s0 = SRC_XBAR, opnd_src_e s1 = SRC_XBAR,
                                 opnd_src_e s2 = SRC_XBAR);
    pe_cfg_t c;
    c = '0;
    c.op = op; c.src[0] = s0; c.src[1] = s1; c.src[2] = s2;
    return c;
  endfunction

  // apply inputs after the falling edge, let one rising edge pass
  task automatic step(input logic [31:0] x0, x1, x2 = 0, x3 = 0);
    x[0] = x0; x[1] = x1; x[2] = x2; x[3] = x3;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cu = '0; cs = '0; cm = '0; rotate = 0; pred = 0; x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // crossbar operands, one-cycle latency
    cu = mk(OP_ADD); cs = mk(OP_SUB);
    step(5, 7);
    `CHECK_EQ(ou, 32'd12, "U ADD from crossbar")
    `CHECK_EQ(os, -32'd2, "S SUB from crossbar")
    // own output as operand; store old result in the private register file
    cu = mk(OP_ADD, SRC_SELF, SRC_XBAR); cu.lrf_we = 1; cu.lrf_waddr = 2;
    cs = mk(OP_SLL, SRC_SELF, SRC_XBAR);
    step(0, 3);
    `CHECK_EQ(ou, 32'd15, "U ADD with own output")
    `CHECK_EQ(os, 32'hFFFF_FFF0, "S SLL with own output")
    // private register file operand
    cu = mk(OP_SUB, SRC_LRF, SRC_SELF); cu.lrf_raddr = 2;
    cs = '0;
    step(0, 0);
    `CHECK_EQ(ou, -32'd3, "U SUB LRF[2]-self")
    `CHECK_EQ(os, 32'hFFFF_FFF0, "S holds on NOP")
    // input retiming register
    cu = mk(OP_NOP); cu.retime_en[0] = 1; cu.retime_en[1] = 1;
    step(100, 200);
    `CHECK_EQ(ou, -32'd3, "U holds on NOP")
    cu = mk(OP_ADD, SRC_RETIME, SRC_XBAR);
    step(1, 11);
    `CHECK_EQ(ou, 32'd111, "U ADD retimed + crossbar")
    // two-cycle MADD in the Universal PE and the MADD PE
    cu = mk(OP_MADD); cm = mk(OP_MSUB);
    step(3, 4, 5);
    `CHECK_EQ(ou, 32'd111, "U MADD not yet visible after 1 cycle")
    `CHECK_EQ(om, 32'd0, "M MSUB not yet visible after 1 cycle")
    cu = mk(OP_NOP); cm = mk(OP_MUL);
    step(6, 7, 8);
    `CHECK_EQ(ou, 32'd17, "U MADD after 2 cycles")
    `CHECK_EQ(om, 32'd7, "M MSUB after 2 cycles")
    cm = mk(OP_MADD, SRC_SELF, SRC_XBAR, SRC_RETIME); cm.retime_en[2] = 1;
    step(0, 2, 9);
    `CHECK_EQ(om, 32'd42, "M MUL after 2 cycles")
    cm = '0;
    step(0, 0);
    // the retiming register loads 9 only at the issue edge, so the old 0 is used
    `CHECK_EQ(om, 32'd14, "M MADD self(7)*2+retimed(0)")
    cm = mk(OP_ADD, SRC_RETIME, SRC_XBAR);
    step(0, 1);
    step(0, 0);
    `CHECK_EQ(om, 32'd14, "MADD PE ignores ALU operations")
    cm = mk(OP_MADD, SRC_XBAR, SRC_XBAR, SRC_RETIME);
    step(10, 10, 0);
    cm = '0;
    step(0, 0);
    `CHECK_EQ(om, 32'd109, "M MADD 10*10+retimed(9)")
    // comparisons set the predicate register; select uses the predicate input
    cu = mk(OP_LT); cs = mk(OP_EQ);
    step(-32'd5, 3);
    `CHECK_EQ(fu_, 1'b1, "U LT flag")
    `CHECK_EQ(fs, 1'b0, "S EQ flag")
    `CHECK_EQ(ou, 32'd1, "U LT word")
    cu = mk(OP_SEL); cs = mk(OP_SEL); pred = 1;
    step(77, 88);
    `CHECK_EQ(ou, 32'd77, "U SEL pred=1")
    `CHECK_EQ(fu_, 1'b1, "flag held by non-compare")
    pred = 0;
    step(77, 88);
    `CHECK_EQ(os, 32'd88, "S SEL pred=0")
    // S-ALU refuses MADD: output holds
    cs = mk(OP_MADD);
    step(2, 2, 2);
    step(2, 2, 2);
    `CHECK_EQ(os, 32'd88, "S-ALU ignores MADD")
    // rotation of the private register file
    cu = mk(OP_PASS); step(32'hBEEF, 0);
    cu = mk(OP_NOP); cu.lrf_we = 1; cu.lrf_waddr = 5; rotate = 1; step(0, 0);
    rotate = 0;
    cu = mk(OP_PASS, SRC_LRF); cu.lrf_raddr = 6; step(0, 0);
    `CHECK_EQ(ou, 32'hBEEF, "LRF value renamed r5 -> r6 after rotation")
    // random one-cycle operations on the S-ALU PE from the crossbar
    for (int n = 0; n < 300; n++) begin
      logic [31:0] a, b, e;
      a = $urandom; b = $urandom;
      cs = mk(($urandom_range(0, 1) == 0) ? OP_XOR : OP_ROTR);
      e = (cs.op == OP_XOR) ? a ^ b : 32'({a, a} >> b[4:0]);
      step(a, b);
      `CHECK_EQ(os, e, "S random")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

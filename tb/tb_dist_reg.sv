// tb_dist_reg: checks load-when-enabled, hold otherwise, and reset.
`include "tb_util.svh"
module tb_dist_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        en;
  logic [31:0] d, q, model;

  dist_reg #(.WIDTH(32)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; d = 32'h1234;
    repeat (2) @(posedge clk);
    #1 `CHECK_EQ(q, 32'h0, "reset value")
    rst_n = 1; model = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk); en = $urandom; d = $urandom;
      if (en) model = d;
      @(negedge clk); en = 0;
      `CHECK_EQ(q, model, "q")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

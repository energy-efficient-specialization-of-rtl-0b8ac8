// tb_context_ctrl: loads distinct context words, runs with several loop
// lengths and checks the context sequence, the word presented each cycle,
// the rotate pulse once per iteration, and the all-zero word when stopped.
`include "tb_util.svh"
module tb_context_ctrl;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cfg_we, run, rotate;
  logic [3:0] cfg_waddr, ctx_last, ctx;
  ctx_cfg_t   cfg_wdata, cfg;
  ctx_cfg_t   words [16];

  context_ctrl #(.NUM_CTX(16)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_waddr(cfg_waddr), .cfg_wdata(cfg_wdata),
    .run(run), .ctx_last(ctx_last), .cfg(cfg), .ctx(ctx), .rotate(rotate));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; run = 0; cfg_waddr = 0; cfg_wdata = '0; ctx_last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      for (int w = 0; w < $bits(ctx_cfg_t); w += 32) words[i][w +: 32] = $urandom;
      @(negedge clk); cfg_we = 1; cfg_waddr = 4'(i); cfg_wdata = words[i];
    end
    @(negedge clk); cfg_we = 0;
    `CHECK_EQ(cfg, ctx_cfg_t'(0), "idle word while stopped")
    `CHECK_EQ(rotate, 1'b0, "no rotate while stopped")
    for (int L = 0; L < 16; L += 5) begin : loop_len
      int rot;
      ctx_last = 4'(L); run = 1; rot = 0;
      for (int cyc = 0; cyc < 3 * (L + 1); cyc++) begin
        #1;
        `CHECK_EQ(ctx, 4'(cyc % (L + 1)), $sformatf("ctx L=%0d cyc=%0d", L, cyc))
        `CHECK_EQ(cfg, words[cyc % (L + 1)], "context word")
        `CHECK_EQ(rotate, (cyc % (L + 1)) == L, "rotate at last context")
        if (rotate) rot++;
        @(negedge clk);
      end
      `CHECK_EQ(rot, 3, "one rotate per iteration")
      run = 0;
      @(negedge clk);
      `CHECK_EQ(ctx, 4'(0), "counter back to 0 when stopped")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_crossbar: random sources and selects on the cluster's word crossbar
// size, including out-of-range selects (which must give 0), and a 1-bit
// instance.
`include "tb_util.svh"
module tb_crossbar;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NS = 14, NK = 25;
  logic [NS-1:0][31:0] src;
  logic [NK-1:0][3:0]  sel;
  logic [NK-1:0][31:0] snk;
  logic [7:0]          bsrc;
  logic [11:0][2:0]    bsel;
  logic [11:0]         bsnk;

  crossbar #(.N_SRC(NS), .N_SINK(NK), .W(32)) dut (.src(src), .sel(sel), .snk(snk));
  crossbar #(.N_SRC(8), .N_SINK(12), .W(1)) dut_b (.src(bsrc), .sel(bsel), .snk(bsnk));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int s = 0; s < NS; s++) src[s] = $urandom;
      for (int k = 0; k < NK; k++) sel[k] = 4'($urandom);
      bsrc = $urandom;
      for (int k = 0; k < 12; k++) bsel[k] = 3'($urandom);
      #1;
      for (int k = 0; k < NK; k++)
        `CHECK_EQ(snk[k], (sel[k] < NS) ? src[sel[k]] : 32'h0, $sformatf("sink %0d sel %0d", k, sel[k]))
      for (int k = 0; k < 12; k++)
        `CHECK_EQ(bsnk[k], bsrc[bsel[k]], $sformatf("bit sink %0d", k))
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lut3_pe: checks every input combination for random truth tables and
// for AND3 / OR3 / majority, the registered output, and hold when disabled.
`include "tb_util.svh"
module tb_lut3_pe;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       en, out, model;
  logic [7:0] tt;
  logic [2:0] in;

  lut3_pe dut (.clk(clk), .rst_n(rst_n), .en(en), .tt(tt), .in(in), .out(out));

  function automatic logic f(int k, logic [2:0] x, logic [7:0] t);
    case (k)
      0: return x[0] & x[1] & x[2];
      1: return x[0] | x[1] | x[2];
      2: return (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
      default: return t[{x[2], x[1], x[0]}];
    endcase
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; tt = 0; in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; model = 0;
    for (int k = 0; k < 20; k++) begin
      logic [7:0] t;
      t = (k == 0) ? 8'h80 : (k == 1) ? 8'hFE : (k == 2) ? 8'hE8 : 8'($urandom);
      for (int x = 0; x < 8; x++) begin
        @(negedge clk); en = 1; tt = t; in = 3'(x);
        model = f(k, 3'(x), t);
        @(negedge clk); en = 0; tt = ~t; in = ~in;
        `CHECK_EQ(out, model, $sformatf("lut k=%0d x=%0d", k, x))
        @(negedge clk);
        `CHECK_EQ(out, model, "hold when disabled")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_mem: random reads and writes against an associative-array model;
// checks the one-cycle read latency and that rdata holds when idle.
`include "tb_util.svh"
module tb_data_mem;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        en, we;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] model [int];
  logic [31:0] last;

  data_mem #(.DEPTH(1024), .WIDTH(32)) dut (.clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    // initialise a window of 32 words (upper address bits must be ignored)
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 32'h0001_0000 | (i * 29); wdata = $urandom;
      model[(i * 29) % 1024] = wdata;
    end
    @(negedge clk); en = 0; we = 0;
    last = 0;
    for (int n = 0; n < 2000; n++) begin
      int w;
      w = ($urandom_range(0, 31) * 29) % 1024;
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0); we = en && ($urandom_range(0, 2) == 0);
      addr = w; wdata = $urandom;
      @(negedge clk);
      if (en && !we) begin
        `CHECK_EQ(rdata, model[w], $sformatf("read %0d", w))
        last = model[w];
      end else begin
        `CHECK_EQ(rdata, last, "rdata holds")
      end
      if (en && we) model[w] = wdata;
      en = 0; we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

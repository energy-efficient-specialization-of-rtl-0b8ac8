// tb_rotating_rf: compares the rotating register file with a reference model
// that keeps a list of physical entries and a base, under random writes,
// reads and rotations; also checks the renaming rule directly: a value
// written to logical r is found at logical r+1 after one rotation.
`include "tb_util.svh"
module tb_rotating_rf;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int D = 8, NR = 2;
  logic              rotate, we;
  logic [2:0]        waddr;
  logic [31:0]       wdata;
  logic [NR-1:0][2:0]  raddr;
  logic [NR-1:0][31:0] rdata;

  rotating_rf #(.DEPTH(D), .NRD(NR), .WIDTH(32)) dut (
    .clk(clk), .rst_n(rst_n), .rotate(rotate), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata));

  logic [31:0] model [D];
  int          mbase;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rotate = 0; we = 0; waddr = 0; wdata = 0; raddr = '0; mbase = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill every logical register
    for (int r = 0; r < D; r++) begin
      @(negedge clk); we = 1; waddr = 3'(r); wdata = 32'hA000 + r;
      model[r] = wdata;
    end
    @(negedge clk); we = 0;
    // renaming rule
    @(negedge clk); we = 1; waddr = 3; wdata = 32'hCAFE; rotate = 1;
    model[(3 + mbase) % D] = 32'hCAFE; mbase = (mbase + D - 1) % D;
    @(negedge clk); we = 0; rotate = 0; raddr[0] = 4; raddr[1] = 3; #1;
    `CHECK_EQ(rdata[0], 32'hCAFE, "value moved from r3 to r4 after rotation")
    `CHECK_EQ(rdata[1], 32'hA002, "r3 now names old r2")
    // random traffic
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = $urandom; waddr = $urandom; wdata = $urandom; rotate = ($urandom_range(0, 3) == 0);
      raddr[0] = $urandom; raddr[1] = $urandom;
      #1;
      `CHECK_EQ(rdata[0], model[(int'(raddr[0]) + mbase) % D], "read port 0")
      `CHECK_EQ(rdata[1], model[(int'(raddr[1]) + mbase) % D], "read port 1")
      if (we) model[(int'(waddr) + mbase) % D] = wdata;
      if (rotate) mbase = (mbase + D - 1) % D;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rotating_rf: rotating register file for modulo-scheduled loops.
//
// A logical register index r maps to physical entry (r + base) mod DEPTH.
// `rotate`, pulsed once per loop iteration, decrements base, so a value
// written to logical r in one iteration is read as logical r+1 in the next;
// each iteration thus gets fresh names for its long-lived values. One write
// port (taking effect at the clock edge, using the base before a rotation at
// that same edge) and NRD combinational read ports. DEPTH must be a power of
// two. The rotating register file itself follows the source architecture; sizes, port
// counts and the rotation direction are this design's choices. The base is
// reset to 0; the contents are not reset.
module rotating_rf #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NRD   = 1,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      rotate,
  input  logic                      we,
  input  logic [AW-1:0]             waddr,
  input  logic [WIDTH-1:0]          wdata,
  input  logic [NRD-1:0][AW-1:0]    raddr,
  output logic [NRD-1:0][WIDTH-1:0] rdata
);

  if ((1 << AW) != DEPTH) begin : g_bad_depth
    $error("rotating_rf: DEPTH must be a power of two");
  end

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      base <= '0;
    else if (rotate) base <= base - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr + base] <= wdata;
  end

  for (genvar r = 0; r < NRD; r++) begin : g_rd
    assign rdata[r] = mem[raddr[r] + base];
  end

endmodule

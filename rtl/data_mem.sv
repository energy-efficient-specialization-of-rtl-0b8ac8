// data_mem: single-port data memory of the cluster.
//
// One access per cycle when `en` is high: a write stores `wdata` at `addr`,
// a read returns the word at `addr` on `rdata` after the clock edge (one cycle
// of latency); `rdata` holds between reads and is not changed by a write. Only
// the low log2(DEPTH) bits of the 32-bit address taken from the crossbar are
// used. The memory is named by the source architecture; depth, the single port and the
// timing are this design's choices. Contents are not reset.
module data_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [WIDTH-1:0] addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    a;

  assign a = addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[a] <= wdata;
      else    rdata  <= mem[a];
    end
  end

endmodule

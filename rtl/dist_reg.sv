// dist_reg: distributed register on the cluster crossbar.
//
// Loads `d` (a crossbar sink) at the clock edge when its context bit `en` is
// set and otherwise holds; `q` is a crossbar source, so a value can wait here
// for any number of cycles without occupying a PE. Reset to zero. The
// register is named by the source architecture; its load-enable behaviour is this
// design's choice.
module dist_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule

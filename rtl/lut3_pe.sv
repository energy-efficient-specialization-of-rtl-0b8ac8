// lut3_pe: functional unit of the 1-bit control path.
//
// A 3-input lookup table: the result is bit {in[2], in[1], in[0]} of the
// 8-bit truth table `tt` from the context word, so any 3-input Boolean
// function of predicates can be formed each cycle. The result is registered
// when `en` is set (one cycle of latency) and held otherwise; reset to 0. The
// LUT3 follows the source architecture; the bit order, register and enable are this
// design's choices.
module lut3_pe (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] tt,
  input  logic [2:0] in,
  output logic       out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  out <= 1'b0;
    else if (en) out <= tt[in];
  end

endmodule

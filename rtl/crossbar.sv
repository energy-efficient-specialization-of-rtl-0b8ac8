// crossbar: configurable full crossbar.
//
// Each of the N_SINK outputs takes the source named by its select field;
// a select beyond the last source gives 0. Combinational: one multiplexer per
// sink. The selects come from the context word and so change every cycle.
// The cluster uses one instance for the 32-bit datapath and one for the 1-bit
// predicate path; as in the source architecture there are more sinks than sources.
module crossbar #(
  parameter int unsigned N_SRC  = 14,
  parameter int unsigned N_SINK = 25,
  parameter int unsigned W      = 32,
  localparam int unsigned SW    = (N_SRC > 1) ? $clog2(N_SRC) : 1
) (
  input  logic [N_SRC-1:0][W-1:0]   src,
  input  logic [N_SINK-1:0][SW-1:0] sel,
  output logic [N_SINK-1:0][W-1:0]  snk
);

  for (genvar k = 0; k < N_SINK; k++) begin : g_sink
    assign snk[k] = (32'(sel[k]) < N_SRC) ? src[sel[k]] : '0;
  end

endmodule

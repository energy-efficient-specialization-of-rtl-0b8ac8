// context_ctrl: configuration memory and context sequencer.
//
// The cluster is statically scheduled and reconfigured every cycle. This
// block holds NUM_CTX context words (ctx_cfg_t), loaded one at a time through
// cfg_we/cfg_waddr/cfg_wdata, and, while `run` is high, steps a counter
// 0, 1, ..., ctx_last, 0, ... one context per cycle: a loop body with
// initiation interval ctx_last+1. `cfg` is the word of the current context
// (asynchronous read). `rotate` is high during the last context of each
// iteration, so rotating register files advance at the end of the iteration.
// While `run` is low the counter returns to 0 and `cfg` is all zeros: every
// PE idles and nothing is written. The per-cycle reconfiguration follows the
// source architecture; the memory organisation and the counter are this design's choices.
module context_ctrl
  import cgra_pkg::*;
#(
  parameter int unsigned NUM_CTX = 16,
  localparam int unsigned CAW    = (NUM_CTX > 1) ? $clog2(NUM_CTX) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cfg_we,
  input  logic [CAW-1:0] cfg_waddr,
  input  ctx_cfg_t       cfg_wdata,
  input  logic           run,
  input  logic [CAW-1:0] ctx_last,
  output ctx_cfg_t       cfg,
  output logic [CAW-1:0] ctx,
  output logic           rotate
);

  ctx_cfg_t mem [NUM_CTX];
  logic     wrap;

  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_waddr] <= cfg_wdata;
  end

  assign wrap = (ctx == ctx_last) || (32'(ctx) >= NUM_CTX - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ctx <= '0;
    else if (!run)  ctx <= '0;
    else if (wrap)  ctx <= '0;
    else            ctx <= ctx + 1'b1;
  end

  assign cfg    = run ? mem[ctx] : '0;
  assign rotate = run && wrap;

endmodule

// Shared pieces of the kernel testbenches that program a cgra_cluster: the
// cluster instance with its port signals, a task that loads a program, and a
// helper giving the word-crossbar sink index of PE p's operand port i.
// Crossbar select ZERO (15) is past the last source and reads as 0.
`ifndef TB_CLUSTER_UTIL_SVH
`define TB_CLUSTER_UTIL_SVH
`define CLUSTER_INSTANCE \
  logic        cfg_we, run, iter_done; \
  logic [3:0]  cfg_waddr, ctx_last, ctx; \
  ctx_cfg_t    cfg_wdata; \
  logic [NUM_GRID_IN-1:0][31:0]  grid_in; \
  logic [NUM_GRID_OUT-1:0][31:0] grid_out; \
  logic [NUM_GRID_BIN-1:0]       grid_bin; \
  logic [NUM_GRID_BOUT-1:0]      grid_bout; \
  cgra_cluster dut ( \
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_waddr(cfg_waddr), .cfg_wdata(cfg_wdata), \
    .run(run), .ctx_last(ctx_last), .ctx(ctx), .iter_done(iter_done), \
    .grid_in(grid_in), .grid_out(grid_out), .grid_bin(grid_bin), .grid_bout(grid_bout)); \
  function automatic int wpe(int p, int i); return WK_PE + p * PE_MAX_IN + i; endfunction \
  localparam logic [W_SW-1:0] ZERO = '1; \
  task automatic load_program(input ctx_cfg_t words [], input int n); \
    for (int k = 0; k < n; k++) begin \
      @(negedge clk); cfg_we = 1; cfg_waddr = 4'(k); cfg_wdata = words[k]; \
    end \
    @(negedge clk); cfg_we = 0; ctx_last = 4'(n - 1); \
  endtask
`endif

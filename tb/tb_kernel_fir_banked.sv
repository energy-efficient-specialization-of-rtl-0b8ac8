// tb_kernel_fir_banked: a 6-tap FIR filter with samples and coefficients in
// the two data-memory banks, one tap per cycle (initiation interval 8).
//
// A one-context set-up program writes the coefficients into bank 1. The
// cluster is then reprogrammed with the filter loop:
//   context 0    : x[n] from the grid is stored in bank 0 at address n;
//                  PE2 loads the sample pointer n, PE3 the coefficient
//                  pointer 0
//   contexts 1-6 : both banks are read in the same cycle (bank 0 at PE2,
//                  bank 1 at PE3); PE2 counts down, PE3 counts up
//   contexts 2-7 : tap j multiply-adds on PE0 (even j) or PE1 (odd j), each
//                  PE accumulating onto its own result two cycles later
//   next context 1: PE0 adds the two partial sums; y[n] leaves on grid_out[0]
//                  in context 2
// Bank 0 addresses wrap modulo its depth, so the buffer is circular; the
// first outputs, whose older samples were never written, are not checked.
// The kernel is one of those the source architecture was evaluated with; the
// problem size, the exact form of the algorithm and the schedule are this
// design's own.
`include "tb_util.svh"
`include "tb_cluster_util.svh"
module tb_kernel_fir_banked;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `CLUSTER_INSTANCE

  localparam int T = 6, II = T + 2, N = 150;
  logic [31:0] h [T], x [N];
  ctx_cfg_t    setup_p [], loop_p [];

  function automatic ctx_cfg_t setup_ctx();
    ctx_cfg_t c;
    c = '0;
    c.dmem_en[1] = 1'b1; c.dmem_we[1] = 1'b1;
    c.wsel[WK_DADDR + 1] = W_SW'(WS_GRID + 0);
    c.wsel[WK_DWDAT + 1] = W_SW'(WS_GRID + 1);
    return c;
  endfunction

  function automatic ctx_cfg_t loop_ctx(int k);
    ctx_cfg_t c;
    c = '0;
    if (k == 0) begin
      c.dmem_en[0] = 1'b1; c.dmem_we[0] = 1'b1;               // x[n] -> bank 0
      c.wsel[WK_DADDR + 0] = W_SW'(WS_GRID + 1);
      c.wsel[WK_DWDAT + 0] = W_SW'(WS_GRID + 0);
      c.pe[2].op = OP_PASS;
      c.wsel[wpe(2, 0)] = W_SW'(WS_GRID + 1);
      c.pe[3].op = OP_PASS;
      c.wsel[wpe(3, 0)] = ZERO;
    end
    if (k >= 1 && k <= T) begin
      c.imm = 1;
      c.dmem_en = 2'b11;                                       // x[n-j], h[j]
      c.wsel[WK_DADDR + 0] = W_SW'(WS_PE + 2);
      c.wsel[WK_DADDR + 1] = W_SW'(WS_PE + 3);
      c.pe[2].op = OP_SUB;
      c.pe[2].src[0] = SRC_SELF;
      c.wsel[wpe(2, 1)] = W_SW'(WS_IMM);
      c.pe[3].op = OP_ADD;
      c.pe[3].src[0] = SRC_SELF;
      c.wsel[wpe(3, 1)] = W_SW'(WS_IMM);
    end
    if (k >= 2 && k <= T + 1) begin
      int j, u;
      j = k - 2; u = j % 2;
      c.pe[u].op = OP_MADD;
      c.wsel[wpe(u, 0)] = W_SW'(WS_DMEM + 0);
      c.wsel[wpe(u, 1)] = W_SW'(WS_DMEM + 1);
      if (j < 2) c.wsel[wpe(u, 2)] = ZERO;
      else       c.pe[u].src[2] = SRC_SELF;
    end
    if (k == 1) begin
      c.pe[0].op = OP_ADD;                                     // y[n-1]
      c.pe[0].src[0] = SRC_SELF;
      c.wsel[wpe(0, 1)] = W_SW'(WS_PE + 1);
    end
    if (k == 2) c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 0);
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, n_out;
    logic [31:0] y;
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 0; grid_in = '0; grid_bin = '0;
    foreach (h[k]) h[k] = $urandom_range(0, 2000) - 1000;
    foreach (x[n]) x[n] = $urandom;
    setup_p = new[1]; setup_p[0] = setup_ctx();
    loop_p  = new[II];
    foreach (loop_p[k]) loop_p[k] = loop_ctx(k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program(setup_p, 1);
    run = 1;
    for (int k = 0; k < T; k++) begin
      grid_in[0] = k; grid_in[1] = h[k];
      @(negedge clk);
    end
    run = 0;
    load_program(loop_p, II);
    cycles = 0; n_out = 0;
    for (int n = 0; n <= N; n++) begin
      grid_in[0] = (n < N) ? x[n] : 32'h0;
      grid_in[1] = n;
      run = 1;
      repeat (2) begin @(negedge clk); cycles++; end         // context 2
      if (n - 1 >= T - 1) begin
        y = 0;
        for (int j = 0; j < T; j++) y += h[j] * x[n - 1 - j];
        `CHECK_EQ(grid_out[0], y, $sformatf("y[%0d]", n - 1))
        n_out++;
      end
      repeat (II - 2) begin @(negedge clk); cycles++; end
    end
    run = 0;
    `CHECK_EQ(n_out, N - T + 1, "outputs checked")
    `CHECK_EQ(cycles, (N + 1) * II, "one tap per cycle")
    $display("banked fir: %0d taps, %0d samples, %0d cycles", T, N, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_kernel_fir: a 4-tap FIR filter y[n] = h0 x[n] + h1 x[n-1] + h2 x[n-2]
// + h3 x[n-3] on one cluster, initiation interval 4.
//
// The delay line is the cluster-wide rotating register file: x[n] is written
// to logical 0 each iteration, and after k rotations it is read as logical k.
// Both Universal PEs multiply in context 0 and multiply-add onto their own
// result in context 2 (two-cycle MADD, pipelined across iterations); PE2 adds
// the two partial sums in the next iteration's context 0. h0 and h2 come from
// the per-context immediate, h1 and h3 from grid inputs 2 and 3, and y[n-1]
// leaves on grid_out[0] in context 1 of iteration n. Results are compared with
// a direct evaluation of the sum; the first three outputs, which depend on
// register-file contents from before the run, are not checked.
// The kernel is one of those the source architecture was evaluated with; the
// problem size, the exact form of the algorithm and the schedule are this
// design's own.
`include "tb_util.svh"
`include "tb_cluster_util.svh"
module tb_kernel_fir;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `CLUSTER_INSTANCE

  localparam int N = 300;
  logic [31:0] h [4];
  logic [31:0] x [N];
  ctx_cfg_t    p [];

  function automatic ctx_cfg_t ctxw(int k);
    ctx_cfg_t c;
    c = '0;
    if (k == 0) begin
      c.imm = h[0];
      c.pe[0].op = OP_MUL;                               // x[n] * h0
      c.wsel[wpe(0, 0)] = W_SW'(WS_GRID + 0);
      c.wsel[wpe(0, 1)] = W_SW'(WS_IMM);
      c.pe[1].op = OP_MUL;                               // x[n-1] * h1
      c.crf_raddr[0] = 1;
      c.wsel[wpe(1, 0)] = W_SW'(WS_CRF + 0);
      c.wsel[wpe(1, 1)] = W_SW'(WS_GRID + 2);
      c.crf_we = 1; c.crf_waddr = 0;                     // delay line <- x[n]
      c.wsel[WK_CRF] = W_SW'(WS_GRID + 0);
      c.pe[2].op = OP_ADD;                               // y[n-1] = s0 + s1
      c.wsel[wpe(2, 0)] = W_SW'(WS_PE + 0);
      c.wsel[wpe(2, 1)] = W_SW'(WS_PE + 1);
    end else if (k == 1) begin
      c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 2);
    end else if (k == 2) begin
      c.imm = h[2];
      c.pe[0].op = OP_MADD;                              // + x[n-2] * h2
      c.crf_raddr[0] = 2;
      c.wsel[wpe(0, 0)] = W_SW'(WS_CRF + 0);
      c.wsel[wpe(0, 1)] = W_SW'(WS_IMM);
      c.pe[0].src[2] = SRC_SELF;
      c.pe[1].op = OP_MADD;                              // + x[n-3] * h3
      c.crf_raddr[1] = 3;
      c.wsel[wpe(1, 0)] = W_SW'(WS_CRF + 1);
      c.wsel[wpe(1, 1)] = W_SW'(WS_GRID + 3);
      c.pe[1].src[2] = SRC_SELF;
    end
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
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 0; grid_in = '0; grid_bin = '0;
    foreach (h[k]) h[k] = $urandom_range(0, 2000) - 1000;
    foreach (x[n]) x[n] = (n % 11 == 0) ? 32'h7FFF_FFFF : $urandom;
    p = new[4];
    foreach (p[k]) p[k] = ctxw(k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program(p, 4);
    grid_in[2] = h[1]; grid_in[3] = h[3];
    cycles = 0; n_out = 0;
    for (int n = 0; n <= N; n++) begin
      grid_in[0] = (n < N) ? x[n] : 32'h0;
      run = 1;
      `CHECK_EQ(ctx, 4'(0), "context 0")
      @(negedge clk); cycles++;
      if (n >= 4) begin
        int m;
        logic [31:0] y;
        m = n - 1;
        y = h[0] * x[m] + h[1] * x[m-1] + h[2] * x[m-2] + h[3] * x[m-3];
        `CHECK_EQ(grid_out[0], y, $sformatf("y[%0d]", m))
        n_out++;
      end
      repeat (3) begin @(negedge clk); cycles++; end
    end
    run = 0;
    `CHECK_EQ(cycles, (N + 1) * 4, "four cycles per output sample")
    if (n_out != N - 3) begin failures++; $display("FAIL outputs checked %0d", n_out); end
    $display("fir: %0d samples, %0d outputs checked, %0d cycles", N, n_out, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

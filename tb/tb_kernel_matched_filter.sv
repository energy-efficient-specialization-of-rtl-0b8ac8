// tb_kernel_matched_filter: a pulse-compression matched filter for a
// 7-chip Barker code followed by scaling and threshold detection, one input
// sample per iteration (initiation interval 4).
//
// The filter taps are +1/-1, so they are compiled into the context words as
// ADD or SUB; no multiplier is needed. The delay line is the cluster-wide
// rotating register file (x[n-k] is logical entry k, both read ports used).
//   iteration n, contexts 0-3: PE3 and PE2 accumulate the signed taps
//   iteration n+1, context 0 : PE0 adds the two partial sums -> y[n]
//                  context 1 : PE1 scales y by an arithmetic shift (imm)
//                  context 2 : scaled value leaves on grid_out[0];
//                              PE0 compares it with the threshold (imm)
//                  context 3 : LUT3 gates the compare with a grid enable
//   iteration n+2, context 1 : the detection bit leaves on grid_bout[0]
// Input is small noise with a few embedded code words. Outputs whose delay
// line still holds values from before the run are not checked.
// The kernel is one of those the source architecture was evaluated with; the
// problem size, the exact form of the algorithm and the schedule are this
// design's own.
`include "tb_util.svh"
`include "tb_cluster_util.svh"
module tb_kernel_matched_filter;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `CLUSTER_INSTANCE

  localparam int N = 240, L = 7, II = 4, SHIFT = 2, THR = 500, AMP = 400;
  localparam int CODE [L] = '{1, 1, 1, -1, -1, 1, -1};
  int       h [L];                       // h[k] = CODE[L-1-k]
  int       x [N], y [N];
  logic     en [N];
  ctx_cfg_t p [];

  // PE pe adds or subtracts delay-line entry k onto its own result (or onto 0)
  function automatic void tap(ref ctx_cfg_t c, input int pe, input int k, input bit first, input int port);
    c.pe[pe].op = (h[k] > 0) ? OP_ADD : OP_SUB;
    if (first) c.wsel[wpe(pe, 0)] = ZERO;
    else       c.pe[pe].src[0] = SRC_SELF;
    if (k == 0) c.wsel[wpe(pe, 1)] = W_SW'(WS_GRID + 0);
    else begin
      c.crf_raddr[port] = CRF_AW'(k);
      c.wsel[wpe(pe, 1)] = W_SW'(WS_CRF + port);
    end
  endfunction

  function automatic ctx_cfg_t ctxw(int k);
    ctx_cfg_t c;
    c = '0;
    case (k)
      0: begin
        c.crf_we = 1; c.crf_waddr = 0;                        // delay line <- x[n]
        c.wsel[WK_CRF] = W_SW'(WS_GRID + 0);
        tap(c, 3, 0, 1, 1);
        tap(c, 2, 1, 1, 0);
        c.pe[0].op = OP_ADD;                                  // y[n-1]
        c.wsel[wpe(0, 0)] = W_SW'(WS_PE + 2);
        c.wsel[wpe(0, 1)] = W_SW'(WS_PE + 3);
      end
      1: begin
        tap(c, 2, 2, 0, 0);
        tap(c, 3, 3, 0, 1);
        c.imm = SHIFT;
        c.pe[1].op = OP_SRA;
        c.wsel[wpe(1, 0)] = W_SW'(WS_PE + 0);
        c.wsel[wpe(1, 1)] = W_SW'(WS_IMM);
        c.bsel[BK_GRID + 0] = B_SW'(BS_LUT + 0);
      end
      2: begin
        tap(c, 2, 4, 0, 0);
        tap(c, 3, 5, 0, 1);
        c.imm = THR;
        c.pe[0].op = OP_LT;                                   // THR < scaled
        c.wsel[wpe(0, 0)] = W_SW'(WS_IMM);
        c.wsel[wpe(0, 1)] = W_SW'(WS_PE + 1);
        c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 1);
      end
      3: begin
        tap(c, 2, 6, 0, 0);
        c.lut_en[0] = 1'b1;                                   // detect = above & enable
        c.lut_tt[0] = 8'h88;
        c.bsel[BK_LUT + 0] = B_SW'(BS_PE + 0);
        c.bsel[BK_LUT + 1] = B_SW'(BS_GRID + 0);
        c.bsel[BK_LUT + 2] = B_SW'(BS_GRID + 0);
      end
      default: ;
    endcase
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic detect(int m);
    return en[m] && ((y[m] >>> SHIFT) > THR);
  endfunction

  initial begin
    int cycles, n_det, n_pulse;
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 0; grid_in = '0; grid_bin = '0;
    foreach (h[k]) h[k] = CODE[L - 1 - k];
    foreach (x[n]) x[n] = $urandom_range(0, 100) - 50;
    n_pulse = 0;
    for (int s = 10; s + L < N; s += 17 + $urandom_range(0, 12)) begin
      for (int k = 0; k < L; k++) x[s + k] += AMP * CODE[k];
      n_pulse++;
    end
    foreach (en[n]) en[n] = ($urandom_range(0, 9) != 0);
    foreach (y[n]) begin
      y[n] = 0;
      for (int k = 0; k < L; k++) if (n - k >= 0) y[n] += h[k] * x[n - k];
    end
    p = new[II];
    foreach (p[k]) p[k] = ctxw(k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program(p, II);
    cycles = 0; n_det = 0;
    for (int n = 0; n <= N + 1; n++) begin
      grid_in[0] = (n < N) ? x[n] : 0;
      grid_bin[0] = (n >= 1 && n - 1 < N) ? en[n - 1] : 1'b0;
      run = 1;
      @(negedge clk); cycles++;                               // context 1
      if (n - 2 >= L - 1 && n - 2 < N) begin
        `CHECK_EQ(grid_bout[0], detect(n - 2), $sformatf("detect[%0d]", n - 2))
        n_det += int'(detect(n - 2));
      end
      @(negedge clk); cycles++;                               // context 2
      if (n - 1 >= L - 1 && n - 1 < N)
        `CHECK_EQ(grid_out[0], 32'(y[n - 1] >>> SHIFT), $sformatf("scaled y[%0d]", n - 1))
      repeat (II - 2) begin @(negedge clk); cycles++; end
    end
    run = 0;
    `CHECK_EQ(cycles, (N + 2) * II, "four cycles per sample")
    if (n_det == 0 || n_det > n_pulse) begin failures++; $display("FAIL %0d detections for %0d pulses", n_det, n_pulse); end
    $display("matched filter: %0d samples, %0d code words, %0d detections, %0d cycles", N, n_pulse, n_det, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

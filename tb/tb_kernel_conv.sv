// tb_kernel_conv: 3x3 2-D convolution with zero padding on one cluster, one
// filter tap per iteration (initiation interval 4), image in the data memory.
//
// A one-context store program first writes the W x W image (row-major at 0)
// from the grid. The cluster is then reprogrammed with the tap loop. For each
// tap the grid supplies the source row and column (row+dr, col+dc, which may
// be -1 or W at the border), the coefficient and a first-tap predicate.
//   context 0: PE2/PE3 check row < W and col < W (unsigned, so -1 fails too);
//              PE1 forms the address row*W + col with its MADD
//   context 1: LUT3 ANDs the two checks
//   context 2: memory read; PE2 selects coefficient or 0 (padding);
//              PE3 selects 0 or the running sum (first tap)
//   context 3: PE0 multiply-adds pixel * coefficient onto the sum
// Padding is done by zeroing the coefficient, so an out-of-image address is
// read but never used. A finished output pixel appears on grid_out[0] in
// context 1 of the following iteration.
// The kernel is one of those the source architecture was evaluated with; the
// problem size, the exact form of the algorithm and the schedule are this
// design's own.
`include "tb_util.svh"
`include "tb_cluster_util.svh"
module tb_kernel_conv;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `CLUSTER_INSTANCE

  localparam int W = 8, II = 4;
  int       img [W][W], coef [3][3];
  ctx_cfg_t store_p [], loop_p [];

  function automatic ctx_cfg_t store_ctx();
    ctx_cfg_t c;
    c = '0;
    c.dmem_en[0] = 1'b1; c.dmem_we[0] = 1'b1;
    c.wsel[WK_DADDR] = W_SW'(WS_GRID + 0);
    c.wsel[WK_DWDAT] = W_SW'(WS_GRID + 1);
    return c;
  endfunction

  function automatic ctx_cfg_t loop_ctx(int k);
    ctx_cfg_t c;
    c = '0;
    case (k)
      0: begin
        c.imm = W;
        c.pe[2].op = OP_LTU;                                  // row in range
        c.wsel[wpe(2, 0)] = W_SW'(WS_GRID + 0);
        c.wsel[wpe(2, 1)] = W_SW'(WS_IMM);
        c.pe[3].op = OP_LTU;                                  // column in range
        c.wsel[wpe(3, 0)] = W_SW'(WS_GRID + 1);
        c.wsel[wpe(3, 1)] = W_SW'(WS_IMM);
        c.pe[1].op = OP_MADD;                                 // address
        c.wsel[wpe(1, 0)] = W_SW'(WS_GRID + 0);
        c.wsel[wpe(1, 1)] = W_SW'(WS_IMM);
        c.wsel[wpe(1, 2)] = W_SW'(WS_GRID + 1);
      end
      1: begin
        c.lut_en[0] = 1'b1;                                   // inside = row_ok & col_ok
        c.lut_tt[0] = 8'h88;
        c.bsel[BK_LUT + 0] = B_SW'(BS_PE + 2);
        c.bsel[BK_LUT + 1] = B_SW'(BS_PE + 3);
        c.bsel[BK_LUT + 2] = B_SW'(BS_GRID + 0);
        c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 0);
      end
      2: begin
        c.dmem_en[0] = 1'b1;                                     // load pixel
        c.wsel[WK_DADDR] = W_SW'(WS_PE + 1);
        c.pe[2].op = OP_SEL;                                  // coefficient or 0
        c.bsel[BK_PE + 2] = B_SW'(BS_LUT + 0);
        c.wsel[wpe(2, 0)] = W_SW'(WS_GRID + 2);
        c.wsel[wpe(2, 1)] = ZERO;
        c.pe[3].op = OP_SEL;                                  // sum in = first ? 0 : sum
        c.bsel[BK_PE + 3] = B_SW'(BS_GRID + 0);
        c.wsel[wpe(3, 0)] = ZERO;
        c.wsel[wpe(3, 1)] = W_SW'(WS_PE + 0);
      end
      3: begin
        c.pe[0].op = OP_MADD;
        c.wsel[wpe(0, 0)] = W_SW'(WS_DMEM);
        c.wsel[wpe(0, 1)] = W_SW'(WS_PE + 2);
        c.wsel[wpe(0, 2)] = W_SW'(WS_PE + 3);
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

  initial begin
    int cycles, n_out, pend_r, pend_c, n_pad;
    logic [31:0] expect_o;
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 0; grid_in = '0; grid_bin = '0;
    foreach (img[r, q]) img[r][q] = $urandom_range(0, 255);
    foreach (coef[r, q]) coef[r][q] = $urandom_range(0, 20) - 10;
    store_p = new[1]; store_p[0] = store_ctx();
    loop_p  = new[II];
    foreach (loop_p[k]) loop_p[k] = loop_ctx(k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program(store_p, 1);
    run = 1;
    for (int w = 0; w < W * W; w++) begin
      grid_in[0] = w;
      grid_in[1] = img[w / W][w % W];
      @(negedge clk);
    end
    run = 0;
    load_program(loop_p, II);
    cycles = 0; n_out = 0; n_pad = 0; pend_r = -1; pend_c = -1;
    for (int e = 0; e <= W * W; e++) begin
      int r, q;
      r = e / W; q = e % W;
      for (int t = 0; t < 9; t++) begin
        int sr, sc;
        sr = r + t / 3 - 1; sc = q + t % 3 - 1;
        grid_in[0]  = sr;
        grid_in[1]  = sc;
        grid_in[2]  = coef[t / 3][t % 3];
        grid_bin[0] = (t == 0);
        if (e < W * W && (sr < 0 || sr >= W || sc < 0 || sc >= W)) n_pad++;
        run = 1;
        @(negedge clk); cycles++;
        if (t == 0 && pend_r >= 0) begin
          expect_o = 0;
          for (int u = 0; u < 9; u++) begin
            int yr, yc;
            yr = pend_r + u / 3 - 1; yc = pend_c + u % 3 - 1;
            if (yr >= 0 && yr < W && yc >= 0 && yc < W) expect_o += img[yr][yc] * coef[u / 3][u % 3];
          end
          `CHECK_EQ(grid_out[0], expect_o, $sformatf("out[%0d][%0d]", pend_r, pend_c))
          n_out++;
        end
        repeat (II - 1) begin @(negedge clk); cycles++; end
        if (e == W * W) break;   // one trailing iteration delivers the last pixel
      end
      pend_r = r; pend_c = q;
    end
    run = 0;
    `CHECK_EQ(n_out, W * W, "all output pixels checked")
    `CHECK_EQ(n_pad, 9 * W * W - (3 * W - 2) * (3 * W - 2), "padded taps exercised")
    `CHECK_EQ(cycles, (9 * W * W + 1) * II, "four cycles per tap")
    $display("conv: %0dx%0d image, 3x3 filter, %0d taps (%0d padded) in %0d cycles", W, W, 9 * W * W, n_pad, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

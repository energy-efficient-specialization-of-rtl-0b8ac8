// tb_kernel_kmeans: the assignment step of K-means clustering on one
// cluster, one (point, centroid) pair per iteration (initiation interval 8):
// each 2-D point is assigned to the centroid at the smallest squared
// Euclidean distance.
//   dx, dy  : SUB on the two S-ALU PEs
//   dx*dx, dy*dy : MUL on both Universal PEs at once, then ADD
//   arg-min : unsigned compare with the best distance so far (a distributed
//             register), combined in a LUT3 with "first centroid", then two
//             selects; the centroid counter lives in the other distributed
//             register and the best index in PE3's private register file,
//             carried across one rotation per iteration.
// The grid supplies the point, the centroid coordinates and the first/last
// centroid predicates. Running minima, indices and the final assignment of
// every point are compared with a reference.
// The kernel is one of those the source architecture was evaluated with; the
// problem size, the exact form of the algorithm and the schedule are this
// design's own.
`include "tb_util.svh"
`include "tb_cluster_util.svh"
module tb_kernel_kmeans;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `CLUSTER_INSTANCE

  localparam int K = 5, NPT = 40, II = 8;
  // coordinates stay within +/-17000 so every squared distance fits 32 bits
  int       cx [K], cy [K], px [NPT], py [NPT];
  ctx_cfg_t p [];

  function automatic ctx_cfg_t ctxw(int k);
    ctx_cfg_t c;
    c = '0;
    case (k)
      0: begin
        c.pe[2].op = OP_SUB;                                  // dx
        c.wsel[wpe(2, 0)] = W_SW'(WS_GRID + 0);
        c.wsel[wpe(2, 1)] = W_SW'(WS_GRID + 2);
        c.pe[3].op = OP_SUB;                                  // dy
        c.wsel[wpe(3, 0)] = W_SW'(WS_GRID + 1);
        c.wsel[wpe(3, 1)] = W_SW'(WS_GRID + 3);
      end
      1: begin
        c.pe[0].op = OP_MUL;                                  // dx*dx
        c.wsel[wpe(0, 0)] = W_SW'(WS_PE + 2);
        c.wsel[wpe(0, 1)] = W_SW'(WS_PE + 2);
        c.pe[1].op = OP_MUL;                                  // dy*dy
        c.wsel[wpe(1, 0)] = W_SW'(WS_PE + 3);
        c.wsel[wpe(1, 1)] = W_SW'(WS_PE + 3);
      end
      3: begin
        c.pe[2].op = OP_ADD;                                  // distance
        c.wsel[wpe(2, 0)] = W_SW'(WS_PE + 0);
        c.wsel[wpe(2, 1)] = W_SW'(WS_PE + 1);
      end
      4: begin
        c.pe[3].op = OP_LTU;                                  // dist < best
        c.wsel[wpe(3, 0)] = W_SW'(WS_PE + 2);
        c.wsel[wpe(3, 1)] = W_SW'(WS_DREG + 0);
        c.pe[1].op = OP_SEL;                                  // k = first ? 0 : counter
        c.bsel[BK_PE + 1] = B_SW'(BS_GRID + 0);
        c.wsel[wpe(1, 0)] = ZERO;
        c.wsel[wpe(1, 1)] = W_SW'(WS_DREG + 1);
      end
      5: begin
        c.lut_en[0] = 1'b1;                                   // update = less | first
        c.lut_tt[0] = 8'hEE;
        c.bsel[BK_LUT + 0] = B_SW'(BS_PE + 3);
        c.bsel[BK_LUT + 1] = B_SW'(BS_GRID + 0);
        c.bsel[BK_LUT + 2] = B_SW'(BS_GRID + 1);
      end
      6: begin
        c.imm = 1;
        c.pe[2].op = OP_SEL;                                  // best distance
        c.bsel[BK_PE + 2] = B_SW'(BS_LUT + 0);
        c.pe[2].src[0] = SRC_SELF;
        c.wsel[wpe(2, 1)] = W_SW'(WS_DREG + 0);
        c.pe[3].op = OP_SEL;                                  // best index
        c.bsel[BK_PE + 3] = B_SW'(BS_LUT + 0);
        c.wsel[wpe(3, 0)] = W_SW'(WS_PE + 1);
        c.pe[3].src[1] = SRC_LRF;
        c.pe[3].lrf_raddr = 1;
        c.pe[1].op = OP_ADD;                                  // counter + 1
        c.pe[1].src[0] = SRC_SELF;
        c.wsel[wpe(1, 1)] = W_SW'(WS_IMM);
      end
      7: begin
        c.dreg_en = 2'b11;
        c.wsel[WK_DREG + 0] = W_SW'(WS_PE + 2);
        c.wsel[WK_DREG + 1] = W_SW'(WS_PE + 1);
        c.pe[3].lrf_we = 1'b1;
        c.pe[3].lrf_waddr = 0;
        c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 2);
        c.wsel[WK_GRID + 1] = W_SW'(WS_PE + 3);
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
    int cycles, hist [K];
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 0; grid_in = '0; grid_bin = '0;
    foreach (cx[k]) begin cx[k] = $urandom_range(0, 30000) - 15000; cy[k] = $urandom_range(0, 30000) - 15000; end
    foreach (px[n]) begin
      int c;
      c = n % K;
      px[n] = cx[c] + $urandom_range(0, 4000) - 2000;
      py[n] = cy[c] + $urandom_range(0, 4000) - 2000;
    end
    hist = '{default: 0};
    p = new[II];
    foreach (p[k]) p[k] = ctxw(k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program(p, II);
    cycles = 0;
    for (int n = 0; n < NPT; n++) begin
      longint best;
      int bi;
      best = 0; bi = 0;
      for (int k = 0; k < K; k++) begin
        longint d;
        grid_in[0] = px[n]; grid_in[1] = py[n]; grid_in[2] = cx[k]; grid_in[3] = cy[k];
        grid_bin[0] = (k == 0); grid_bin[1] = (k == K - 1);
        run = 1;
        d = longint'(px[n] - cx[k]) * (px[n] - cx[k]) + longint'(py[n] - cy[k]) * (py[n] - cy[k]);
        if (k == 0 || d < best) begin best = d; bi = k; end
        repeat (II - 1) begin @(negedge clk); cycles++; end
        `CHECK_EQ(grid_out[0], 32'(best), $sformatf("best distance point %0d centroid %0d", n, k))
        `CHECK_EQ(grid_out[1], 32'(bi), $sformatf("best index point %0d centroid %0d", n, k))
        @(negedge clk); cycles++;
      end
      hist[bi]++;
    end
    run = 0;
    `CHECK_EQ(cycles, NPT * K * II, "eight cycles per distance")
    foreach (hist[k]) if (hist[k] == 0) begin failures++; $display("FAIL centroid %0d never chosen", k); end
    $display("k-means assignment: %0d points, %0d centroids, counts %p", NPT, K, hist);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

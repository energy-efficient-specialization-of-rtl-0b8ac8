// tb_kernel_motion_est: block-matching motion estimation on one cluster, one
// pixel per iteration (initiation interval 8). For each candidate position
// the sum of absolute differences (SAD) between the current block and the
// candidate block is accumulated; after the block's last pixel the best
// (smallest) SAD and its candidate index are kept.
//   |d| : SUB both ways, LT against 0 and SEL
//   SAD : a distributed register, replaced by 0 at the block start (SEL on a
//         grid predicate)
//   best: unsigned compare with the best so far, combined in a LUT3 with
//         "first candidate" (a PE comparison) and "last pixel" (a grid
//         predicate): update = last & (less | first)
//   index of the best: carried from iteration to iteration in PE2's private
//         register file, written at logical 0 and read one rotation later
//         at logical 1.
// The grid supplies the current and candidate pixels, the candidate index,
// and the two predicates. Every running SAD, best value and index is compared
// with a reference computed in the testbench.
// The kernel is one of those the source architecture was evaluated with; the
// problem size, the exact form of the algorithm and the schedule are this
// design's own.
`include "tb_util.svh"
`include "tb_cluster_util.svh"
module tb_kernel_motion_est;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `CLUSTER_INSTANCE

  localparam int BS = 4, NCAND = 9, II = 8, NPIX = BS * BS;
  int       cur [NPIX];
  int       cand [NCAND][NPIX];
  ctx_cfg_t p [];

  function automatic ctx_cfg_t ctxw(int k);
    ctx_cfg_t c;
    c = '0;
    case (k)
      0: begin
        c.pe[2].op = OP_SUB;                                  // d = cur - ref
        c.wsel[wpe(2, 0)] = W_SW'(WS_GRID + 0);
        c.wsel[wpe(2, 1)] = W_SW'(WS_GRID + 1);
        c.pe[3].op = OP_SUB;                                  // -d
        c.wsel[wpe(3, 0)] = W_SW'(WS_GRID + 1);
        c.wsel[wpe(3, 1)] = W_SW'(WS_GRID + 0);
        c.pe[1].op = OP_EQ;                                   // first candidate
        c.wsel[wpe(1, 0)] = W_SW'(WS_GRID + 2);
        c.wsel[wpe(1, 1)] = ZERO;
      end
      1: begin
        c.pe[0].op = OP_LT;                                   // d < 0
        c.wsel[wpe(0, 0)] = W_SW'(WS_PE + 2);
        c.wsel[wpe(0, 1)] = ZERO;
      end
      2: begin
        c.pe[1].op = OP_SEL;                                  // |d|
        c.bsel[BK_PE + 1] = B_SW'(BS_PE + 0);
        c.wsel[wpe(1, 0)] = W_SW'(WS_PE + 3);
        c.wsel[wpe(1, 1)] = W_SW'(WS_PE + 2);
        c.pe[2].op = OP_SEL;                                  // SAD in = start ? 0 : SAD
        c.bsel[BK_PE + 2] = B_SW'(BS_GRID + 0);
        c.wsel[wpe(2, 0)] = ZERO;
        c.wsel[wpe(2, 1)] = W_SW'(WS_DREG + 0);
      end
      3: begin
        c.pe[3].op = OP_ADD;                                  // SAD + |d|
        c.wsel[wpe(3, 0)] = W_SW'(WS_PE + 1);
        c.wsel[wpe(3, 1)] = W_SW'(WS_PE + 2);
      end
      4: begin
        c.dreg_en[0] = 1'b1;
        c.wsel[WK_DREG + 0] = W_SW'(WS_PE + 3);
        c.pe[0].op = OP_LTU;                                  // SAD < best
        c.wsel[wpe(0, 0)] = W_SW'(WS_PE + 3);
        c.wsel[wpe(0, 1)] = W_SW'(WS_DREG + 1);
      end
      5: begin
        c.lut_en[0] = 1'b1;                                   // last & (less | first)
        c.lut_tt[0] = 8'hE0;
        c.bsel[BK_LUT + 0] = B_SW'(BS_PE + 0);
        c.bsel[BK_LUT + 1] = B_SW'(BS_PE + 1);
        c.bsel[BK_LUT + 2] = B_SW'(BS_GRID + 1);
      end
      6: begin
        c.pe[1].op = OP_SEL;                                  // best
        c.bsel[BK_PE + 1] = B_SW'(BS_LUT + 0);
        c.wsel[wpe(1, 0)] = W_SW'(WS_PE + 3);
        c.wsel[wpe(1, 1)] = W_SW'(WS_DREG + 1);
        c.pe[2].op = OP_SEL;                                  // index of best
        c.bsel[BK_PE + 2] = B_SW'(BS_LUT + 0);
        c.wsel[wpe(2, 0)] = W_SW'(WS_GRID + 2);
        c.pe[2].src[1] = SRC_LRF;
        c.pe[2].lrf_raddr = 1;
      end
      7: begin
        c.dreg_en[1] = 1'b1;
        c.wsel[WK_DREG + 1] = W_SW'(WS_PE + 1);
        c.pe[2].lrf_we = 1'b1;
        c.pe[2].lrf_waddr = 0;
        c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 3);
        c.wsel[WK_GRID + 1] = W_SW'(WS_PE + 1);
        c.wsel[WK_GRID + 2] = W_SW'(WS_PE + 2);
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
    int best, best_idx, n_upd, cycles;
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 0; grid_in = '0; grid_bin = '0;
    foreach (cur[q]) cur[q] = $urandom_range(0, 255);
    foreach (cand[c, q]) cand[c][q] = (c == 5) ? cur[q] + $urandom_range(0, 4) - 2 : $urandom_range(0, 255);
    foreach (cand[c, q]) if (c == 2) cand[c][q] = cur[q] + $urandom_range(0, 40) - 20;
    p = new[II];
    foreach (p[k]) p[k] = ctxw(k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program(p, II);
    best = 0; best_idx = 0; n_upd = 0; cycles = 0;
    for (int c = 0; c < NCAND; c++) begin
      int sad;
      sad = 0;
      for (int q = 0; q < NPIX; q++) begin
        grid_in[0] = cur[q]; grid_in[1] = cand[c][q]; grid_in[2] = c;
        grid_bin[0] = (q == 0); grid_bin[1] = (q == NPIX - 1);
        run = 1;
        sad += (cur[q] > cand[c][q]) ? cur[q] - cand[c][q] : cand[c][q] - cur[q];
        if (q == NPIX - 1 && (c == 0 || sad < best)) begin
          best = sad; best_idx = c; n_upd++;
        end
        repeat (II - 1) begin @(negedge clk); cycles++; end
        `CHECK_EQ(grid_out[0], 32'(sad), $sformatf("SAD cand %0d pixel %0d", c, q))
        if (c > 0 || q == NPIX - 1) begin
          `CHECK_EQ(grid_out[1], 32'(best), "best SAD")
          `CHECK_EQ(grid_out[2], 32'(best_idx), "best index")
        end
        @(negedge clk); cycles++;
      end
    end
    run = 0;
    `CHECK_EQ(cycles, NCAND * NPIX * II, "eight cycles per pixel")
    if (n_upd < 2) begin failures++; $display("FAIL best updated only %0d times", n_upd); end
    $display("motion estimation: %0d candidates of %0dx%0d, best %0d at %0d, %0d updates",
             NCAND, BS, BS, best, best_idx, n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

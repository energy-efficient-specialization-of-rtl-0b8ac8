// tb_kernel_smith_waterman: Smith-Waterman local-alignment scoring on one
// cluster, one matrix cell per iteration (initiation interval 10):
//   H[i][j] = max(0, H[i-1][j-1] + (a[i]==b[j] ? MATCH : -MISMATCH),
//                 H[i-1][j] - GAP, H[i][j-1] - GAP)
// The kernel is built almost entirely from comparisons and selects: an EQ
// predicate picks the diagonal score, then three LT/SEL pairs form the
// maximum. H[i][j-1] is carried from the previous iteration in a distributed
// register and replaced by 0 at the start of a row through a select driven by
// a grid predicate. The row above, H[i-1][*], is fed back from the cluster's
// own earlier outputs, as a neighbouring cluster would supply it. Every cell
// is compared with a reference matrix computed in the testbench.
// The kernel is one of those the source architecture was evaluated with; the
// problem size, the exact form of the algorithm and the schedule are this
// design's own.
`include "tb_util.svh"
`include "tb_cluster_util.svh"
module tb_kernel_smith_waterman;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `CLUSTER_INSTANCE

  localparam int LA = 12, LB = 24, II = 10;
  localparam int MATCH = 3, MISMATCH = 3, GAP = 2;
  int          a [LA], b [LB];
  int          ref_h [LA][LB];
  logic [31:0] dut_h [LA][LB];
  ctx_cfg_t    p [];

  function automatic ctx_cfg_t ctxw(int k);
    ctx_cfg_t c;
    c = '0;
    case (k)
      0: begin
        c.imm = MATCH;
        c.pe[2].op = OP_EQ;                                   // a[i] == b[j]
        c.wsel[wpe(2, 0)] = W_SW'(WS_GRID + 3);
        c.wsel[wpe(2, 1)] = W_SW'(WS_GRID + 0);
        c.pe[0].op = OP_ADD;                                  // diag + MATCH
        c.wsel[wpe(0, 0)] = W_SW'(WS_GRID + 2);
        c.wsel[wpe(0, 1)] = W_SW'(WS_IMM);
      end
      1: begin
        c.imm = MISMATCH;
        c.pe[1].op = OP_SUB;                                  // diag - MISMATCH
        c.wsel[wpe(1, 0)] = W_SW'(WS_GRID + 2);
        c.wsel[wpe(1, 1)] = W_SW'(WS_IMM);
        c.pe[2].op = OP_SEL;                                  // left = row start ? 0 : dreg1
        c.bsel[BK_PE + 2] = B_SW'(BS_GRID + 0);
        c.wsel[wpe(2, 0)] = ZERO;
        c.wsel[wpe(2, 1)] = W_SW'(WS_DREG + 1);
      end
      2: begin
        c.imm = GAP;
        c.pe[1].op = OP_SEL;                                  // d = eq ? diag+M : diag-X
        c.bsel[BK_PE + 1] = B_SW'(BS_PE + 2);
        c.wsel[wpe(1, 0)] = W_SW'(WS_PE + 0);
        c.pe[1].src[1] = SRC_SELF;
        c.pe[3].op = OP_SUB;                                  // u = up - GAP
        c.wsel[wpe(3, 0)] = W_SW'(WS_GRID + 1);
        c.wsel[wpe(3, 1)] = W_SW'(WS_IMM);
        c.pe[2].op = OP_SUB;                                  // l = left - GAP
        c.pe[2].src[0] = SRC_SELF;
        c.wsel[wpe(2, 1)] = W_SW'(WS_IMM);
      end
      3: begin
        c.pe[0].op = OP_LT;                                   // d < u
        c.wsel[wpe(0, 0)] = W_SW'(WS_PE + 1);
        c.wsel[wpe(0, 1)] = W_SW'(WS_PE + 3);
      end
      4: begin
        c.pe[1].op = OP_SEL;                                  // m1 = max(d, u)
        c.bsel[BK_PE + 1] = B_SW'(BS_PE + 0);
        c.wsel[wpe(1, 0)] = W_SW'(WS_PE + 3);
        c.pe[1].src[1] = SRC_SELF;
      end
      5: begin
        c.pe[0].op = OP_LT;                                   // m1 < l
        c.wsel[wpe(0, 0)] = W_SW'(WS_PE + 1);
        c.wsel[wpe(0, 1)] = W_SW'(WS_PE + 2);
      end
      6: begin
        c.pe[1].op = OP_SEL;                                  // m2 = max(m1, l)
        c.bsel[BK_PE + 1] = B_SW'(BS_PE + 0);
        c.wsel[wpe(1, 0)] = W_SW'(WS_PE + 2);
        c.pe[1].src[1] = SRC_SELF;
      end
      7: begin
        c.pe[0].op = OP_LT;                                   // m2 < 0
        c.wsel[wpe(0, 0)] = W_SW'(WS_PE + 1);
        c.wsel[wpe(0, 1)] = ZERO;
      end
      8: begin
        c.pe[1].op = OP_SEL;                                  // H = max(m2, 0)
        c.bsel[BK_PE + 1] = B_SW'(BS_PE + 0);
        c.wsel[wpe(1, 0)] = ZERO;
        c.pe[1].src[1] = SRC_SELF;
      end
      9: begin
        c.dreg_en[1] = 1'b1;                                  // carry H to the next cell
        c.wsel[WK_DREG + 1] = W_SW'(WS_PE + 1);
        c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 1);
      end
      default: ;
    endcase
    return c;
  endfunction

  function automatic int max2(int x, int y); return (x > y) ? x : y; endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, cycles, n_zero, n_diag, n_gap;
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 0; grid_in = '0; grid_bin = '0;
    foreach (a[i]) a[i] = $urandom_range(0, 3);
    foreach (b[j]) b[j] = (j >= 5 && j < 5 + LA) ? a[j - 5] : $urandom_range(0, 3);
    // reference
    best = 0; n_zero = 0; n_diag = 0; n_gap = 0;
    for (int i = 0; i < LA; i++)
      for (int j = 0; j < LB; j++) begin
        int dg, up, lf, s, h;
        dg = (i > 0 && j > 0) ? ref_h[i-1][j-1] : 0;
        up = (i > 0) ? ref_h[i-1][j] : 0;
        lf = (j > 0) ? ref_h[i][j-1] : 0;
        s  = (a[i] == b[j]) ? dg + MATCH : dg - MISMATCH;
        h  = max2(0, max2(s, max2(up - GAP, lf - GAP)));
        ref_h[i][j] = h;
        best = max2(best, h);
        if (h == 0) n_zero++; else if (h == s) n_diag++; else n_gap++;
      end
    p = new[II];
    foreach (p[k]) p[k] = ctxw(k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program(p, II);
    cycles = 0;
    for (int i = 0; i < LA; i++)
      for (int j = 0; j < LB; j++) begin
        grid_in[0]  = b[j];
        grid_in[3]  = a[i];
        grid_in[1]  = (i > 0) ? dut_h[i-1][j] : 0;
        grid_in[2]  = (i > 0 && j > 0) ? dut_h[i-1][j-1] : 0;
        grid_bin[0] = (j == 0);
        run = 1;
        `CHECK_EQ(ctx, 4'(0), "cell starts at context 0")
        repeat (II - 1) begin @(negedge clk); cycles++; end
        dut_h[i][j] = grid_out[0];
        `CHECK_EQ(grid_out[0], 32'(ref_h[i][j]), $sformatf("H[%0d][%0d]", i, j))
        @(negedge clk); cycles++;
      end
    run = 0;
    `CHECK_EQ(cycles, LA * LB * II, "ten cycles per cell")
    // all three outcomes of the maximum must have occurred
    if (n_zero == 0 || n_diag == 0 || n_gap == 0) begin
      failures++; $display("FAIL coverage zero=%0d diag=%0d gap=%0d", n_zero, n_diag, n_gap);
    end
    $display("smith-waterman: %0dx%0d cells, best score %0d, cells zero/diag/gap = %0d/%0d/%0d",
             LA, LB, best, n_zero, n_diag, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_kernel_matmul: dense matrix multiply C = A * B (N x N, 32-bit wrap-
// around) on one cluster, one multiply-add per iteration (initiation
// interval 4), operands read from the data memory.
//
// A one-context store program first writes A (row-major at 0) and B
// (row-major at N*N) into the data memory from the grid. The cluster is then
// reprogrammed with the dot-product loop. For each C[i][j] the grid supplies
// the two start addresses and a start predicate; PE2 and PE3 hold the A and B
// addresses (a select loads the start value, then they step by 1 and by N),
// the single port of memory bank 0 reads A in context 1 and B in context 2, A waits in
// PE0's retiming register, and PE0 multiply-adds onto the running sum, which
// PE1 replaces by 0 at the start of each dot product. A finished C[i][j]
// appears on grid_out[0] in context 1 of the following iteration.
// The kernel is one of those the source architecture was evaluated with; the
// problem size, the exact form of the algorithm and the schedule are this
// design's own.
`include "tb_util.svh"
`include "tb_cluster_util.svh"
module tb_kernel_matmul;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `CLUSTER_INSTANCE

  localparam int N = 6, II = 4;
  logic [31:0] A [N][N], B [N][N];
  ctx_cfg_t    store_p [], loop_p [];

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
        c.pe[2].op = OP_SEL;                                  // A address
        c.bsel[BK_PE + 2] = B_SW'(BS_GRID + 0);
        c.wsel[wpe(2, 0)] = W_SW'(WS_GRID + 0);
        c.pe[2].src[1] = SRC_SELF;
        c.pe[3].op = OP_SEL;                                  // B address
        c.bsel[BK_PE + 3] = B_SW'(BS_GRID + 0);
        c.wsel[wpe(3, 0)] = W_SW'(WS_GRID + 1);
        c.pe[3].src[1] = SRC_SELF;
      end
      1: begin
        c.imm = 1;
        c.dmem_en[0] = 1'b1;                                     // load A
        c.wsel[WK_DADDR] = W_SW'(WS_PE + 2);
        c.pe[2].op = OP_ADD;
        c.pe[2].src[0] = SRC_SELF;
        c.wsel[wpe(2, 1)] = W_SW'(WS_IMM);
        c.pe[1].op = OP_SEL;                                  // sum in = start ? 0 : sum
        c.bsel[BK_PE + 1] = B_SW'(BS_GRID + 0);
        c.wsel[wpe(1, 0)] = ZERO;
        c.wsel[wpe(1, 1)] = W_SW'(WS_PE + 0);
        c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 0);               // finished C value
      end
      2: begin
        c.imm = N;
        c.dmem_en[0] = 1'b1;                                     // load B
        c.wsel[WK_DADDR] = W_SW'(WS_PE + 3);
        c.pe[3].op = OP_ADD;
        c.pe[3].src[0] = SRC_SELF;
        c.wsel[wpe(3, 1)] = W_SW'(WS_IMM);
        c.pe[0].retime_en[0] = 1'b1;                          // hold A
        c.wsel[wpe(0, 0)] = W_SW'(WS_DMEM);
      end
      3: begin
        c.pe[0].op = OP_MADD;                                 // sum += A * B
        c.pe[0].src[0] = SRC_RETIME;
        c.wsel[wpe(0, 1)] = W_SW'(WS_DMEM);
        c.wsel[wpe(0, 2)] = W_SW'(WS_PE + 1);
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
    int cycles, n_c;
    logic [31:0] expect_c;
    int pend_i, pend_j;
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 0; grid_in = '0; grid_bin = '0;
    foreach (A[i, j]) A[i][j] = $urandom;
    foreach (B[i, j]) B[i][j] = (i == j) ? 32'hFFFF_FFFF : $urandom_range(0, 999);
    store_p = new[1]; store_p[0] = store_ctx();
    loop_p  = new[II];
    foreach (loop_p[k]) loop_p[k] = loop_ctx(k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // store A and B
    load_program(store_p, 1);
    run = 1;
    for (int w = 0; w < 2 * N * N; w++) begin
      grid_in[0] = w;
      grid_in[1] = (w < N * N) ? A[w / N][w % N] : B[(w - N * N) / N][(w - N * N) % N];
      @(negedge clk);
    end
    run = 0;
    // dot products
    load_program(loop_p, II);
    cycles = 0; n_c = 0; pend_i = -1; pend_j = -1;
    for (int e = 0; e <= N * N; e++) begin
      int i, j;
      i = e / N; j = e % N;
      for (int k = 0; k < N; k++) begin
        grid_in[0]  = i * N;
        grid_in[1]  = N * N + j;
        grid_bin[0] = (k == 0);
        run = 1;
        @(negedge clk); cycles++;
        if (k == 0 && pend_i >= 0) begin
          expect_c = 0;
          for (int q = 0; q < N; q++) expect_c += A[pend_i][q] * B[q][pend_j];
          `CHECK_EQ(grid_out[0], expect_c, $sformatf("C[%0d][%0d]", pend_i, pend_j))
          n_c++;
        end
        repeat (II - 1) begin @(negedge clk); cycles++; end
        if (e == N * N) break;   // one trailing iteration delivers the last C
      end
      pend_i = i; pend_j = j;
    end
    run = 0;
    `CHECK_EQ(n_c, N * N, "all elements of C checked")
    `CHECK_EQ(cycles, (N * N * N + 1) * II, "four cycles per multiply-add")
    $display("matmul: %0dx%0d, %0d multiply-adds in %0d cycles", N, N, N * N * N, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

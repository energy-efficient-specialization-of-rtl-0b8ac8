// tb_kernel_cordic: CORDIC in rotation mode on one cluster, one micro-rotation
// per iteration (initiation interval 5), computing cos and sin of an angle in
// Q16 fixed point (1.0 = 65536):
//   d = (z < 0) ? -1 : +1
//   x' = x - d*(y >>> i),  y' = y + d*(x >>> i),  z' = z - d*atan(2^-i)
// Both arithmetic shifts, six add/subtracts and three predicate-driven
// selects run per iteration; x and y live in the two distributed registers,
// z in PE1's output register, and z - atan is parked in PE1's private register
// file while z + atan is formed. The testbench supplies i and atan(2^-i) on
// grid inputs 1 and 0, as a table held next to the cluster would.
// For each angle the cluster is reprogrammed twice: a one-context set-up
// program loads x0 = K (the CORDIC gain), y0 = 0, z0 = angle, then the
// five-context loop runs 16 iterations. Every iteration is compared with an
// integer reference, and the final x, y with cos and sin to within 40 LSB.
// The kernel is one of those the source architecture was evaluated with; the
// problem size, the exact form of the algorithm and the schedule are this
// design's own.
`include "tb_util.svh"
`include "tb_cluster_util.svh"
module tb_kernel_cordic;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `CLUSTER_INSTANCE

  localparam int ITER = 16, II = 5, NANG = 10;
  localparam real SCALE = 65536.0;
  ctx_cfg_t  setup [], loop_p [];
  int        atan_q [ITER];

  function automatic ctx_cfg_t setup_ctx();
    ctx_cfg_t c;
    c = '0;
    c.dreg_en = 2'b11;
    c.wsel[WK_DREG + 0] = W_SW'(WS_GRID + 0);
    c.wsel[WK_DREG + 1] = W_SW'(WS_GRID + 1);
    c.pe[1].op = OP_PASS;
    c.wsel[wpe(1, 0)] = W_SW'(WS_GRID + 2);
    return c;
  endfunction

  function automatic ctx_cfg_t loop_ctx(int k);
    ctx_cfg_t c;
    c = '0;
    case (k)
      0: begin
        c.pe[0].op = OP_LT;                                   // z < 0
        c.wsel[wpe(0, 0)] = W_SW'(WS_PE + 1);
        c.wsel[wpe(0, 1)] = ZERO;
        c.pe[2].op = OP_SRA;                                  // ys = y >>> i
        c.wsel[wpe(2, 0)] = W_SW'(WS_DREG + 1);
        c.wsel[wpe(2, 1)] = W_SW'(WS_GRID + 1);
        c.pe[3].op = OP_SRA;                                  // xs = x >>> i
        c.wsel[wpe(3, 0)] = W_SW'(WS_DREG + 0);
        c.wsel[wpe(3, 1)] = W_SW'(WS_GRID + 1);
        c.pe[1].retime_en[0] = 1'b1;                          // keep z
        c.wsel[wpe(1, 0)] = W_SW'(WS_PE + 1);
      end
      1: begin
        c.pe[3].op = OP_ADD;                                  // y + xs
        c.wsel[wpe(3, 0)] = W_SW'(WS_DREG + 1);
        c.pe[3].src[1] = SRC_SELF;
        c.pe[0].op = OP_SUB;                                  // y - xs
        c.wsel[wpe(0, 0)] = W_SW'(WS_DREG + 1);
        c.wsel[wpe(0, 1)] = W_SW'(WS_PE + 3);
        c.pe[1].op = OP_SUB;                                  // z - atan
        c.pe[1].src[0] = SRC_SELF;
        c.wsel[wpe(1, 1)] = W_SW'(WS_GRID + 0);
      end
      2: begin
        c.pe[0].op = OP_SEL;                                  // y'
        c.bsel[BK_PE + 0] = B_SW'(BS_PE + 0);
        c.pe[0].src[0] = SRC_SELF;
        c.wsel[wpe(0, 1)] = W_SW'(WS_PE + 3);
        c.pe[3].op = OP_ADD;                                  // x + ys
        c.wsel[wpe(3, 0)] = W_SW'(WS_DREG + 0);
        c.wsel[wpe(3, 1)] = W_SW'(WS_PE + 2);
        c.pe[2].op = OP_SUB;                                  // x - ys
        c.wsel[wpe(2, 0)] = W_SW'(WS_DREG + 0);
        c.pe[2].src[1] = SRC_SELF;
        c.pe[1].op = OP_ADD;                                  // z + atan; park z - atan
        c.pe[1].src[0] = SRC_RETIME;
        c.wsel[wpe(1, 1)] = W_SW'(WS_GRID + 0);
        c.pe[1].lrf_we = 1'b1;
        c.pe[1].lrf_waddr = 0;
      end
      3: begin
        c.pe[2].op = OP_SEL;                                  // x'
        c.bsel[BK_PE + 2] = B_SW'(BS_PE + 0);
        c.wsel[wpe(2, 0)] = W_SW'(WS_PE + 3);
        c.pe[2].src[1] = SRC_SELF;
        c.pe[1].op = OP_SEL;                                  // z'
        c.bsel[BK_PE + 1] = B_SW'(BS_PE + 0);
        c.pe[1].src[0] = SRC_SELF;
        c.pe[1].src[1] = SRC_LRF;
        c.pe[1].lrf_raddr = 0;
        c.dreg_en[1] = 1'b1;                                  // y <- y'
        c.wsel[WK_DREG + 1] = W_SW'(WS_PE + 0);
      end
      4: begin
        c.dreg_en[0] = 1'b1;                                  // x <- x'
        c.wsel[WK_DREG + 0] = W_SW'(WS_PE + 2);
        c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 2);
        c.wsel[WK_GRID + 1] = W_SW'(WS_PE + 0);
        c.wsel[WK_GRID + 2] = W_SW'(WS_PE + 1);
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
    real gain, ang;
    int  n_neg, n_pos;
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 0; grid_in = '0; grid_bin = '0;
    gain = 1.0;
    for (int i = 0; i < ITER; i++) begin
      atan_q[i] = $rtoi($atan(2.0 ** (-i)) * SCALE + 0.5);
      gain = gain / $sqrt(1.0 + 2.0 ** (-2 * i));
    end
    setup = new[1];  setup[0] = setup_ctx();
    loop_p = new[II];
    foreach (loop_p[k]) loop_p[k] = loop_ctx(k);
    n_neg = 0; n_pos = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int an = 0; an < NANG; an++) begin
      int x, y, z, xr, yr, zr, gx, gy;
      ang = -1.5 + 3.0 * an / (NANG - 1);
      x = $rtoi(gain * SCALE + 0.5); y = 0; z = $rtoi(ang * SCALE);
      // set-up program: one cycle
      load_program(setup, 1);
      grid_in[0] = x; grid_in[1] = y; grid_in[2] = z;
      run = 1;
      @(negedge clk);
      run = 0;
      // iteration program
      load_program(loop_p, II);
      xr = x; yr = y; zr = z;
      for (int i = 0; i < ITER; i++) begin
        int xs, ys;
        grid_in[0] = atan_q[i]; grid_in[1] = i;
        run = 1;
        xs = xr >>> i; ys = yr >>> i;
        if (zr < 0) begin xr = xr + ys; yr = yr - xs; zr = zr + atan_q[i]; n_neg++; end
        else        begin xr = xr - ys; yr = yr + xs; zr = zr - atan_q[i]; n_pos++; end
        repeat (II - 1) @(negedge clk);
        `CHECK_EQ(ctx, 4'(II - 1), "last context")
        `CHECK_EQ(grid_out[0], 32'(xr), $sformatf("x ang=%0d it=%0d", an, i))
        `CHECK_EQ(grid_out[1], 32'(yr), $sformatf("y ang=%0d it=%0d", an, i))
        `CHECK_EQ(grid_out[2], 32'(zr), $sformatf("z ang=%0d it=%0d", an, i))
        gx = $signed(grid_out[0]); gy = $signed(grid_out[1]);
        @(negedge clk);
      end
      run = 0;
      begin
        int ec, es;
        ec = $rtoi($cos(ang) * SCALE); es = $rtoi($sin(ang) * SCALE);
        checks++;
        if (gx - ec > 40 || ec - gx > 40 || gy - es > 40 || es - gy > 40) begin
          failures++;
          $display("FAIL cos/sin of %f: got %0d %0d expected %0d %0d", ang,
                   gx, gy, ec, es);
        end
      end
    end
    if (n_neg == 0 || n_pos == 0) begin failures++; $display("FAIL both rotation directions needed"); end
    $display("cordic: %0d angles x %0d iterations, rotations +%0d / -%0d", NANG, ITER, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cgra_cluster: end-to-end test of the cluster at its default parameters.
//
// A hand-scheduled loop with an initiation interval of 5 contexts runs for
// ITERS iterations. Per iteration i the grid supplies x = grid_in[0],
// t = grid_in[1], p = grid_bin[0], and the cluster computes
//   acc  += 3*x                    MADD on PE0 (Universal), acc kept in dreg0
//   lt    = x < t (signed)         compare on PE2 (S-ALU) -> predicate
//   q     = lt ^ p                 LUT3 on the 1-bit path
//   s     = x >>> 3                shift on PE3 (S-ALU)
//   z     = s + s(previous iter)   PE3: own output + private register file,
//                                  the file having rotated once since the write
//   f     = low word of {x,t} >> 3 FSHR on PE1 (Universal), t via a retiming reg
//   m     = q ? z : f              select on PE1, predicate from the LUT
//   store m at data memory[cnt+1] in both banks, load memory[cnt]
//   (= previous m) from both banks,
//   cnt  += 1 (dreg1), m written to the cluster register file at logical 0
//   and read back two rotations later at logical 2.
// Outputs during context 3: grid_out = {m(i-2), m(i-1), m, acc}, grid_bout =
// {lt, q}; during context 4 grid_out[2] = bank 1's m(i-1). A reference model computes the same values in plain SystemVerilog.
// The run is paused once between iterations and resumed. Every mechanism used
// is counted and a mechanism that never occurs counts as a failure.
`include "tb_util.svh"
module tb_cgra_cluster;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int ITERS = 200;
  localparam int II    = 5;

  logic        cfg_we, run, iter_done;
  logic [3:0]  cfg_waddr, ctx_last, ctx;
  ctx_cfg_t    cfg_wdata;
  logic [NUM_GRID_IN-1:0][31:0]  grid_in;
  logic [NUM_GRID_OUT-1:0][31:0] grid_out;
  logic [NUM_GRID_BIN-1:0]       grid_bin;
  logic [NUM_GRID_BOUT-1:0]      grid_bout;

  cgra_cluster dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_waddr(cfg_waddr), .cfg_wdata(cfg_wdata),
    .run(run), .ctx_last(ctx_last), .ctx(ctx), .iter_done(iter_done),
    .grid_in(grid_in), .grid_out(grid_out), .grid_bin(grid_bin), .grid_bout(grid_bout));

  // ---- program -----------------------------------------------------------
  function automatic int wpe(int p, int i); return WK_PE + p * PE_MAX_IN + i; endfunction

  function automatic ctx_cfg_t prog(int k);
    ctx_cfg_t c;
    c = '0;
    case (k)
      0: begin
        c.imm = 3;
        // PE0: acc' = x * 3 + dreg0
        c.pe[0].op = OP_MADD;
        c.wsel[wpe(0, 0)] = W_SW'(WS_GRID + 0);
        c.wsel[wpe(0, 1)] = W_SW'(WS_IMM);
        c.wsel[wpe(0, 2)] = W_SW'(WS_DREG + 0);
        // PE2: lt = x < t
        c.pe[2].op = OP_LT;
        c.wsel[wpe(2, 0)] = W_SW'(WS_GRID + 0);
        c.wsel[wpe(2, 1)] = W_SW'(WS_GRID + 1);
        // PE3: s = x >>> 3
        c.pe[3].op = OP_SRA;
        c.wsel[wpe(3, 0)] = W_SW'(WS_GRID + 0);
        c.wsel[wpe(3, 1)] = W_SW'(WS_IMM);
        // PE1: capture t in the retiming register of port 3
        c.pe[1].retime_en[3] = 1'b1;
        c.wsel[wpe(1, 3)] = W_SW'(WS_GRID + 1);
      end
      1: begin
        c.imm = 3;
        // LUT0: q = lt ^ p   (truth table index {in2, in1, in0})
        c.lut_en[0] = 1'b1;
        c.lut_tt[0] = 8'h66;
        c.bsel[BK_LUT + 0] = B_SW'(BS_PE + 2);
        c.bsel[BK_LUT + 1] = B_SW'(BS_GRID + 0);
        c.bsel[BK_LUT + 2] = B_SW'(BS_GRID + 1);
        // PE1: f = {x, t} >> 3, t from the retiming register
        c.pe[1].op = OP_FSHR;
        c.pe[1].src[3] = SRC_RETIME;
        c.wsel[wpe(1, 0)] = W_SW'(WS_GRID + 0);
        c.wsel[wpe(1, 1)] = W_SW'(WS_IMM);
        // PE3: z = s + LRF[1]; store s into LRF[0]
        c.pe[3].op = OP_ADD;
        c.pe[3].src[0] = SRC_SELF;
        c.pe[3].src[1] = SRC_LRF;
        c.pe[3].lrf_raddr = 1;
        c.pe[3].lrf_we = 1'b1;
        c.pe[3].lrf_waddr = 0;
      end
      2: begin
        c.imm = 1;
        // dreg0 <= acc'
        c.dreg_en[0] = 1'b1;
        c.wsel[WK_DREG + 0] = W_SW'(WS_PE + 0);
        // PE1: m = q ? z : f
        c.pe[1].op = OP_SEL;
        c.wsel[wpe(1, 0)] = W_SW'(WS_PE + 3);
        c.pe[1].src[1] = SRC_SELF;
        c.bsel[BK_PE + 1] = B_SW'(BS_LUT + 0);
        // PE2: cnt + 1
        c.pe[2].op = OP_ADD;
        c.wsel[wpe(2, 0)] = W_SW'(WS_DREG + 1);
        c.wsel[wpe(2, 1)] = W_SW'(WS_IMM);
        // load dmem[cnt] from both banks
        c.dmem_en = 2'b11;
        c.wsel[WK_DADDR + 0] = W_SW'(WS_DREG + 1);
        c.wsel[WK_DADDR + 1] = W_SW'(WS_DREG + 1);
      end
      3: begin
        // dreg1 <= cnt + 1
        c.dreg_en[1] = 1'b1;
        c.wsel[WK_DREG + 1] = W_SW'(WS_PE + 2);
        // store m at dmem[cnt + 1] in both banks
        c.dmem_en = 2'b11;
        c.dmem_we = 2'b11;
        c.wsel[WK_DADDR + 0] = W_SW'(WS_PE + 2);
        c.wsel[WK_DWDAT + 0] = W_SW'(WS_PE + 1);
        c.wsel[WK_DADDR + 1] = W_SW'(WS_PE + 2);
        c.wsel[WK_DWDAT + 1] = W_SW'(WS_PE + 1);
        // cluster register file: write m at logical 0, read logical 2
        c.crf_we = 1'b1;
        c.crf_waddr = 0;
        c.wsel[WK_CRF] = W_SW'(WS_PE + 1);
        c.crf_raddr[0] = 2;
        // grid outputs
        c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 0);
        c.wsel[WK_GRID + 1] = W_SW'(WS_PE + 1);
        c.wsel[WK_GRID + 2] = W_SW'(WS_DMEM);
        c.wsel[WK_GRID + 3] = W_SW'(WS_CRF + 0);
        c.bsel[BK_GRID + 0] = B_SW'(BS_LUT + 0);
        c.bsel[BK_GRID + 1] = B_SW'(BS_PE + 2);
      end
      4: begin
        // bank 1's read data (held since context 2) on the grid
        c.wsel[WK_GRID + 2] = W_SW'(WS_DMEM + 1);
      end
      default: ;
    endcase
    return c;
  endfunction

  // ---- reference model state ---------------------------------------------------
  logic [31:0] acc, s_prev, m_hist [3];
  logic        s_prev_ok, m_ok [3];
  int          n_madd, n_sel_z, n_sel_f, n_lut, n_store_load, n_crf_rot, n_lrf_rot,
               n_retime, n_fshr, n_pause, n_iter_done, n_lt1, n_lt0, n_bank1;

  always @(posedge clk) if (iter_done) n_iter_done++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int it, cyc_start, cyc;
    logic [31:0] x, t, s, z, f, m;
    logic [63:0] ft;
    logic        p, lt, q;
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 4'(II - 1);
    grid_in = '0; grid_bin = '0;
    {n_madd, n_sel_z, n_sel_f, n_lut, n_store_load, n_crf_rot, n_lrf_rot, n_retime, n_fshr, n_pause, n_iter_done, n_lt1, n_lt0} = '0;
    acc = 0; s_prev_ok = 0; m_ok = '{0, 0, 0}; s_prev = 0; m_hist = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the program
    for (int k = 0; k < II; k++) begin
      @(negedge clk); cfg_we = 1; cfg_waddr = 4'(k); cfg_wdata = prog(k);
    end
    @(negedge clk); cfg_we = 0;
    `CHECK_EQ(grid_out, '0, "stopped cluster drives idle outputs")

    cyc = 0; cyc_start = 0;
    for (it = 0; it < ITERS; it++) begin
      // pause between iterations once
      if (it == ITERS / 2) begin
        run = 0;
        repeat (7) @(negedge clk);
        `CHECK_EQ(ctx, 4'(0), "paused at context 0")
        `CHECK_EQ(grid_out[0], acc, "state held while paused")
        n_pause++;
      end
      // context 0 of iteration it: drive the inputs
      x = (it % 7 == 0) ? 32'h8000_0000 + 32'(it) : $urandom;
      t = (it % 5 == 0) ? x : $urandom;
      p = 1'($urandom);
      grid_in[0] = x; grid_in[1] = t; grid_in[2] = $urandom; grid_in[3] = $urandom;
      grid_bin[0] = p; grid_bin[1] = 1'($urandom);
      run = 1;
      if (it == 0) cyc_start = cyc;
      `CHECK_EQ(ctx, 4'(0), "iteration starts at context 0")
      // reference model
      acc = acc + x * 3;
      lt  = $signed(x) < $signed(t);
      q   = lt ^ p;
      s   = $signed(x) >>> 3;
      z   = s + s_prev;
      ft  = {x, t} >> 3;
      f   = ft[31:0];
      m   = q ? z : f;
      // contexts 1..3
      repeat (3) begin
        @(negedge clk);
        grid_bin[1] = 1'($urandom);   // LUT input 2 must not matter
        cyc++;
      end
      `CHECK_EQ(ctx, 4'(3), "context 3")
      `CHECK_EQ(grid_out[0], acc, $sformatf("acc it=%0d", it))
      n_madd++;
      `CHECK_EQ(grid_bout[1], lt, "lt predicate")
      if (lt) n_lt1++; else n_lt0++;
      `CHECK_EQ(grid_bout[0], q, "LUT xor")
      n_lut++;
      if (!q || s_prev_ok) begin
        `CHECK_EQ(grid_out[1], m, $sformatf("m it=%0d q=%0d", it, q))
        if (q) begin n_sel_z++; n_lrf_rot++; end
        else   begin n_sel_f++; n_fshr++; n_retime++; end
      end
      if (it >= 1 && m_ok[0]) begin
        `CHECK_EQ(grid_out[2], m_hist[0], "data memory holds previous m")
        n_store_load++;
      end
      if (it >= 2 && m_ok[1]) begin
        `CHECK_EQ(grid_out[3], m_hist[1], "register file rotated twice")
        n_crf_rot++;
      end
      // context 4 then back to context 0
      @(negedge clk); cyc++;
      `CHECK_EQ(ctx, 4'(4), "context 4")
      if (it >= 1 && m_ok[0]) begin
        `CHECK_EQ(grid_out[2], m_hist[0], "memory bank 1 holds previous m")
        n_bank1++;
      end
      m_hist[1] = m_hist[0]; m_ok[1] = m_ok[0];
      m_hist[0] = m;         m_ok[0] = (!q || s_prev_ok);
      s_prev = s; s_prev_ok = 1;
      @(negedge clk); cyc++;
    end
    run = 0;
    @(negedge clk);
    `CHECK_EQ(cyc - cyc_start, ITERS * II, "one iteration every II cycles")
    `CHECK_EQ(n_iter_done, ITERS, "one end-of-iteration pulse per iteration")
    $display("mechanisms: madd=%0d select_z=%0d select_f=%0d lut=%0d lt1=%0d lt0=%0d store_load=%0d bank1=%0d crf_rotation=%0d lrf_rotation=%0d retime=%0d fshr=%0d pause=%0d",
             n_madd, n_sel_z, n_sel_f, n_lut, n_lt1, n_lt0, n_store_load, n_bank1, n_crf_rot, n_lrf_rot, n_retime, n_fshr, n_pause);
    if (n_madd == 0 || n_sel_z == 0 || n_sel_f == 0 || n_lut == 0 || n_lt1 == 0 || n_lt0 == 0 ||
        n_store_load == 0 || n_bank1 == 0 || n_crf_rot == 0 || n_lrf_rot == 0 || n_retime == 0 || n_fshr == 0 || n_pause == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_kernel_pet_event: event detection on a digitised detector signal, as
// in PET front ends: find pulses above a threshold and report, for each,
// its start time, its energy (sum of the samples above threshold) and its
// peak. One sample per iteration (initiation interval 4); almost all of the
// work is compares, selects and 1-bit logic, the two multipliers stay idle.
//
// State lives in PE0 (start time), PE1 (energy), distributed register 0 and
// PE3 (peak) and LUT1 (sample n-1 above threshold, "prev"):
//   context 0: PE2 above = thr < x;  PE3 gt = peak < x;  dreg0 <- peak
//   context 1: LUT0 rise = above & !prev;  PE1 base = prev ? E : 0;
//              results of the previous sample leave on the grid
//   context 2: LUT0 upd = above & (!prev | gt);  PE0 T = rise ? n : T;
//              PE3 base + x
//   context 3: PE1 E = above ? base + x : base;  PE3 peak = upd ? x : peak;
//              LUT0 fall = !above & prev;  LUT1 prev <- above
// On the sample after a falling edge, grid_bout[0] is 1 and grid_out[0..2]
// carry energy, peak and start time of the event that just ended.
// The kernel is one of those the source architecture was evaluated with; the
// problem size, the exact form of the algorithm and the schedule are this
// design's own.
`include "tb_util.svh"
`include "tb_cluster_util.svh"
module tb_kernel_pet_event;
  import cgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `CLUSTER_INSTANCE

  localparam int N = 400, II = 4, THR = 50;
  localparam int SHAPE [7] = '{60, 210, 340, 260, 150, 90, 55};
  int       x [N];
  ctx_cfg_t p [];

  function automatic ctx_cfg_t ctxw(int k);
    ctx_cfg_t c;
    c = '0;
    case (k)
      0: begin
        c.imm = THR;
        c.pe[2].op = OP_LT;                                   // above
        c.wsel[wpe(2, 0)] = W_SW'(WS_IMM);
        c.wsel[wpe(2, 1)] = W_SW'(WS_GRID + 0);
        c.pe[3].op = OP_LT;                                   // gt
        c.pe[3].src[0] = SRC_SELF;
        c.wsel[wpe(3, 1)] = W_SW'(WS_GRID + 0);
        c.dreg_en[0] = 1'b1;                                  // keep peak
        c.wsel[WK_DREG + 0] = W_SW'(WS_PE + 3);
      end
      1: begin
        c.lut_en[0] = 1'b1;                                   // rise
        c.lut_tt[0] = 8'h22;
        c.bsel[BK_LUT + 0] = B_SW'(BS_PE + 2);
        c.bsel[BK_LUT + 1] = B_SW'(BS_LUT + 1);
        c.pe[1].op = OP_SEL;                                  // base
        c.bsel[BK_PE + 1] = B_SW'(BS_LUT + 1);
        c.pe[1].src[0] = SRC_SELF;
        c.wsel[wpe(1, 1)] = ZERO;
        c.wsel[WK_GRID + 0] = W_SW'(WS_PE + 1);
        c.wsel[WK_GRID + 1] = W_SW'(WS_DREG + 0);
        c.wsel[WK_GRID + 2] = W_SW'(WS_PE + 0);
        c.bsel[BK_GRID + 0] = B_SW'(BS_LUT + 0);
      end
      2: begin
        c.lut_en[0] = 1'b1;                                   // upd
        c.lut_tt[0] = 8'hA2;
        c.bsel[BK_LUT + 0] = B_SW'(BS_PE + 2);
        c.bsel[BK_LUT + 1] = B_SW'(BS_LUT + 1);
        c.bsel[BK_LUT + 2] = B_SW'(BS_PE + 3);
        c.pe[0].op = OP_SEL;                                  // start time
        c.bsel[BK_PE + 0] = B_SW'(BS_LUT + 0);
        c.wsel[wpe(0, 0)] = W_SW'(WS_GRID + 1);
        c.pe[0].src[1] = SRC_SELF;
        c.pe[3].op = OP_ADD;                                  // base + x
        c.wsel[wpe(3, 0)] = W_SW'(WS_PE + 1);
        c.wsel[wpe(3, 1)] = W_SW'(WS_GRID + 0);
      end
      3: begin
        c.pe[1].op = OP_SEL;                                  // energy
        c.bsel[BK_PE + 1] = B_SW'(BS_PE + 2);
        c.wsel[wpe(1, 0)] = W_SW'(WS_PE + 3);
        c.pe[1].src[1] = SRC_SELF;
        c.pe[3].op = OP_SEL;                                  // peak
        c.bsel[BK_PE + 3] = B_SW'(BS_LUT + 0);
        c.wsel[wpe(3, 0)] = W_SW'(WS_GRID + 0);
        c.wsel[wpe(3, 1)] = W_SW'(WS_DREG + 0);
        c.lut_en = 2'b11;
        c.lut_tt[0] = 8'h44;                                  // fall
        c.bsel[BK_LUT + 0] = B_SW'(BS_PE + 2);
        c.bsel[BK_LUT + 1] = B_SW'(BS_LUT + 1);
        c.lut_tt[1] = 8'hAA;                                  // prev <- above
        c.bsel[BK_LUT + 3] = B_SW'(BS_PE + 2);
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
    int  cycles, n_ev, n_pulse, e, pk, ts;
    bit  prev, above, fall;
    cfg_we = 0; cfg_waddr = 0; cfg_wdata = '0; run = 0; ctx_last = 0; grid_in = '0; grid_bin = '0;
    foreach (x[n]) x[n] = $urandom_range(0, 30);
    n_pulse = 0;
    for (int s = 5; s + 7 < N - 2; s += 12 + $urandom_range(0, 20)) begin
      int a;
      a = $urandom_range(60, 140);                            // amplitude in %
      for (int k = 0; k < 7; k++) x[s + k] += SHAPE[k] * a / 100 + ((k == 0 || k == 6) ? 50 : 0);
      n_pulse++;
    end
    p = new[II];
    foreach (p[k]) p[k] = ctxw(k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program(p, II);
    cycles = 0; n_ev = 0;
    prev = 0; e = 0; pk = 0; ts = 0; fall = 0;
    for (int n = 0; n <= N; n++) begin
      grid_in[0] = (n < N) ? x[n] : 0;
      grid_in[1] = n;
      run = 1;
      @(negedge clk); cycles++;                               // context 1
      `CHECK_EQ(grid_bout[0], fall, $sformatf("event end flag after sample %0d", n - 1))
      if (fall) begin
        `CHECK_EQ(grid_out[0], 32'(e), $sformatf("energy of event at %0d", ts))
        `CHECK_EQ(grid_out[1], 32'(pk), $sformatf("peak of event at %0d", ts))
        `CHECK_EQ(grid_out[2], 32'(ts), $sformatf("start of event at %0d", ts))
        n_ev++;
      end
      // reference for sample n
      if (n < N) begin
        int base;
        above = x[n] > THR;
        base  = prev ? e : 0;
        if (above && !prev) ts = n;
        if (above && (!prev || x[n] > pk)) pk = x[n];
        e     = above ? base + x[n] : base;
        fall  = !above && prev;
        prev  = above;
      end
      repeat (II - 1) begin @(negedge clk); cycles++; end
    end
    run = 0;
    `CHECK_EQ(n_ev, n_pulse, "one event per pulse")
    `CHECK_EQ(cycles, (N + 1) * II, "four cycles per sample")
    $display("pet events: %0d samples, %0d events, %0d cycles", N, n_ev, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

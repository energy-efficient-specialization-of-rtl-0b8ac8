// cgra_cluster: one cluster of a statically scheduled coarse-grained
// reconfigurable array with specialised functional units.
//
// The default mix is two Universal PEs (PE0, PE1: ALU, select, funnel shifter
// and two-cycle multiply-add) and two S-ALU PEs (PE2, PE3: ALU, select and
// shifter): every operation is available in the cluster, but only two of the
// four PEs pay for a multiplier. PE_KINDS can be set to other mixes.
//
// Every cycle context_ctrl supplies one context word that configures the four
// PEs, the 32-bit crossbar (15 sources: PE outputs, two register-file read
// ports, read data of two memory banks, two distributed registers, four grid
// inputs and a per-context immediate; 27 sinks: 16 PE operand ports,
// register-file write, address and write data of each memory bank, two
// distributed registers, four grid outputs), the
// 1-bit crossbar (PE comparison flags, two LUT3 outputs and two grid
// predicates into PE select predicates, LUT inputs and grid predicate
// outputs), the cluster-wide rotating register file (16 x 32, 1 write, 2 read),
// two data memory banks (1024 x 32 each, one port each, one-cycle read,
// independently enabled), the two distributed
// registers and the two LUT3 units. The context counter runs 0..ctx_last while
// `run` is high; `iter_done` marks the last context, at whose end all rotating
// register files advance.
//
// Latencies seen by a schedule: PE ALU/shift result 1 cycle, MADD 2 cycles,
// memory read 1 cycle, distributed register and LUT 1 cycle; crossbar paths
// and register-file reads are combinational within a cycle. The PE mix, the
// four PEs, the 32-bit and 1-bit paths, the LUT3 units, the rotating register
// files, the distributed registers and the data memories follow the source architecture;
// all counts not named above as the source architecture's, encodings and timing are this
// design's choices.
module cgra_cluster
  import cgra_pkg::*;
#(
  parameter fu_kind_e [NUM_PE-1:0] PE_KINDS =
      {FU_SALU, FU_SALU, FU_UNIVERSAL, FU_UNIVERSAL},
  parameter int unsigned NUM_CTX    = 16,
  parameter int unsigned DMEM_DEPTH = 1024,
  localparam int unsigned CAW = (NUM_CTX > 1) ? $clog2(NUM_CTX) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // configuration load
  input  logic                                cfg_we,
  input  logic [CAW-1:0]                      cfg_waddr,
  input  ctx_cfg_t                            cfg_wdata,
  // execution
  input  logic                                run,
  input  logic [CAW-1:0]                      ctx_last,
  output logic [CAW-1:0]                      ctx,
  output logic                                iter_done,
  // grid interconnect
  input  logic [NUM_GRID_IN-1:0][WORD_W-1:0]  grid_in,
  output logic [NUM_GRID_OUT-1:0][WORD_W-1:0] grid_out,
  input  logic [NUM_GRID_BIN-1:0]             grid_bin,
  output logic [NUM_GRID_BOUT-1:0]            grid_bout
);

  ctx_cfg_t                        cfg;
  logic                            rotate;
  logic [W_NSRC-1:0][WORD_W-1:0]   wsrc;
  logic [W_NSINK-1:0][WORD_W-1:0]  wsnk;
  logic [B_NSRC-1:0]               bsrc;
  logic [B_NSINK-1:0]              bsnk;

  context_ctrl #(.NUM_CTX(NUM_CTX)) u_ctx (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_waddr(cfg_waddr), .cfg_wdata(cfg_wdata),
    .run(run), .ctx_last(ctx_last), .cfg(cfg), .ctx(ctx), .rotate(rotate)
  );
  assign iter_done = rotate;

  // ---- crossbars -----------------------------------------------------------
  crossbar #(.N_SRC(W_NSRC), .N_SINK(W_NSINK), .W(WORD_W)) u_wxbar (
    .src(wsrc), .sel(cfg.wsel), .snk(wsnk)
  );
  crossbar #(.N_SRC(B_NSRC), .N_SINK(B_NSINK), .W(1)) u_bxbar (
    .src(bsrc), .sel(cfg.bsel), .snk(bsnk)
  );

  // ---- processing elements ----------------------------------------------------
  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    logic [PE_MAX_IN-1:0][WORD_W-1:0] xin;
    for (genvar i = 0; i < PE_MAX_IN; i++) begin : g_port
      assign xin[i] = wsnk[WK_PE + p*PE_MAX_IN + i];
    end
    pe #(.KIND(PE_KINDS[p])) u_pe (
      .clk(clk), .rst_n(rst_n), .cfg(cfg.pe[p]), .rotate(rotate),
      .xin(xin), .pred_in(bsnk[BK_PE + p]),
      .out(wsrc[WS_PE + p]), .flag_out(bsrc[BS_PE + p])
    );
  end

  // ---- cluster-wide rotating register file -------------------------------------
  rotating_rf #(.DEPTH(CRF_DEPTH), .NRD(CRF_RD), .WIDTH(WORD_W)) u_crf (
    .clk(clk), .rst_n(rst_n), .rotate(rotate),
    .we(cfg.crf_we), .waddr(cfg.crf_waddr), .wdata(wsnk[WK_CRF]),
    .raddr(cfg.crf_raddr), .rdata(wsrc[WS_CRF +: CRF_RD])
  );

  // ---- data memory banks ----------------------------------------------------------
  for (genvar m = 0; m < NUM_DMEM; m++) begin : g_dmem
    data_mem #(.DEPTH(DMEM_DEPTH), .WIDTH(WORD_W)) u_dmem (
      .clk(clk), .en(cfg.dmem_en[m]), .we(cfg.dmem_we[m]),
      .addr(wsnk[WK_DADDR + m]), .wdata(wsnk[WK_DWDAT + m]), .rdata(wsrc[WS_DMEM + m])
    );
  end

  // ---- distributed registers --------------------------------------------------
  for (genvar r = 0; r < NUM_DREG; r++) begin : g_dreg
    dist_reg #(.WIDTH(WORD_W)) u_dreg (
      .clk(clk), .rst_n(rst_n), .en(cfg.dreg_en[r]),
      .d(wsnk[WK_DREG + r]), .q(wsrc[WS_DREG + r])
    );
  end

  // ---- 1-bit control path: LUT3 units ----------------------------------------
  for (genvar l = 0; l < NUM_LUT; l++) begin : g_lut
    lut3_pe u_lut (
      .clk(clk), .rst_n(rst_n), .en(cfg.lut_en[l]), .tt(cfg.lut_tt[l]),
      .in(bsnk[BK_LUT + 3*l +: 3]), .out(bsrc[BS_LUT + l])
    );
  end

  // ---- grid ports and immediate -------------------------------------------
  assign wsrc[WS_GRID +: NUM_GRID_IN] = grid_in;
  assign wsrc[WS_IMM]                 = cfg.imm;
  assign grid_out                     = wsnk[WK_GRID +: NUM_GRID_OUT];
  assign bsrc[BS_GRID +: NUM_GRID_BIN] = grid_bin;
  assign grid_bout                    = bsnk[BK_GRID +: NUM_GRID_BOUT];

endmodule

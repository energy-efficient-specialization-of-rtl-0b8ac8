// cgra_pkg: types and constants shared by the CGRA cluster.
//
// The cluster is a statically scheduled, cycle-by-cycle reconfigured tile with
// a 32-bit datapath and a 1-bit predicate path. Every cycle a context word
// (ctx_cfg_t) configures all processing elements (PEs), both crossbars and the
// storage. The 32-bit width and the four PEs per cluster follow the source architecture;
// port counts, register-file sizes and encodings are this design's choices.
package cgra_pkg;

  localparam int unsigned WORD_W    = 32;
  localparam int unsigned NUM_PE    = 4;
  localparam int unsigned PE_MAX_IN = 4;   // the Universal FU has 4 input ports

  // Per-PE private rotating register file
  localparam int unsigned LRF_DEPTH = 8;
  localparam int unsigned LRF_AW    = $clog2(LRF_DEPTH);

  // Cluster-wide large rotating register file
  localparam int unsigned CRF_DEPTH = 16;
  localparam int unsigned CRF_AW    = $clog2(CRF_DEPTH);
  localparam int unsigned CRF_RD    = 2;

  localparam int unsigned NUM_DMEM      = 2;   // data memory banks
  localparam int unsigned NUM_DREG      = 2;
  localparam int unsigned NUM_GRID_IN   = 4;
  localparam int unsigned NUM_GRID_OUT  = 4;
  localparam int unsigned NUM_LUT       = 2;
  localparam int unsigned NUM_GRID_BIN  = 2;
  localparam int unsigned NUM_GRID_BOUT = 2;

  // ---- word crossbar map ----------------------------------------------------
  // sources
  localparam int unsigned WS_PE   = 0;                       // 4 PE outputs
  localparam int unsigned WS_CRF  = WS_PE + NUM_PE;          // 2 CRF read ports
  localparam int unsigned WS_DMEM = WS_CRF + CRF_RD;         // 2 memory banks' read data
  localparam int unsigned WS_DREG = WS_DMEM + NUM_DMEM;      // 2 distributed registers
  localparam int unsigned WS_GRID = WS_DREG + NUM_DREG;      // 4 grid inputs
  localparam int unsigned WS_IMM  = WS_GRID + NUM_GRID_IN;   // per-context immediate
  localparam int unsigned W_NSRC  = WS_IMM + 1;              // 15
  localparam int unsigned W_SW    = $clog2(W_NSRC);
  // sinks
  localparam int unsigned WK_PE    = 0;                              // PE p port i at p*4+i
  localparam int unsigned WK_CRF   = WK_PE + NUM_PE * PE_MAX_IN;     // CRF write data
  localparam int unsigned WK_DADDR = WK_CRF + 1;                     // bank m address at +m
  localparam int unsigned WK_DWDAT = WK_DADDR + NUM_DMEM;            // bank m write data at +m
  localparam int unsigned WK_DREG  = WK_DWDAT + NUM_DMEM;            // distributed registers
  localparam int unsigned WK_GRID  = WK_DREG + NUM_DREG;             // grid outputs
  localparam int unsigned W_NSINK  = WK_GRID + NUM_GRID_OUT;         // 27

  // ---- 1-bit crossbar map ---------------------------------------------------
  localparam int unsigned BS_PE   = 0;                       // 4 PE flags
  localparam int unsigned BS_LUT  = BS_PE + NUM_PE;          // 2 LUT outputs
  localparam int unsigned BS_GRID = BS_LUT + NUM_LUT;        // 2 grid predicate inputs
  localparam int unsigned B_NSRC  = BS_GRID + NUM_GRID_BIN;  // 8
  localparam int unsigned B_SW    = $clog2(B_NSRC);
  localparam int unsigned BK_PE   = 0;                       // 4 PE predicate inputs
  localparam int unsigned BK_LUT  = BK_PE + NUM_PE;          // LUT l input k at l*3+k
  localparam int unsigned BK_GRID = BK_LUT + 3 * NUM_LUT;    // grid predicate outputs
  localparam int unsigned B_NSINK = BK_GRID + NUM_GRID_BOUT; // 12

  // Kinds of functional unit (Section 4 of the design description)
  typedef enum logic [2:0] {
    FU_ALU       = 3'd0,
    FU_SHIFTER   = 3'd1,
    FU_MADD      = 3'd2,
    FU_SALU      = 3'd3,
    FU_UNIVERSAL = 3'd4
  } fu_kind_e;

  // Word operations. OP_NOP must stay 0: an all-zero context word is idle.
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    // ALU: simple arithmetic
    OP_ADD  = 5'd1,  OP_SUB  = 5'd2,  OP_NEG  = 5'd3,
    // ALU: logic
    OP_AND  = 5'd4,  OP_OR   = 5'd5,  OP_XOR  = 5'd6,  OP_NOT  = 5'd7,  OP_PASS = 5'd8,
    // ALU: comparisons (word result 0/1 and flag)
    OP_EQ   = 5'd9,  OP_NE   = 5'd10, OP_LT   = 5'd11, OP_LTU  = 5'd12,
    OP_LE   = 5'd13, OP_LEU  = 5'd14,
    // ALU: select  y = pred ? a : b
    OP_SEL  = 5'd15,
    // shifter
    OP_SLL  = 5'd16, OP_SRL  = 5'd17, OP_SRA  = 5'd18, OP_ROTL = 5'd19,
    OP_ROTR = 5'd20, OP_FSHR = 5'd21,
    // MADD (two cycles)
    OP_MUL  = 5'd22, OP_MADD = 5'd23, OP_MSUB = 5'd24
  } fu_op_e;

  function automatic logic op_is_alu(fu_op_e op);
    return op inside {[OP_ADD:OP_SEL]};
  endfunction

  function automatic logic op_is_cmp(fu_op_e op);
    return op inside {[OP_EQ:OP_LEU]};
  endfunction

  // Shifts that need only two operand ports
  function automatic logic op_is_shift2(fu_op_e op);
    return op inside {[OP_SLL:OP_ROTR]};
  endfunction

  function automatic logic op_is_madd(fu_op_e op);
    return op inside {[OP_MUL:OP_MSUB]};
  endfunction

  // Where each PE operand comes from
  typedef enum logic [1:0] {
    SRC_XBAR   = 2'd0,  // crossbar input this cycle
    SRC_RETIME = 2'd1,  // input retiming register
    SRC_LRF    = 2'd2,  // private rotating register file
    SRC_SELF   = 2'd3   // this PE's own output register
  } opnd_src_e;

  typedef struct packed {
    fu_op_e                      op;
    opnd_src_e [PE_MAX_IN-1:0]   src;
    logic      [PE_MAX_IN-1:0]   retime_en;
    logic      [LRF_AW-1:0]      lrf_raddr;
    logic                        lrf_we;
    logic      [LRF_AW-1:0]      lrf_waddr;
  } pe_cfg_t;

  // One context: the whole cluster's configuration for one cycle
  typedef struct packed {
    pe_cfg_t [NUM_PE-1:0]                 pe;
    logic    [W_NSINK-1:0][W_SW-1:0]      wsel;
    logic    [B_NSINK-1:0][B_SW-1:0]      bsel;
    logic                                 crf_we;
    logic    [CRF_AW-1:0]                 crf_waddr;
    logic    [CRF_RD-1:0][CRF_AW-1:0]     crf_raddr;
    logic    [NUM_DMEM-1:0]               dmem_en;
    logic    [NUM_DMEM-1:0]               dmem_we;
    logic    [NUM_DREG-1:0]               dreg_en;
    logic    [NUM_LUT-1:0]                lut_en;
    logic    [NUM_LUT-1:0][7:0]           lut_tt;
    logic    [WORD_W-1:0]                 imm;
  } ctx_cfg_t;

endpackage

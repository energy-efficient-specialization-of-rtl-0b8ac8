// pe: processing element = one functional unit plus its word-wide peripheral
// logic.
//
// KIND selects the functional unit: ALU, Shifter, MADD, S-ALU or Universal.
// The number of crossbar input ports it uses follows from the kind (ALU 2,
// Shifter 2, MADD 3, S-ALU 2, Universal 4, as the source architecture lists); inputs of
// the 4-wide bundle beyond that are ignored.
//
// Peripheral logic, configured per cycle by `cfg`:
//  * an input retiming register per used port, loading its crossbar input
//    when cfg.retime_en[i] is set, so an operand can arrive early and wait;
//  * operand multiplexers: operand i comes from the crossbar (SRC_XBAR), its
//    retiming register (SRC_RETIME), the private register file's read port
//    (SRC_LRF) or the PE's own output register (SRC_SELF); the last two let a
//    chain of operations stay inside the PE without using the crossbar;
//  * a private rotating register file (LRF_ENTRIES entries, one read port),
//    written from the output register when cfg.lrf_we is set;
//  * the output register `out` and the predicate register `flag_out`, loaded
//    when the unit produces a result or a comparison.
// Timing: ALU and shift results appear on `out` one cycle after issue, MADD
// results two cycles after issue. The retiming registers, register file and
// multiplexers are named by the source architecture; their arrangement is this design's.
module pe
  import cgra_pkg::*;
#(
  parameter fu_kind_e    KIND      = FU_UNIVERSAL,
  parameter int unsigned LRF_ENTRIES = LRF_DEPTH,
  localparam int unsigned N_IN = (KIND == FU_UNIVERSAL) ? 4 : (KIND == FU_MADD) ? 3 : 2
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  pe_cfg_t                          cfg,
  input  logic                             rotate,
  input  logic [PE_MAX_IN-1:0][WORD_W-1:0] xin,
  input  logic                             pred_in,
  output logic [WORD_W-1:0]                out,
  output logic                             flag_out
);

  logic [PE_MAX_IN-1:0][WORD_W-1:0] rt_q;
  logic [PE_MAX_IN-1:0][WORD_W-1:0] opnd;
  logic [0:0][WORD_W-1:0]           lrf_rdata;
  logic [WORD_W-1:0]                fu_y;
  logic                             fu_y_valid, fu_flag, fu_flag_valid;

  // ---- input retiming registers and operand multiplexers --------------------
  for (genvar i = 0; i < PE_MAX_IN; i++) begin : g_in
    if (i < N_IN) begin : g_used
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                rt_q[i] <= '0;
        else if (cfg.retime_en[i]) rt_q[i] <= xin[i];
      end
      always_comb begin
        unique case (cfg.src[i])
          SRC_XBAR:   opnd[i] = xin[i];
          SRC_RETIME: opnd[i] = rt_q[i];
          SRC_LRF:    opnd[i] = lrf_rdata[0];
          default:    opnd[i] = out;
        endcase
      end
    end else begin : g_unused
      assign rt_q[i] = '0;
      assign opnd[i] = '0;
    end
  end

  // ---- functional unit -------------------------------------------------------
  if (KIND == FU_UNIVERSAL) begin : g_universal
    universal_fu u_fu (
      .clk(clk), .rst_n(rst_n), .op(cfg.op),
      .a(opnd[0]), .b(opnd[1]), .c(opnd[2]), .d(opnd[3]), .pred(pred_in),
      .y(fu_y), .y_valid(fu_y_valid), .flag(fu_flag), .flag_valid(fu_flag_valid)
    );
  end else if (KIND == FU_SALU) begin : g_salu
    s_alu u_fu (
      .op(cfg.op), .a(opnd[0]), .b(opnd[1]), .pred(pred_in),
      .y(fu_y), .flag(fu_flag), .y_valid(fu_y_valid), .flag_valid(fu_flag_valid)
    );
  end else if (KIND == FU_MADD) begin : g_madd
    madd u_fu (
      .clk(clk), .rst_n(rst_n), .op(cfg.op),
      .a(opnd[0]), .b(opnd[1]), .c(opnd[2]), .y(fu_y), .valid(fu_y_valid)
    );
    assign fu_flag       = 1'b0;
    assign fu_flag_valid = 1'b0;
  end else if (KIND == FU_SHIFTER) begin : g_shifter
    funnel_shifter u_fu (
      .op(cfg.op), .a(opnd[0]), .b(opnd[1]), .c('0), .y(fu_y)
    );
    assign fu_y_valid    = op_is_shift2(cfg.op);
    assign fu_flag       = 1'b0;
    assign fu_flag_valid = 1'b0;
  end else begin : g_alu
    alu u_fu (
      .op(cfg.op), .a(opnd[0]), .b(opnd[1]), .pred(pred_in), .y(fu_y), .flag(fu_flag)
    );
    assign fu_y_valid    = op_is_alu(cfg.op);
    assign fu_flag_valid = op_is_cmp(cfg.op);
  end

  // ---- output and predicate registers ---------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out      <= '0;
      flag_out <= 1'b0;
    end else begin
      if (fu_y_valid)    out      <= fu_y;
      if (fu_flag_valid) flag_out <= fu_flag;
    end
  end

  // ---- private rotating register file ----------------------------------------
  rotating_rf #(.DEPTH(LRF_ENTRIES), .NRD(1), .WIDTH(WORD_W)) u_lrf (
    .clk(clk), .rst_n(rst_n), .rotate(rotate),
    .we(cfg.lrf_we), .waddr(cfg.lrf_waddr[$clog2(LRF_ENTRIES)-1:0]), .wdata(out),
    .raddr(cfg.lrf_raddr[$clog2(LRF_ENTRIES)-1:0]), .rdata(lrf_rdata)
  );

endmodule

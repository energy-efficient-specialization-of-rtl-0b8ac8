// universal_fu: compound functional unit with MADD, funnel shifter, ALU and
// select behind four operand ports and one result port.
//
// One operation issues per cycle. ALU and shift operations complete
// combinationally (the PE registers them: one cycle of latency); MUL, MADD
// and MSUB take two cycles through the pipelined `madd`. The output
// multiplexer gives the MADD result when one completes this cycle and the
// single-cycle result otherwise; a schedule that makes both complete together
// is an error, reported by an assertion, and the MADD result wins.
// Operand use: a, b for the ALU and shifts; a*b+c for the MADD; d is the low
// word of the two-word funnel shift FSHR: y = low W bits of {a, d} >> b[4:0].
// Four ports follow the source architecture; what the fourth port carries is this
// design's choice.
module universal_fu
  import cgra_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  fu_op_e         op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   c,
  input  logic [W-1:0]   d,
  input  logic           pred,
  output logic [W-1:0]   y,
  output logic           y_valid,
  output logic           flag,
  output logic           flag_valid
);

  logic [W-1:0] alu_y, sh_y, madd_y;
  logic         madd_valid, single_valid;

  alu #(.W(W)) u_alu (
    .op(op), .a(a), .b(b), .pred(pred), .y(alu_y), .flag(flag)
  );

  funnel_shifter #(.W(W)) u_shift (
    .op(op), .a(a), .b(b), .c(d), .y(sh_y)
  );

  madd #(.W(W)) u_madd (
    .clk(clk), .rst_n(rst_n), .op(op), .a(a), .b(b), .c(c),
    .y(madd_y), .valid(madd_valid)
  );

  assign single_valid = op_is_alu(op) || op_is_shift2(op) || (op == OP_FSHR);

  always_comb begin
    if (madd_valid)                                       y = madd_y;
    else if (op_is_shift2(op) || (op == OP_FSHR))         y = sh_y;
    else                                                  y = alu_y;
  end

  assign y_valid    = madd_valid || single_valid;
  assign flag_valid = op_is_cmp(op);

  // The static schedule must not let a MADD result and a one-cycle result
  // reach the shared output port in the same cycle.
  a_no_port_conflict: assert property (
    @(posedge clk) disable iff (!rst_n) !(madd_valid && single_valid))
    else $error("universal_fu: MADD result and single-cycle result collide");

endmodule

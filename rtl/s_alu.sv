// s_alu: compound functional unit made of an ALU (with select) and a funnel
// shifter.
//
// Both primitive units see the same two operand ports and share one result
// port, so the unit executes one operation per cycle, chosen by `op`; the
// output multiplexer follows the operation. Combinational; the PE registers
// the result (one-cycle latency). `y_valid` and `flag_valid` tell the PE
// whether `op` is one this unit executes and whether it produces a predicate.
// The composition and the two ports follow the source architecture; the two-operand
// funnel shifter here has no third word, so the FSHR operation is not offered.
module s_alu
  import cgra_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  fu_op_e         op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           pred,
  output logic [W-1:0]   y,
  output logic           flag,
  output logic           y_valid,
  output logic           flag_valid
);

  logic [W-1:0] alu_y, sh_y;

  alu #(.W(W)) u_alu (
    .op(op), .a(a), .b(b), .pred(pred), .y(alu_y), .flag(flag)
  );

  funnel_shifter #(.W(W)) u_shift (
    .op(op), .a(a), .b(b), .c('0), .y(sh_y)
  );

  assign y          = op_is_shift2(op) ? sh_y : alu_y;
  assign y_valid    = op_is_alu(op) || op_is_shift2(op);
  assign flag_valid = op_is_cmp(op);

endmodule

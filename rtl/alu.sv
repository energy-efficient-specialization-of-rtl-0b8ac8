// alu: 32-bit arithmetic and logic unit with select.
//
// Combinational. Executes the simple arithmetic operations (add, subtract,
// negate), bitwise logic, comparisons and select. Comparisons return 1/0 on
// the word output and on `flag`, which feeds the 1-bit predicate path; select
// returns `a` when the predicate is 1 and `b` otherwise. That the ALU carries
// select follows the source architecture; the exact list of logic and compare operations
// and the predicate polarity are this design's choices. Operations it does not
// execute give y = 0, flag = 0. The enclosing PE registers the result, so an
// ALU operation has one cycle of latency.
module alu
  import cgra_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  fu_op_e         op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           pred,
  output logic [W-1:0]   y,
  output logic           flag
);

  logic [W-1:0] diff;
  logic         lt_s, lt_u, eq;

  assign diff = a - b;
  assign eq   = (a == b);
  assign lt_u = (a < b);
  assign lt_s = ($signed(a) < $signed(b));

  always_comb begin
    flag = 1'b0;
    unique case (op)
      OP_EQ:   flag = eq;
      OP_NE:   flag = !eq;
      OP_LT:   flag = lt_s;
      OP_LTU:  flag = lt_u;
      OP_LE:   flag = lt_s || eq;
      OP_LEU:  flag = lt_u || eq;
      default: flag = 1'b0;
    endcase
  end

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = diff;
      OP_NEG:  y = -a;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_NOT:  y = ~a;
      OP_PASS: y = a;
      OP_EQ, OP_NE, OP_LT, OP_LTU, OP_LE, OP_LEU:
               y = {{(W-1){1'b0}}, flag};
      OP_SEL:  y = pred ? a : b;
      default: y = '0;
    endcase
  end

endmodule

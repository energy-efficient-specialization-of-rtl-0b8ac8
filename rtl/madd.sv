// madd: two-cycle pipelined fused multiply-add.
//
// Cycle 1 (issue): the product a*b, the addend c and the operation are
// registered. Cycle 2: the registered product is added to (MADD), subtracted
// from (MSUB) or passed unchanged (MUL) the addend, combinationally, and
// `valid` says that y holds such a result; the enclosing PE captures y in its
// output register at the end of cycle 2, so the result leaves the PE two cycles
// after issue. The two-cycle latency and the three operands follow the
// source architecture; the wrap-around 32-bit result is this design's choice. A new
// operation may issue every cycle.
module madd
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
  output logic [W-1:0]   y,
  output logic           valid
);

  logic [W-1:0] prod_q, c_q;
  fu_op_e       op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q   <= OP_NOP;
      prod_q <= '0;
      c_q    <= '0;
    end else begin
      op_q <= op_is_madd(op) ? op : OP_NOP;
      if (op_is_madd(op)) begin
        prod_q <= W'(a * b);
        c_q    <= c;
      end
    end
  end

  always_comb begin
    unique case (op_q)
      OP_MADD: y = prod_q + c_q;
      OP_MSUB: y = prod_q - c_q;
      default: y = prod_q;
    endcase
  end

  assign valid = op_is_madd(op_q);

endmodule

// funnel_shifter: logarithmic funnel shifter.
//
// Every shift is one right shift of a 2W-bit word {hi, lo} by an amount of
// 0..W, done in log2(W)+1 binary-weighted multiplexer stages; the low W bits
// are the result. The operation only picks hi, lo and the amount:
//   SRL  {0, a} >> s        SRA  {sign(a), a} >> s     SLL  {a, 0} >> (W-s)
//   ROTR {a, a} >> s        ROTL {a, a} >> (W-s)       FSHR {a, c} >> s
// with s = b[log2 W - 1:0]. That the shifter is a logarithmic funnel shifter
// follows the source architecture; the operation set and the use of operand b as the
// amount are this design's choices. FSHR needs the third operand c, which only
// the Universal FU provides. Combinational; y = 0 for other operations.
module funnel_shifter
  import cgra_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  fu_op_e         op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   c,
  output logic [W-1:0]   y
);

  localparam int unsigned SW = $clog2(W);

  logic [SW-1:0]  s;
  logic [SW:0]    amt;      // 0..W
  logic [W-1:0]   hi, lo;
  logic [2*W-1:0] stage [SW+2];

  assign s = b[SW-1:0];

  always_comb begin
    hi  = '0;
    lo  = '0;
    amt = {1'b0, s};
    unique case (op)
      OP_SRL:  begin hi = '0;            lo = a;  amt = {1'b0, s};              end
      OP_SRA:  begin hi = {W{a[W-1]}};   lo = a;  amt = {1'b0, s};              end
      OP_SLL:  begin hi = a;             lo = '0; amt = (SW+1)'(W) - {1'b0, s}; end
      OP_ROTR: begin hi = a;             lo = a;  amt = {1'b0, s};              end
      OP_ROTL: begin hi = a;             lo = a;  amt = (SW+1)'(W) - {1'b0, s}; end
      OP_FSHR: begin hi = a;             lo = c;  amt = {1'b0, s};              end
      default: begin hi = '0;            lo = '0; amt = '0;                     end
    endcase
  end

  // Stage k shifts by 2**k when amount bit k is set.
  assign stage[0] = {hi, lo};
  for (genvar k = 0; k <= SW; k++) begin : g_stage
    assign stage[k+1] = amt[k] ? (stage[k] >> (2**k)) : stage[k];
  end

  assign y = stage[SW+1][W-1:0];

endmodule

// alu: 16-bit ALU of the HW machine.
//
// Control is the ALUOp word {Ainv, Bneg, Op1, Op0}. Ainv inverts operand A;
// Bneg inverts operand B and feeds a carry of 1 into the adder, so that
// Op = 10 with Bneg = 1 computes A - B. Op = 00 is AND, 01 is OR, 10 is
// add; Op = 11 is undefined in the ISA and returns 0 here. The inverted
// operands reach the AND and OR paths too, as in a bit-slice ALU.
// zero is 1 when the result is 0 (BEQ uses it after a subtraction).
// overflow flags two's-complement overflow of the adder and is 0 for the
// logic operations; that restriction is this design's choice.
// Purely combinational.
module alu
  import hw_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_t      op,
  output logic [W-1:0] result,
  output logic         zero,
  output logic         overflow
);
  logic [W-1:0] aa, bb, sum;

  always_comb begin
    aa  = op.ainv ? ~a : a;
    bb  = op.bneg ? ~b : b;
    sum = aa + bb + W'(op.bneg);
    unique case (op.fn)
      ALU_AND: result = aa & bb;
      ALU_OR:  result = aa | bb;
      ALU_ADD: result = sum;
      default: result = '0;
    endcase
    zero     = (result == '0);
    overflow = (op.fn == ALU_ADD) && (aa[W-1] == bb[W-1]) && (sum[W-1] != aa[W-1]);
  end
endmodule

// alu_compare: comparison unit of the ALU (purely combinational).
//
// Does not compare the operands itself: it reads the flags of the
// adder/subtractor working in subtraction mode (diff = a - b) and turns
// them into a one-bit result r (1 = true):
//   equal / not equal     zero flag of the subtraction
//   unsigned >= / <       carry out of the subtraction (1 = no borrow)
//   signed >= / <         a >= b when a is non-negative and b negative, or
//                         when a and b have the same sign and the
//                         difference is non-negative; otherwise a < b.
// Function codes (op) follow alu_pkg::cmp_op_e; the two unused codes give
// false. The ALU zero-extends r to the data path width.
//
// Interface: a_msb, b_msb, diff_msb are the sign bits of a, b and a - b;
// carry and zero come from the adder/subtractor; op is 3 bits.
module alu_compare
  import alu_pkg::*;
(
  input  logic    a_msb,
  input  logic    b_msb,
  input  logic    diff_msb,
  input  logic    carry,
  input  logic    zero,
  input  cmp_op_e op,
  output logic    r
);

  logic ge_signed;

  always_comb begin
    ge_signed = (!a_msb && b_msb) || ((a_msb == b_msb) && !diff_msb);
    unique case (op)
      CMP_GE_S: r = ge_signed;
      CMP_LT_S: r = !ge_signed;
      CMP_NE:   r = !zero;
      CMP_EQ:   r = zero;
      CMP_GE_U: r = carry;
      CMP_LT_U: r = !carry;
      default:  r = 1'b0;
    endcase
  end

endmodule

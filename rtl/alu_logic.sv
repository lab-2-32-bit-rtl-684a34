// alu_logic: bitwise logical unit of the ALU (purely combinational).
//
// r = a NOR b, a AND b, a OR b or a XOR b, chosen by the 2-bit op with the
// codes of alu_pkg::logic_op_e (00 nor, 01 and, 10 or, 11 xor).
//
// Interface: a, b, r are WIDTH bits.
module alu_logic
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic_op_e        op,
  output logic [WIDTH-1:0] r
);

  always_comb begin
    unique case (op)
      LOGIC_NOR: r = ~(a | b);
      LOGIC_AND: r = a & b;
      LOGIC_OR:  r = a | b;
      LOGIC_XOR: r = a ^ b;
      default:   r = '0;
    endcase
  end

endmodule

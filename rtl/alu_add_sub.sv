// alu_add_sub: adder/subtractor of the ALU (purely combinational).
//
// Computes r = a + b when sub = 0 and r = a - b when sub = 1. Subtraction
// is done in two's complement: every bit of b is XORed with sub (inverted
// when subtracting) and sub itself is the adder's carry-in, giving
// a + ~b + 1. `carry` is the carry out of the most significant bit; after
// a subtraction it is 1 exactly when a >= b as unsigned numbers (no
// borrow). `zero` is 1 when r is all zeros.
//
// Interface: a, b, r are WIDTH bits; sub, carry, zero are single bits.
// The inversion and carry-in scheme, and the carry and zero outputs, are
// as the ALU description specifies; there is no overflow output because
// none is described.
module alu_add_sub #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] r,
  output logic             carry,
  output logic             zero
);

  logic [WIDTH-1:0] b_eff;   // b, or its one's complement when subtracting

  always_comb begin
    b_eff        = b ^ {WIDTH{sub}};
    {carry, r}   = {1'b0, a} + {1'b0, b_eff} + {{WIDTH{1'b0}}, sub};
    zero         = (r == '0);
  end

endmodule

// alu_shift: shift / rotate unit of the ALU (purely combinational).
//
// Shifts or rotates a by amt, the low log2(WIDTH) bits of the ALU's
// operand b (5 bits for a 32-bit ALU); the rest of b is ignored. Functions (op, see
// alu_pkg::shift_op_e): rol, ror, sll, srl, sra; the three unused codes
// give zero.
//
// Structure: a single right rotator does all five functions. Left
// operations use the fact that rotating left by n equals rotating right
// by -n (mod WIDTH), so the rotator amount is the two's complement of the
// shift amount for rol and sll. Shifts then mask the bits that wrapped
// around: cleared for sll and srl, filled with a's sign bit for sra.
//
// Interface: a, r are WIDTH bits; amt is the SHW-bit shift amount (the
// ALU connects the low SHW bits of its operand b); op is 3 bits.
module alu_shift
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH,
  localparam int unsigned SHW  = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [SHW-1:0]   amt,
  input  shift_op_e        op,
  output logic [WIDTH-1:0] r
);

  logic               left;       // rol or sll
  logic [SHW-1:0]     rot_amt;    // right-rotation amount
  logic [2*WIDTH-1:0] doubled;    // a concatenated with itself
  logic [WIDTH-1:0]   rotated;    // a rotated right by rot_amt
  logic [WIDTH-1:0]   keep_r;     // bits kept by a right shift
  logic [WIDTH-1:0]   keep_l;     // bits kept by a left shift

  always_comb begin
    left       = (op == SHIFT_ROL) || (op == SHIFT_SLL);
    rot_amt    = left ? SHW'(-amt) : amt;
    doubled    = {a, a};
    rotated    = WIDTH'(doubled >> rot_amt);
    keep_r     = {WIDTH{1'b1}} >> amt;
    keep_l     = {WIDTH{1'b1}} << amt;
    unique case (op)
      SHIFT_ROL,
      SHIFT_ROR: r = rotated;
      SHIFT_SLL: r = rotated & keep_l;
      SHIFT_SRL: r = rotated & keep_r;
      SHIFT_SRA: r = (rotated & keep_r) | ({WIDTH{a[WIDTH-1]}} & ~keep_r);
      default:   r = '0;
    endcase
  end

endmodule

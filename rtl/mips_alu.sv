// mips_alu: 32-bit MIPS-style ALU, the top of the design (purely
// combinational, no clock or reset).
//
// Four units work on the operands in parallel and a 4:1 multiplexer picks
// one result by op[5:4]:
//   00 adder/subtractor (alu_add_sub)  op[3] = 1 subtracts
//   01 comparison unit  (alu_compare)  op[2:0] selects the comparison
//   10 logical unit     (alu_logic)    op[1:0] selects nor/and/or/xor
//   11 shift/rotate     (alu_shift)    op[2:0] selects rol/ror/sll/srl/sra
// The comparison unit has no subtractor of its own: it reads the carry,
// zero and result sign bit of the adder/subtractor, whose op[3] is 1 for
// every comparison opcode. Its one-bit result is zero-extended. Opcodes
// are listed in alu_pkg (OP_*).
//
// Interface: a, b operands, op 6-bit opcode, r result; r settles one
// combinational delay after the inputs. Only r leaves the ALU, as in the
// block diagram the design follows; the adder's carry and zero flags stay
// internal.
module mips_alu
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [5:0]       op,
  output logic [WIDTH-1:0] r
);

  logic [WIDTH-1:0] addsub_r;
  logic             addsub_carry;
  logic             addsub_zero;
  logic             cmp_bit;
  logic [WIDTH-1:0] cmp_r;
  logic [WIDTH-1:0] logic_r;
  logic [WIDTH-1:0] shift_r;

  alu_add_sub #(.WIDTH(WIDTH)) u_add_sub (
    .a     (a),
    .b     (b),
    .sub   (op[3]),
    .r     (addsub_r),
    .carry (addsub_carry),
    .zero  (addsub_zero)
  );

  alu_compare u_compare (
    .a_msb    (a[WIDTH-1]),
    .b_msb    (b[WIDTH-1]),
    .diff_msb (addsub_r[WIDTH-1]),
    .carry    (addsub_carry),
    .zero     (addsub_zero),
    .op       (cmp_op_e'(op[2:0])),
    .r        (cmp_bit)
  );

  assign cmp_r = {{(WIDTH-1){1'b0}}, cmp_bit};

  alu_logic #(.WIDTH(WIDTH)) u_logic (
    .a  (a),
    .b  (b),
    .op (logic_op_e'(op[1:0])),
    .r  (logic_r)
  );

  alu_shift #(.WIDTH(WIDTH)) u_shift (
    .a   (a),
    .amt (b[$clog2(WIDTH)-1:0]),
    .op  (shift_op_e'(op[2:0])),
    .r   (shift_r)
  );

  alu_result_mux #(.WIDTH(WIDTH)) u_result_mux (
    .addsub_r (addsub_r),
    .cmp_r    (cmp_r),
    .logic_r  (logic_r),
    .shift_r  (shift_r),
    .sel      (alu_unit_e'(op[5:4])),
    .r        (r)
  );

endmodule

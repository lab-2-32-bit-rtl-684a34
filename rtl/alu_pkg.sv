// alu_pkg: shared types and constants of the 32-bit MIPS-style ALU.
//
// The 6-bit ALU opcode is split into fields that go straight to the units:
//   op[5:4]  unit select for the result multiplexer (alu_unit_e)
//   op[3]    subtraction mode of the adder/subtractor
//   op[2:0]  comparison function (cmp_op_e) or shift function (shift_op_e)
//   op[1:0]  logical function (logic_op_e)
// The encodings below are the ones of the ALU function table; the unit
// select values and their order follow the result multiplexer's inputs.
package alu_pkg;

  // Data path width of the ALU.
  parameter int unsigned ALU_WIDTH = 32;

  // Result multiplexer inputs, selected by op[5:4].
  typedef enum logic [1:0] {
    UNIT_ADDSUB = 2'b00,
    UNIT_CMP    = 2'b01,
    UNIT_LOGIC  = 2'b10,
    UNIT_SHIFT  = 2'b11
  } alu_unit_e;

  // Comparison functions, op[2:0]. 3'b000 and 3'b111 are not defined and
  // give false.
  typedef enum logic [2:0] {
    CMP_GE_S = 3'b001,
    CMP_LT_S = 3'b010,
    CMP_NE   = 3'b011,
    CMP_EQ   = 3'b100,
    CMP_GE_U = 3'b101,
    CMP_LT_U = 3'b110
  } cmp_op_e;

  // Logical functions, op[1:0].
  typedef enum logic [1:0] {
    LOGIC_NOR = 2'b00,
    LOGIC_AND = 2'b01,
    LOGIC_OR  = 2'b10,
    LOGIC_XOR = 2'b11
  } logic_op_e;

  // Shift / rotate functions, op[2:0]. 3'b100, 3'b101 and 3'b110 are not
  // defined and give zero.
  typedef enum logic [2:0] {
    SHIFT_ROL = 3'b000,
    SHIFT_ROR = 3'b001,
    SHIFT_SLL = 3'b010,
    SHIFT_SRL = 3'b011,
    SHIFT_SRA = 3'b111
  } shift_op_e;

  // Full 6-bit opcodes of the function table with their don't-care bits
  // (X) set to 0. Add and subtract accept any value in op[2:0], logical
  // functions any value in op[3:2], shifts any value in op[3].
  parameter logic [5:0] OP_ADD  = 6'b000000;
  parameter logic [5:0] OP_SUB  = 6'b001000;
  parameter logic [5:0] OP_GE_S = 6'b011001;
  parameter logic [5:0] OP_LT_S = 6'b011010;
  parameter logic [5:0] OP_NE   = 6'b011011;
  parameter logic [5:0] OP_EQ   = 6'b011100;
  parameter logic [5:0] OP_GE_U = 6'b011101;
  parameter logic [5:0] OP_LT_U = 6'b011110;
  parameter logic [5:0] OP_NOR  = 6'b100000;
  parameter logic [5:0] OP_AND  = 6'b100001;
  parameter logic [5:0] OP_OR   = 6'b100010;
  parameter logic [5:0] OP_XOR  = 6'b100011;
  parameter logic [5:0] OP_ROL  = 6'b110000;
  parameter logic [5:0] OP_ROR  = 6'b110001;
  parameter logic [5:0] OP_SLL  = 6'b110010;
  parameter logic [5:0] OP_SRL  = 6'b110011;
  parameter logic [5:0] OP_SRA  = 6'b110111;

endpackage

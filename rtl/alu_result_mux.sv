// alu_result_mux: output multiplexer of the ALU (purely combinational).
//
// Chooses one of the four unit results by the unit select, which is the
// opcode's two most significant bits: 0 adder/subtractor, 1 comparison
// (already zero-extended), 2 logical unit, 3 shift/rotate unit.
//
// Interface: four WIDTH-bit inputs, a 2-bit select, one WIDTH-bit output.
module alu_result_mux
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic [WIDTH-1:0] addsub_r,
  input  logic [WIDTH-1:0] cmp_r,
  input  logic [WIDTH-1:0] logic_r,
  input  logic [WIDTH-1:0] shift_r,
  input  alu_unit_e        sel,
  output logic [WIDTH-1:0] r
);

  always_comb begin
    unique case (sel)
      UNIT_ADDSUB: r = addsub_r;
      UNIT_CMP:    r = cmp_r;
      UNIT_LOGIC:  r = logic_r;
      UNIT_SHIFT:  r = shift_r;
      default:     r = '0;
    endcase
  end

endmodule

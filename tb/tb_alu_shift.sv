// tb_alu_shift: self-checking test of the shift / rotate unit.
//
// Every shift amount 0..31 with every one of the eight function codes on
// random operands (and on operands with the sign bit forced to 0 and 1).
// The reference moves bits one position at a time in a loop: for each
// step, rol moves the top bit to the bottom, ror the bottom bit to the
// top, sll/srl shift in a zero and sra a copy of the sign bit. Unused
// codes must give zero.
`timescale 1ns / 1ps
module tb_alu_shift;
  import alu_pkg::*;
  localparam int unsigned W = 32;

  logic [W-1:0] a, r;
  logic [4:0]   amt;
  logic [2:0]   op;
  int           checks = 0, failures = 0;

  alu_shift #(.WIDTH(W)) dut (.a(a), .amt(amt), .op(shift_op_e'(op)), .r(r));

  function automatic logic [W-1:0] ref_shift(logic [W-1:0] x, int n, int o);
    logic [W-1:0] y = x;
    if (o inside {4, 5, 6}) return '0;
    for (int k = 0; k < n; k++) begin
      case (o)
        0: y = {y[W-2:0], y[W-1]};
        1: y = {y[0], y[W-1:1]};
        2: y = {y[W-2:0], 1'b0};
        3: y = {1'b0, y[W-1:1]};
        default: y = {y[W-1], y[W-1:1]};
      endcase
    end
    return y;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    for (int rep = 0; rep < 20; rep++) begin
      for (int n = 0; n < W; n++) begin
        for (int o = 0; o < 8; o++) begin
          a = $urandom;
          if (rep == 0) a[W-1] = 1'b1;
          if (rep == 1) a[W-1] = 1'b0;
          amt = 5'(n); op = 3'(o);
          #1;
          exp = ref_shift(a, n, o);
          checks++;
          if (r !== exp) begin
            failures++;
            $display("FAIL a=%h amt=%0d op=%0d: r=%h expected %h", a, n, o, r, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

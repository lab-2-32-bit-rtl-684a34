// tb_alu_compare: self-checking test of the comparison unit.
//
// For each operand pair the testbench forms the flags a subtractor would
// give (sign bits of a, b and a - b, carry out of a + ~b + 1, zero), drives
// them into the unit for all eight function codes and compares the result
// with a direct signed or unsigned comparison of a and b. The two unused
// codes must give false.
`timescale 1ns / 1ps
module tb_alu_compare;
  import alu_pkg::*;
  localparam int unsigned W = 32;

  logic        a_msb, b_msb, diff_msb, carry, zero, r;
  logic [2:0]  op;
  int          checks = 0, failures = 0;

  alu_compare dut (.a_msb(a_msb), .b_msb(b_msb), .diff_msb(diff_msb), .carry(carry),
                   .zero(zero), .op(cmp_op_e'(op)), .r(r));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    logic [W:0] d;
    logic       exp;
    d = {1'b0, ta} + {1'b0, ~tb_} + 33'd1;
    for (int o = 0; o < 8; o++) begin
      a_msb = ta[W-1]; b_msb = tb_[W-1]; diff_msb = d[W-1]; carry = d[W];
      zero = (d[W-1:0] == 0); op = 3'(o);
      #1;
      case (o)
        1: exp = $signed(ta) >= $signed(tb_);
        2: exp = $signed(ta) <  $signed(tb_);
        3: exp = ta != tb_;
        4: exp = ta == tb_;
        5: exp = ta >= tb_;
        6: exp = ta <  tb_;
        default: exp = 1'b0;
      endcase
      checks++;
      if (r !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h op=%0d: r=%b expected %b", ta, tb_, o, r, exp);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corner [7] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000,
                                 32'h8000_0001, 32'h0000_1000};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    repeat (1000) begin
      logic [W-1:0] x;
      x = $urandom;
      check(x, $urandom);
      check(x, x);
      check(x, x + 32'($urandom_range(3)) - 32'd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

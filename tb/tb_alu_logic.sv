// tb_alu_logic: self-checking test of the logical unit.
//
// Random operands for each of the four functions; the expected value is
// built bit by bit from the truth table of nor, and, or and xor.
`timescale 1ns / 1ps
module tb_alu_logic;
  import alu_pkg::*;
  localparam int unsigned W = 32;

  logic [W-1:0] a, b, r;
  logic [1:0]   op;
  int           checks = 0, failures = 0;

  alu_logic #(.WIDTH(W)) dut (.a(a), .b(b), .op(logic_op_e'(op)), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    repeat (1000) begin
      a = $urandom; b = $urandom;
      for (int o = 0; o < 4; o++) begin
        op = 2'(o);
        #1;
        for (int i = 0; i < W; i++) begin
          // truth table indexed by {a_i, b_i}: nor 1000, and 0001, or 0111, xor 0110
          case (o)
            0: exp[i] = (a[i] == 0 && b[i] == 0);
            1: exp[i] = (a[i] == 1 && b[i] == 1);
            2: exp[i] = (a[i] == 1 || b[i] == 1);
            default: exp[i] = (a[i] != b[i]);
          endcase
        end
        checks++;
        if (r !== exp) begin
          failures++;
          $display("FAIL a=%h b=%h op=%0d: r=%h expected %h", a, b, o, r, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_alu_add_sub: self-checking test of the adder/subtractor.
//
// Applies corner operands (0, 1, all ones, the sign boundary) and random
// operands in both modes and compares r, carry and zero with a 33-bit
// reference sum computed here: a + b, or a + ~b + 1 for subtraction,
// whose bit 32 is the carry out.
`timescale 1ns / 1ps
module tb_alu_add_sub;
  localparam int unsigned W = 32;

  logic [W-1:0] a, b, r;
  logic         sub, carry, zero;
  int           checks = 0, failures = 0;

  alu_add_sub #(.WIDTH(W)) dut (.a(a), .b(b), .sub(sub), .r(r), .carry(carry), .zero(zero));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic ts);
    logic [W:0] exp;
    a = ta; b = tb_; sub = ts;
    #1;
    exp = ts ? ({1'b0, ta} + {1'b0, ~tb_} + 33'd1) : ({1'b0, ta} + {1'b0, tb_});
    checks++;
    if (r !== exp[W-1:0] || carry !== exp[W] || zero !== (exp[W-1:0] == 0)) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%b: r=%h c=%b z=%b, expected r=%h c=%b z=%b",
               ta, tb_, ts, r, carry, zero, exp[W-1:0], exp[W], exp[W-1:0] == 0);
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
    logic [W-1:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h1234_5678};
    foreach (corner[i]) foreach (corner[j]) begin
      check(corner[i], corner[j], 1'b0);
      check(corner[i], corner[j], 1'b1);
    end
    repeat (2000) begin
      check($urandom, $urandom, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mips_alu: end-to-end self-checking test of the complete ALU at its
// default 32-bit width.
//
// Runs all 64 opcode values (so every don't-care variant of the function
// table) on corner and random operand pairs and compares r with a
// reference ALU written here from the function table: plain SystemVerilog
// arithmetic, signed/unsigned comparisons and shift operators, and
// rotation built from two shifts. Opcodes the table leaves undefined
// (comparison codes 000 and 111, shift codes 100 to 110) must give zero.
// Opcodes 010xxx are not checked: they select the comparison unit while
// op[3] = 0 keeps the adder adding, so the result is not a comparison.
//
// The opcode constants of alu_pkg are checked against the same table.
//
// It also counts how often each mechanism of the ALU was exercised and
// counts a failure for any that never occurred: each of the 17 functions,
// an addition with carry out, a subtraction with borrow, a zero
// difference driving equal/not-equal, a signed and an unsigned comparison
// that disagree, each comparison both true and false, shifts by 0 and 31,
// sra of a negative operand, and opcodes with non-zero don't-care bits.
`timescale 1ns / 1ps
module tb_mips_alu;
  import alu_pkg::*;

  logic [31:0] a, b, r;
  logic [5:0]  op;
  int          checks = 0, failures = 0;

  mips_alu dut (.a(a), .b(b), .op(op), .r(r));

  // Mechanism counters.
  int fn_count [17];
  int add_carry, sub_borrow, zero_diff, sign_disagree, shift0, shift31, sra_neg, dont_care;
  int cmp_true [6], cmp_false [6];

  // Index into fn_count for an opcode, or -1 for an undefined opcode.
  function automatic int fn_index(logic [5:0] o);
    casez (o)
      6'b000???: return 0;
      6'b001???: return 1;
      6'b011001: return 2;
      6'b011010: return 3;
      6'b011011: return 4;
      6'b011100: return 5;
      6'b011101: return 6;
      6'b011110: return 7;
      6'b10??00: return 8;
      6'b10??01: return 9;
      6'b10??10: return 10;
      6'b10??11: return 11;
      6'b11?000: return 12;
      6'b11?001: return 13;
      6'b11?010: return 14;
      6'b11?011: return 15;
      6'b11?111: return 16;
      default:   return -1;
    endcase
  endfunction

  function automatic logic [31:0] ref_alu(logic [5:0] o, logic [31:0] x, logic [31:0] y);
    int n = int'(y[4:0]);
    case (fn_index(o))
      0:  return x + y;
      1:  return x - y;
      2:  return 32'($signed(x) >= $signed(y));
      3:  return 32'($signed(x) <  $signed(y));
      4:  return 32'(x != y);
      5:  return 32'(x == y);
      6:  return 32'(x >= y);
      7:  return 32'(x <  y);
      8:  return ~(x | y);
      9:  return x & y;
      10: return x | y;
      11: return x ^ y;
      12: return (x << n) | ((n == 0) ? 32'h0 : (x >> (32 - n)));
      13: return (x >> n) | ((n == 0) ? 32'h0 : (x << (32 - n)));
      14: return x << n;
      15: return x >> n;
      16: return 32'($signed(x) >>> n);
      default: return 32'h0;
    endcase
  endfunction

  task automatic run(input logic [31:0] ta, input logic [31:0] tb_);
    logic [31:0] exp;
    int          f;
    for (int o = 0; o < 64; o++) begin
      if (o[5:3] == 3'b010) continue;
      a = ta; b = tb_; op = 6'(o);
      #1;
      exp = ref_alu(op, ta, tb_);
      checks++;
      if (r !== exp) begin
        failures++;
        $display("FAIL op=%b a=%h b=%h: r=%h expected %h", op, ta, tb_, r, exp);
      end
      f = fn_index(op);
      if (f >= 0) begin
        fn_count[f]++;
        if (f == 0 && (33'(ta) + 33'(tb_)) > 33'hFFFF_FFFF) add_carry++;
        if (f == 1 && ta < tb_) sub_borrow++;
        if ((f == 4 || f == 5) && ta == tb_) zero_diff++;
        if (f == 2 && (($signed(ta) >= $signed(tb_)) != (ta >= tb_))) sign_disagree++;
        if (f >= 2 && f <= 7) begin
          if (r[0]) cmp_true[f-2]++; else cmp_false[f-2]++;
        end
        if (f >= 12 && tb_[4:0] == 0) shift0++;
        if (f >= 12 && tb_[4:0] == 31) shift31++;
        if (f == 16 && ta[31]) sra_neg++;
        if ((op[5:4] == 2'b00 && op[2:0] != 0) || (op[5:4] == 2'b10 && op[3:2] != 0) ||
            (op[5:4] == 2'b11 && op[3])) dont_care++;
      end
    end
  endtask

  task automatic need(input string what, input int count);
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [8] = '{32'h0, 32'h1, 32'h1F, 32'h20, 32'hFFFF_FFFF, 32'h7FFF_FFFF,
                                32'h8000_0000, 32'hDEAD_BEEF};
    string names [17] = '{"add", "sub", "ge_s", "lt_s", "ne", "eq", "ge_u", "lt_u",
                          "nor", "and", "or", "xor", "rol", "ror", "sll", "srl", "sra"};
    logic [5:0] op_const [17] = '{OP_ADD, OP_SUB, OP_GE_S, OP_LT_S, OP_NE, OP_EQ, OP_GE_U,
                                  OP_LT_U, OP_NOR, OP_AND, OP_OR, OP_XOR, OP_ROL, OP_ROR,
                                  OP_SLL, OP_SRL, OP_SRA};
    // The package's opcode constants must name the intended functions.
    foreach (op_const[i]) begin
      checks++;
      if (fn_index(op_const[i]) != i) begin
        failures++;
        $display("FAIL opcode constant %0d (%b) decodes as function %0d", i, op_const[i],
                 fn_index(op_const[i]));
      end
    end
    foreach (corner[i]) foreach (corner[j]) run(corner[i], corner[j]);
    repeat (3000) begin
      logic [31:0] x;
      x = $urandom;
      run(x, $urandom);
      run(x, x);
    end
    $display("mechanisms exercised (opcode applications):");
    foreach (names[i]) need(names[i], fn_count[i]);
    need("add with carry out", add_carry);
    need("subtract with borrow", sub_borrow);
    need("zero difference (eq/ne)", zero_diff);
    need("signed/unsigned disagree", sign_disagree);
    foreach (cmp_true[i]) begin
      need({names[i+2], " true"}, cmp_true[i]);
      need({names[i+2], " false"}, cmp_false[i]);
    end
    need("shift by 0", shift0);
    need("shift by 31", shift31);
    need("sra of negative operand", sra_neg);
    need("don't-care opcode bits set", dont_care);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

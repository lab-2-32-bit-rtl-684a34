// tb_alu_result_mux: self-checking test of the result multiplexer.
//
// Four distinct random inputs per trial; each select value must pass
// exactly its own input.
`timescale 1ns / 1ps
module tb_alu_result_mux;
  import alu_pkg::*;
  localparam int unsigned W = 32;

  logic [W-1:0] in [4];
  logic [W-1:0] r;
  logic [1:0]   sel;
  int           checks = 0, failures = 0;

  alu_result_mux #(.WIDTH(W)) dut (.addsub_r(in[0]), .cmp_r(in[1]), .logic_r(in[2]),
                                   .shift_r(in[3]), .sel(alu_unit_e'(sel)), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      foreach (in[i]) in[i] = {$urandom} ^ (32'(i) << 28);
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (r !== in[s]) begin
          failures++;
          $display("FAIL sel=%0d: r=%h expected %h", s, r, in[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

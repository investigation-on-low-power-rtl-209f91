// lzc8_tb: exhaustive self-checking test of the 8-bit leading-zero counter.
//
// Applies all 256 operands and compares the valid flag and the count with the
// loop reference model. It also checks the valid flag for the three operands
// the design description quotes (11110000, 10101010 and 00000000 give V = 1,
// 1 and 0). The counter is combinational: each result is sampled one time unit after
// its operand is applied, so a result that needs a clock would fail.
module lzc8_tb;
  import lzc_ref_pkg::*;

  logic [7:0] a;
  logic       v;
  logic [2:0] z;
  int checks = 0, failures = 0;

  lzc8 dut (.a(a), .v(v), .z(z));

  task automatic check(input logic [7:0] op);
    int unsigned exp_z;
    logic exp_v;
    a = op;
    #1;
    exp_z = ref_lzc({24'd0, op}, 8);
    exp_v = (op != 0);
    checks++;
    if (v !== exp_v || z !== exp_z[2:0]) begin
      failures++;
      $display("FAIL a=%b v=%b z=%0d expected v=%b z=%0d", op, v, z, exp_v, exp_z);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) check(8'(i));
    // Valid flag for the operands quoted with the design.
    a = 8'b1111_0000; #1; checks++; if (v !== 1'b1) begin failures++; $display("FAIL V for 11110000"); end
    a = 8'b1010_1010; #1; checks++; if (v !== 1'b1) begin failures++; $display("FAIL V for 10101010"); end
    a = 8'b0000_0000; #1; checks++; if (v !== 1'b0) begin failures++; $display("FAIL V for 00000000"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// lzc16_tb: exhaustive self-checking test of the 16-bit leading-zero counter.
//
// Applies all 65536 operands and compares the valid flag and the count with
// the loop reference model. Each result is sampled one time unit after its operand is
// applied: the counter is combinational. It also counts how often the upper
// byte and the lower byte supplied the count, and fails if either never did.
module lzc16_tb;
  import lzc_ref_pkg::*;

  logic [15:0] a;
  logic        v;
  logic [3:0]  z;
  int checks = 0, failures = 0;
  int upper_used = 0, lower_used = 0;

  lzc16 dut (.a(a), .v(v), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_z;
    for (int i = 0; i < 65536; i++) begin
      a = 16'(i);
      #1;
      exp_z = ref_lzc({16'd0, a}, 16);
      checks++;
      if (v !== (a != 0) || z !== exp_z[3:0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h v=%b z=%0d expected v=%b z=%0d", a, v, z, a != 0, exp_z);
      end
      if (a[15:8] != 0) upper_used++; else lower_used++;
    end
    checks++;
    if (upper_used == 0 || lower_used == 0) begin
      failures++;
      $display("FAIL a half was never selected");
    end
    $display("upper byte selected %0d times, lower byte %0d times", upper_used, lower_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// lzc32_tb: self-checking test of the 32-bit leading-zero counter.
//
// For every leading-zero count from 0 to 32 it applies 500 random operands with
// exactly that count (the bits below the first one are random), then 20000
// fully random operands and a walking one and walking zero. Each valid flag and
// count is compared with the loop reference model, one time unit after the operand is
// applied, since the counter is combinational.
module lzc32_tb;
  import lzc_ref_pkg::*;

  logic [31:0] a;
  logic        v;
  logic [4:0]  z;
  int checks = 0, failures = 0;

  lzc32 dut (.a(a), .v(v), .z(z));

  task automatic check(input logic [31:0] op);
    int unsigned exp_z;
    a = op;
    #1;
    exp_z = ref_lzc(op, 32);
    checks++;
    if (v !== (op != 0) || z !== exp_z[4:0]) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h v=%b z=%0d expected v=%b z=%0d", op, v, z, op != 0, exp_z);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lz = 0; lz <= 32; lz++)
      for (int k = 0; k < 500; k++) check(operand_with_lz(lz, 32));
    for (int k = 0; k < 20000; k++) check($urandom());
    for (int i = 0; i < 32; i++) begin
      check(32'd1 << i);
      check(~(32'd1 << i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

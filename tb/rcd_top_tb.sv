// rcd_top_tb: end-to-end test of the three counters together.
//
// Drives the 8-, 16- and 32-bit counters of rcd_top at once with operands of
// every possible leading-zero count (all-zero included) and with random
// operands, and compares every valid flag and count with the loop reference
// model. It counts how often each mechanism of the design was exercised and
// fails if one never was: every count value of every width, the all-zero
// (not valid) case of every width, each byte of the 16-bit counter and each of
// the four bytes of the 32-bit counter supplying the low count bits.
// The top has no parameters, so this is also the full-size test.
module rcd_top_tb;
  import lzc_ref_pkg::*;

  logic [7:0]  a8;
  logic        v8;
  logic [2:0]  z8;
  logic [15:0] a16;
  logic        v16;
  logic [3:0]  z16;
  logic [31:0] a32;
  logic        v32;
  logic [4:0]  z32;

  int checks = 0, failures = 0;
  int hit8[9], hit16[17], hit32[33];  // count of operands per leading-zero count
  int half16[2];                      // [1] upper byte selected, [0] lower byte
  int byte32[4];                      // byte of the 32-bit operand holding the first one

  rcd_top dut (.*);

  task automatic apply(input logic [7:0] o8, input logic [15:0] o16, input logic [31:0] o32);
    int unsigned e8, e16, e32;
    a8 = o8; a16 = o16; a32 = o32;
    #1;
    e8 = ref_lzc({24'd0, o8}, 8);
    e16 = ref_lzc({16'd0, o16}, 16);
    e32 = ref_lzc(o32, 32);
    checks += 3;
    if (v8 !== (o8 != 0) || z8 !== e8[2:0]) begin
      failures++; $display("FAIL 8-bit a=%h v=%b z=%0d exp %0d", o8, v8, z8, e8);
    end
    if (v16 !== (o16 != 0) || z16 !== e16[3:0]) begin
      failures++; $display("FAIL 16-bit a=%h v=%b z=%0d exp %0d", o16, v16, z16, e16);
    end
    if (v32 !== (o32 != 0) || z32 !== e32[4:0]) begin
      failures++; $display("FAIL 32-bit a=%h v=%b z=%0d exp %0d", o32, v32, z32, e32);
    end
    hit8[o8 == 0 ? 8 : e8]++;
    hit16[o16 == 0 ? 16 : e16]++;
    hit32[o32 == 0 ? 32 : e32]++;
    if (o16 != 0) half16[o16[15:8] != 0 ? 1 : 0]++;
    if (o32 != 0) byte32[3 - e32 / 8]++;
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
      for (int k = 0; k < 50; k++)
        apply(operand_with_lz(lz % 9, 8)[7:0], operand_with_lz(lz % 17, 16)[15:0],
              operand_with_lz(lz, 32));
    for (int k = 0; k < 5000; k++) apply($urandom(), $urandom(), $urandom());

    for (int i = 0; i <= 8; i++) begin
      checks++; if (hit8[i] == 0) begin failures++; $display("FAIL 8-bit count %0d never seen", i); end
    end
    for (int i = 0; i <= 16; i++) begin
      checks++; if (hit16[i] == 0) begin failures++; $display("FAIL 16-bit count %0d never seen", i); end
    end
    for (int i = 0; i <= 32; i++) begin
      checks++; if (hit32[i] == 0) begin failures++; $display("FAIL 32-bit count %0d never seen", i); end
    end
    for (int i = 0; i < 2; i++) begin
      checks++; if (half16[i] == 0) begin failures++; $display("FAIL 16-bit byte %0d never selected", i); end
    end
    for (int i = 0; i < 4; i++) begin
      checks++; if (byte32[i] == 0) begin failures++; $display("FAIL 32-bit byte %0d never selected", i); end
    end
    $display("all-zero operands: 8-bit %0d, 16-bit %0d, 32-bit %0d", hit8[8], hit16[16], hit32[32]);
    $display("16-bit byte selected: upper %0d lower %0d", half16[1], half16[0]);
    $display("32-bit byte selected: 3:%0d 2:%0d 1:%0d 0:%0d", byte32[3], byte32[2], byte32[1], byte32[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

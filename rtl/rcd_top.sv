// rcd_top: the three leading-zero counters of the design side by side.
//
// The design proposes one 8-bit counter and two wider counters assembled from
// it, a 16-bit one from two 8-bit counters and a 32-bit one from four. They are
// independent circuits with no shared signals, so this top simply holds one of
// each and brings out each one's operand, valid flag and count.
//
// Interface: a8/v8/z8 for the 8-bit counter, a16/v16/z16 for the 16-bit one,
// a32/v32/z32 for the 32-bit one; each z is the number of leading zeros of its
// operand and each v is 1 when the operand is not zero.
// Timing: purely combinational, no clock and no state.
module rcd_top (
  input  logic [7:0]  a8,
  output logic        v8,
  output logic [2:0]  z8,
  input  logic [15:0] a16,
  output logic        v16,
  output logic [3:0]  z16,
  input  logic [31:0] a32,
  output logic        v32,
  output logic [4:0]  z32
);

  lzc8  u_lzc8  (.a(a8),  .v(v8),  .z(z8));
  lzc16 u_lzc16 (.a(a16), .v(v16), .z(z16));
  lzc32 u_lzc32 (.a(a32), .v(v32), .z(z32));

endmodule

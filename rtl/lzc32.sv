// lzc32: 32-bit leading-zero counter made of four 8-bit counters.
//
// The operand is split into four bytes, each counted by its own lzc8. The two
// top count bits are a leading-zero count over the four byte valid flags (how
// many whole bytes of zeros stand above the first byte with a one), formed with
// the same kind of terms lzc8 uses on bit pairs:
//   z[4] = ~(v3 | v2)       z[3] = ~v3 & (v2 | ~v1)
// where v3 belongs to the most significant byte. The three low count bits are
// the count of the byte those two bits select, through a 4:1 multiplexer.
// The result is valid when any byte holds a one.
//
// The four-counter structure (no intermediate 16-bit stage) and the six outputs
// (V and five count bits) are those of the published 32-bit architecture; the
// combining stage is this design's own, as the simplest logic that merges the
// four bytes.
//
// Interface: a[31:0] in, a[31] most significant; v = 1 when a != 0;
// z[4:0] = number of leading zeros (31 when a == 0, with v = 0).
// Timing: purely combinational, no clock and no state.
module lzc32 (
  input  logic [31:0] a,
  output logic        v,
  output logic [4:0]  z
);

  logic [3:0]       vb;  // valid flag per byte, vb[3] for a[31:24]
  logic [3:0][2:0]  zb;  // count per byte

  for (genvar i = 0; i < 4; i++) begin : g_byte
    lzc8 u_byte (.a(a[8*i +: 8]), .v(vb[i]), .z(zb[i]));
  end

  logic [1:0] sel;  // number of all-zero bytes above the first non-zero one

  always_comb begin
    sel[1] = ~(vb[3] | vb[2]);
    sel[0] = ~vb[3] & (vb[2] | ~vb[1]);
    v      = |vb;
    z      = {sel, zb[2'd3 - sel]};
  end

endmodule

// lzc16: 16-bit leading-zero counter made of two 8-bit counters.
//
// The operand is split into an upper byte a[15:8] and a lower byte a[7:0], and
// each byte goes to its own lzc8. If the upper byte holds a one, the count is
// the upper counter's count with a 0 as its new top bit; otherwise it is 8
// plus the lower counter's count, i.e. the lower count with a 1 on top. The
// result is valid when either byte holds a one.
//
// The two-counter structure and the five outputs (V and four count bits) are
// those of the published 16-bit architecture; the combining stage (one
// inverter for the top bit, a 2:1 multiplexer per lower bit and an OR for V)
// is this design's own, as the simplest logic that merges the two halves.
//
// Interface: a[15:0] in, a[15] most significant; v = 1 when a != 0;
// z[3:0] = number of leading zeros (15 when a == 0, with v = 0).
// Timing: purely combinational, no clock and no state.
module lzc16 (
  input  logic [15:0] a,
  output logic        v,
  output logic [3:0]  z
);

  logic       v_hi, v_lo;
  logic [2:0] z_hi, z_lo;

  lzc8 u_hi (.a(a[15:8]), .v(v_hi), .z(z_hi));
  lzc8 u_lo (.a(a[7:0]),  .v(v_lo), .z(z_lo));

  always_comb begin
    v = v_hi | v_lo;
    z = {~v_hi, (v_hi ? z_hi : z_lo)};
  end

endmodule

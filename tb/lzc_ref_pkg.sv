// lzc_ref_pkg: reference model shared by the leading-zero counter testbenches.
//
// ref_lzc scans the operand from its most significant bit down and returns the
// number of zeros before the first one. It is written as a plain loop, with
// nothing in common with the gate terms of the design, so the testbenches can
// compare against it. For an all-zero operand it returns width - 1, the value
// the design's equations produce there (the valid flag is then 0).
package lzc_ref_pkg;

  function automatic int unsigned ref_lzc(input logic [31:0] a, input int unsigned width);
    for (int i = int'(width) - 1; i >= 0; i--) begin
      if (a[i]) return width - 1 - i;
    end
    return width - 1;
  endfunction

  // Random operand of the given width with exactly lz leading zeros
  // (lz == width gives zero).
  function automatic logic [31:0] operand_with_lz(input int unsigned lz, input int unsigned width);
    logic [31:0] r;
    r = $urandom();
    if (lz >= width) return '0;
    r = r & ((32'd1 << (width - 1 - lz)) - 32'd1);
    return r | (32'd1 << (width - 1 - lz));
  endfunction

endpackage

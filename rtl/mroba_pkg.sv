// mroba_pkg: constants and small helpers shared by the rounding-based
// multiplier modules.
//
// The multiplier rounds each operand magnitude to a power of two. An N-bit
// magnitude rounds to at most 2^N, so an exponent needs EXP_W(N) bits.
// The exact (modified) multiplier chains rounding stages on the rounding
// errors; the number of stages that always reaches the exact product is
// N/2 + 1 for unsigned operands and ceil(N/2) for signed ones, so
// default_stages() returns N/2 + 1, which covers both. That stage count is
// this design's own result, obtained by exhaustive evaluation of the
// rounding rule; it is not a figure of the original description.
package mroba_pkg;

  // Bits needed for an exponent in 0..n.
  function automatic int unsigned exp_w(int unsigned n);
    return $clog2(n + 1);
  endfunction

  // Rounding stages needed for an exact n x n product.
  function automatic int unsigned default_stages(int unsigned n);
    return n / 2 + 1;
  endfunction

endpackage

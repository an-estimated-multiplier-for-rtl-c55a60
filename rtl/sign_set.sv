// sign_set: last block of the rounding-based multiplier. It gives the
// unsigned magnitude result the sign worked out by the sign detector.
//
// How it works: when neg is set the magnitude is negated in two's
// complement (invert and add one); otherwise it passes unchanged. The
// result is cut to OW bits: the exact product of two N-bit operands always
// fits 2N bits, signed or unsigned, so OW = 2N loses nothing there.
// In unsigned mode the sign detector never sets neg.
//
// Interface: mag (IW bits), neg in; res (OW bits) out. Combinational.
//
// The block follows the block diagram; the negation circuit is this
// design's choice.
module sign_set #(
  parameter int unsigned IW = 17,
  parameter int unsigned OW = 16
) (
  input  logic [IW-1:0] mag,
  input  logic          neg,
  output logic [OW-1:0] res
);

  always_comb begin
    if (neg) res = OW'(~mag) + OW'(1);
    else     res = OW'(mag);
  end

endmodule

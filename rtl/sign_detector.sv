// sign_detector: first block of the rounding-based multiplier. It turns the
// two operands into magnitudes |A|, |B| and works out the sign of the product
// (sign of A xor sign of B), which the sign-set block applies at the end.
//
// Interface: a, b are N-bit operands, two's complement when SIGNED = 1 and
// plain unsigned when SIGNED = 0. mag_a, mag_b are N-bit unsigned magnitudes
// (the most negative value -2^(N-1) has magnitude 2^(N-1), which still fits
// N unsigned bits). neg_p is 1 when the product is negative. In unsigned mode
// the magnitudes are the operands and all signs are 0.
//
// Timing: purely combinational, as the whole multiplier is.
//
// The block and its role follow the block diagram of the multiplier; taking
// the magnitude by conditional two's complement is this design's choice.
module sign_detector #(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] mag_a,
  output logic [N-1:0] mag_b,
  output logic         neg_a,
  output logic         neg_b,
  output logic         neg_p
);

  always_comb begin
    neg_a = SIGNED && a[N-1];
    neg_b = SIGNED && b[N-1];
    mag_a = neg_a ? (~a + 1'b1) : a;
    mag_b = neg_b ? (~b + 1'b1) : b;
    neg_p = neg_a ^ neg_b;
  end

endmodule

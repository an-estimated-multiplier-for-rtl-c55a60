// rounding: rounds the two operand magnitudes |A| and |B| to their nearest
// powers of two, Ar = 2^ea and Br = 2^eb.
//
// How it works, per operand: a leading-one detector finds k, the position of
// the most significant 1. The bit just below it, bit k-1, tells whether the
// value is at least 1.5 * 2^k; if so the value is closer to (or, for the tie
// case 3 * 2^(k-1), as close to) 2^(k+1), and a small +1 adder raises the
// exponent to k+1. Ties therefore round upward, to the larger power of two.
// A zero magnitude gives Ar = 0 (nz = 0, exponent 0).
//
// Interface: mag_a, mag_b (N-bit unsigned) in; exp_a, exp_b (exponents,
// 0..N), ar, br (the rounded values as (N+1)-bit one-hot words, 0 for a zero
// input) and nz_a, nz_b (input is non-zero) out. Combinational.
//
// From the description: rounding to the nearest power of two, upward
// rounding of the 3 * 2^(p-2) ties, and the +1 adder after the rounding
// stage. The leading-one detector structure is this design's choice.
module rounding
  import mroba_pkg::*;
#(
  parameter int unsigned N  = 8,
  localparam int unsigned EW = exp_w(N)
) (
  input  logic [N-1:0]  mag_a,
  input  logic [N-1:0]  mag_b,
  output logic [EW-1:0] exp_a,
  output logic [EW-1:0] exp_b,
  output logic [N:0]    ar,
  output logic [N:0]    br,
  output logic          nz_a,
  output logic          nz_b
);

  // Leading-one position, the "round up" bit below it, and the exponent
  // after the +1 adder.
  function automatic logic [EW-1:0] round_exp(input logic [N-1:0] m);
    logic [EW-1:0] k;
    logic          up;
    k  = '0;
    up = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (m[i]) begin
        k  = EW'(i);
        up = (i > 0) ? m[(i > 0) ? i - 1 : 0] : 1'b0;
      end
    end
    return k + EW'(up);
  endfunction

  always_comb begin
    nz_a  = |mag_a;
    nz_b  = |mag_b;
    exp_a = round_exp(mag_a);
    exp_b = round_exp(mag_b);
    ar    = nz_a ? ((N+1)'(1) << exp_a) : '0;
    br    = nz_b ? ((N+1)'(1) << exp_b) : '0;
  end

endmodule

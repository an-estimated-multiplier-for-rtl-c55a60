// roba_mult: rounding-based approximate multiplier (RoBA). It replaces the
// product A*B by
//     Ar*B + Br*A - Ar*Br  =  A*B - (A - Ar)*(B - Br)
// where Ar and Br are A and B rounded to the nearest power of two, so every
// product term is a shift and only one addition and one subtraction remain.
// The dropped term (A - Ar)*(B - Br) is the approximation error.
//
// Datapath (instance names as in the RTL schematic of the original design):
//   S1   sign_detector  |A|, |B| and the product sign
//   R1   rounding       exponents ea, eb and Ar, Br
//   S11  shifter 1      Ar*B  = |B| << ea
//   S2   shifter 2      Ar*Br = Ar  << eb
//   S3   shifter 3      Br*A  = |A| << eb
//   A1   ks_adder       Ar*B + Br*A
//   S233 subtractor     (Ar*B + Br*A) - Ar*Br
//   sa16 sign_set       sign applied, result cut to 2N bits
//
// Besides the approximate product the module outputs the signed rounding
// errors res_a = A - sign(A)*Ar and res_b = B - sign(B)*Br, which the exact
// multiplier (mroba_mult) feeds to its next stage. Their magnitude is at most
// 2^(N-2), so they fit N signed bits.
//
// Interface: a, b (N bits; two's complement if SIGNED, else unsigned) in;
// p (2N bits, same signedness), res_a, res_b (N-bit two's complement) out.
// Timing: combinational, no clock.
//
// The formula, the block order and the adder/subtractor wiring follow the
// description. The magnitude of the approximate result is never negative and
// stays below 2^(2N) for these operand ranges, so the 2N-bit output is
// complete.
module roba_mult
  import mroba_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  output logic [N-1:0]   res_a,
  output logic [N-1:0]   res_b
);

  localparam int unsigned EW = exp_w(N);
  localparam int unsigned PW = 2 * N + 1;  // magnitude width of the terms

  logic [N-1:0]  mag_a, mag_b;
  logic          neg_a, neg_b, neg_p;
  logic [EW-1:0] exp_a, exp_b;
  logic [N:0]    ar, br;
  logic          nz_a, nz_b;
  logic [PW-1:0] ar_b, br_a, ar_br, sum_t, mag_p;
  logic          sum_co, sub_bo;

  sign_detector #(.N(N), .SIGNED(SIGNED)) S1 (
    .a(a), .b(b), .mag_a(mag_a), .mag_b(mag_b),
    .neg_a(neg_a), .neg_b(neg_b), .neg_p(neg_p)
  );

  rounding #(.N(N)) R1 (
    .mag_a(mag_a), .mag_b(mag_b), .exp_a(exp_a), .exp_b(exp_b),
    .ar(ar), .br(br), .nz_a(nz_a), .nz_b(nz_b)
  );

  shifter #(.DW(N), .SW(EW), .OW(PW)) S11 (
    .din(mag_b), .amt(exp_a), .zero(~nz_a), .dout(ar_b)
  );

  shifter #(.DW(N+1), .SW(EW), .OW(PW)) S2 (
    .din(ar), .amt(exp_b), .zero(~nz_b), .dout(ar_br)
  );

  shifter #(.DW(N), .SW(EW), .OW(PW)) S3 (
    .din(mag_a), .amt(exp_b), .zero(~nz_b), .dout(br_a)
  );

  ks_adder #(.W(PW)) A1 (
    .a(ar_b), .b(br_a), .cin(1'b0), .sum(sum_t), .cout(sum_co)
  );

  subtractor #(.W(PW)) S233 (
    .a(sum_t), .b(ar_br), .diff(mag_p), .borrow(sub_bo)
  );

  sign_set #(.IW(PW), .OW(2*N)) sa16 (
    .mag(mag_p), .neg(neg_p), .res(p)
  );

  // Rounding errors, signed, for the next stage of the exact multiplier.
  logic [N:0] err_a, err_b;
  always_comb begin
    err_a = {1'b0, mag_a} - ar;
    err_b = {1'b0, mag_b} - br;
    res_a = N'(neg_a ? (~err_a + 1'b1) : err_a);
    res_b = N'(neg_b ? (~err_b + 1'b1) : err_b);
  end

`ifndef SYNTHESIS
  // The sum of two terms below 2^(2N) cannot carry out of PW bits, and the
  // approximate magnitude is never negative.
  always_comb begin
    assert (!sum_co) else $error("roba_mult: adder carry out");
    assert (!sub_bo) else $error("roba_mult: negative approximate magnitude");
  end
`endif

endmodule

// ks_adder: Kogge-Stone parallel-prefix adder, the adder that sums the two
// shifter outputs Ar*B and Br*A in the rounding-based multiplier. The exact
// multiplier also uses it to add up the outputs of its rounding stages.
//
// How it works: per-bit generate g = a & b and propagate p = a ^ b; log2(W)
// prefix levels combine (g, p) pairs at distance 1, 2, 4, ... so that every
// bit's carry is known after ceil(log2(W+1)) levels; sum = p ^ carry.
//
// Interface: a, b (W bits), cin in; sum (W bits), cout out. Combinational.
//
// The Kogge-Stone choice follows the description; the width is set by the
// caller.
module ks_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LV = $clog2(W + 1);

  // Bit 0 of the prefix vectors stands for the carry in, so bit i+1 is
  // operand bit i.
  logic [W:0] g [LV+1];
  logic [W:0] p [LV+1];

  always_comb begin
    g[0] = {a & b, cin};
    p[0] = {a ^ b, 1'b0};
    for (int l = 0; l < LV; l++) begin
      for (int i = 0; i <= W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
          p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    // g[LV][i] is the carry into operand bit i (out of bits below it).
    sum  = (a ^ b) ^ g[LV][W-1:0];
    cout = g[LV][W];
  end

endmodule

// subtractor: computes a - b, the last arithmetic step of the rounding-based
// multiplier ((Ar*B + Br*A) - Ar*Br).
//
// How it works: a - b = a + ~b + 1, added by a chain of 4-bit carry-lookahead
// groups. Inside a group every carry is formed in two levels from the
// generate and propagate bits and the group's carry in; the group carry out,
// also formed by lookahead, ripples to the next group. A last group narrower than 4 bits simply uses
// fewer positions.
//
// Interface: a, b (W bits) in; diff (W bits) and borrow (1 when b > a as
// unsigned numbers) out. Combinational.
//
// The subtractor block follows the description; the chain of 4-bit
// carry-lookahead groups is taken from the carry path that the
// implementation timing report shows through this block.
module subtractor #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff,
  output logic         borrow
);

  localparam int unsigned NG = (W + 3) / 4;
  localparam int unsigned WP = 4 * NG;

  logic [WP-1:0] x, y, g, p;
  logic [WP:0]   c;

  always_comb begin
    x = WP'(a);
    y = ~WP'(b);
    // Padding positions above W must not pass a carry on.
    for (int i = W; i < WP; i++) y[i] = 1'b0;
  end

  assign g    = x & y;
  assign p    = x ^ y;
  assign c[0] = 1'b1;  // the +1 of the two's complement

  for (genvar k = 0; k < NG; k++) begin : g_cla
    logic ci;
    assign ci       = c[4*k];
    assign c[4*k+1] = g[4*k]   | (p[4*k]   & ci);
    assign c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k])
                               | (p[4*k+1] & p[4*k]   & ci);
    assign c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1])
                               | (p[4*k+2] & p[4*k+1] & g[4*k])
                               | (p[4*k+2] & p[4*k+1] & p[4*k] & ci);
    assign c[4*k+4] = g[4*k+3] | (p[4*k+3] & g[4*k+2])
                               | (p[4*k+3] & p[4*k+2] & g[4*k+1])
                               | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k])
                               | (p[4*k+3] & p[4*k+2] & p[4*k+1] & p[4*k] & ci);
  end

  assign diff   = W'(p ^ c[WP-1:0]);
  assign borrow = ~c[W];

endmodule

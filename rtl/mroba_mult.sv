// mroba_mult: modified rounding-based multiplier, which returns the exact
// product A*B while keeping the shift-and-add datapath of roba_mult.
//
// How it works: one RoBA stage computes A*B - (A - Ar)*(B - Br). The missing
// term is itself a product, of the two signed rounding errors, so it is
// handed to a second RoBA stage, whose own error goes to a third, and so on.
// Every error is less than half of its operand's rounded value, so the
// operands lose at least one bit per stage; once either operand of a stage is zero or a power
// of two that stage is exact and every later stage sees a zero operand and
// outputs 0. The stage outputs are added modulo 2^(2N) with Kogge-Stone
// adders. Because the true product fits 2N bits, the modular sum is the
// exact product. STAGES = N/2 + 1 stages always reach it (checked
// exhaustively for N up to 10, both signednesses).
//
// Interface: x, y (N bits; two's complement if SIGNED, else unsigned) in;
// p (2N bits, exact product), p_approx (2N bits, the first stage alone: the
// plain RoBA approximation) and active (bit i set when stage i had two
// non-zero operands, i.e. still had a correction to make) out.
// Timing: combinational.
//
// The description gives this multiplier's function (exact outputs, built by
// modifying the rounding-based multiplier) and shows exact products in its
// simulation waveform, but not its insides: the stage cascade on the
// rounding errors is this design's construction of that function.
module mroba_mult
  import mroba_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1,
  parameter int unsigned STAGES = default_stages(N)
) (
  input  logic [N-1:0]      x,
  input  logic [N-1:0]      y,
  output logic [2*N-1:0]    p,
  output logic [2*N-1:0]    p_approx,
  output logic [STAGES-1:0] active
);

  logic [N-1:0]   opa  [STAGES+1];
  logic [N-1:0]   opb  [STAGES+1];
  logic [2*N-1:0] term [STAGES];
  logic [2*N-1:0] acc  [STAGES];

  assign opa[0] = x;
  assign opb[0] = y;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    // Only the first stage sees the operands as given; the rounding errors
    // handed on are always signed.
    roba_mult #(.N(N), .SIGNED((i == 0) ? SIGNED : 1'b1)) u_roba (
      .a(opa[i]), .b(opb[i]), .p(term[i]),
      .res_a(opa[i+1]), .res_b(opb[i+1])
    );

    assign active[i] = (|opa[i]) && (|opb[i]);

    if (i == 0) begin : g_first
      assign acc[0] = term[0];
    end else begin : g_sum
      logic co_unused;
      ks_adder #(.W(2*N)) u_add (
        .a(acc[i-1]), .b(term[i]), .cin(1'b0), .sum(acc[i]), .cout(co_unused)
      );
    end
  end

  assign p        = acc[STAGES-1];
  assign p_approx = term[0];

endmodule

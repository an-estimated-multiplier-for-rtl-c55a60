// mroba_top: the modified rounding-based multiplier with its MAC
// accumulator.
//
// The multiplier (mroba_mult) is combinational: x and y in, the exact
// product p and the plain rounding-based approximation p_approx out in the
// same cycle, as in the stand-alone multiplier. The exact product also feeds
// a multiply-accumulate register (mac_unit), which adds it to acc on every
// rising clock edge with mac_en high; mac_clr empties it; ovf flags an
// accumulator overflow. active shows which correction stages of the exact
// multiplier were busy for the present operands.
//
// Defaults: N = 8 (8-bit operands and a 16-bit product, as in the published
// simulation waveform), SIGNED = 1 (two's complement operands, with the sign
// detector and sign set blocks in use), STAGES = N/2 + 1, ACCW = 2N + 8.
// Operand width and signed support follow the description; the stage count,
// the accumulator and its controls are this design's choices.
module mroba_top
  import mroba_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1,
  parameter int unsigned STAGES = default_stages(N),
  parameter int unsigned ACCW   = 2 * N + 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      x,
  input  logic [N-1:0]      y,
  output logic [2*N-1:0]    p,
  output logic [2*N-1:0]    p_approx,
  output logic [STAGES-1:0] active,
  input  logic              mac_clr,
  input  logic              mac_en,
  output logic [ACCW-1:0]   acc,
  output logic              ovf
);

  mroba_mult #(.N(N), .SIGNED(SIGNED), .STAGES(STAGES)) u_mult (
    .x(x), .y(y), .p(p), .p_approx(p_approx), .active(active)
  );

  mac_unit #(.PW(2*N), .ACCW(ACCW), .SIGNED(SIGNED)) u_mac (
    .clk(clk), .rst_n(rst_n), .clr(mac_clr), .en(mac_en),
    .prod(p), .acc(acc), .ovf(ovf)
  );

endmodule

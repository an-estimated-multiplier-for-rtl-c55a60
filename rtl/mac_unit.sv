// mac_unit: multiply-accumulate register fed by the multiplier. Each enabled
// clock cycle adds the product presented at its input to a running sum.
//
// How it works: the PW-bit product is sign-extended (SIGNED = 1) or
// zero-extended to the accumulator width and added by a Kogge-Stone adder;
// the sum is stored on the rising clock edge when en is high. clr has
// priority over en and empties the accumulator. rst_n is an asynchronous,
// active-low reset to 0. The accumulator wraps modulo 2^ACCW; ovf is a
// sticky flag set when an addition leaves the ACCW-bit range (signed or
// unsigned according to SIGNED), cleared by clr and reset.
//
// Interface: clk, rst_n, clr, en, prod (PW bits) in; acc (ACCW bits), ovf
// out. Timing: one cycle from an enabled product to the updated acc.
//
// A MAC unit built around the multiplier is named in the description but
// not detailed: the accumulator width (2N + 8 guard bits by default), the
// control signals and the overflow flag are this design's choices.
module mac_unit #(
  parameter int unsigned PW     = 16,
  parameter int unsigned ACCW   = 24,
  parameter bit          SIGNED = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            en,
  input  logic [PW-1:0]   prod,
  output logic [ACCW-1:0] acc,
  output logic            ovf
);

  logic [ACCW-1:0] ext, nxt;
  logic            co;
  logic            add_ovf;

  always_comb begin
    ext = ACCW'(prod);
    if (SIGNED && prod[PW-1])
      for (int i = PW; i < ACCW; i++) ext[i] = 1'b1;
  end

  ks_adder #(.W(ACCW)) u_add (
    .a(acc), .b(ext), .cin(1'b0), .sum(nxt), .cout(co)
  );

  always_comb begin
    if (SIGNED) add_ovf = (acc[ACCW-1] == ext[ACCW-1]) && (nxt[ACCW-1] != acc[ACCW-1]);
    else        add_ovf = co;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (clr) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (en) begin
      acc <= nxt;
      ovf <= ovf | add_ovf;
    end
  end

endmodule

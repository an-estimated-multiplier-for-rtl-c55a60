// shifter: logarithmic barrel shifter that multiplies a word by a power of
// two. The rounding-based multiplier uses three of them per product: B by
// 2^ea (Ar*B), A by 2^eb (Br*A) and Ar by 2^eb (Ar*Br).
//
// How it works: SW stages; stage s shifts left by 2^s when bit s of the
// shift amount is set. Bits shifted past OW are dropped (the callers size OW
// so that nothing is ever lost). When zero is set the output is 0, which is
// how a zero operand (rounded value 0) is handled.
//
// Interface: din (DW bits), amt (SW bits), zero in; dout (OW bits) out.
// Combinational.
//
// The use of shifters for the product terms follows the description; the
// barrel structure and the zero input are this design's choices.
module shifter #(
  parameter int unsigned DW = 8,
  parameter int unsigned SW = 4,
  parameter int unsigned OW = 17
) (
  input  logic [DW-1:0] din,
  input  logic [SW-1:0] amt,
  input  logic          zero,
  output logic [OW-1:0] dout
);

  logic [OW-1:0] stage [SW+1];

  always_comb begin
    stage[0] = zero ? '0 : OW'(din);
    for (int s = 0; s < SW; s++)
      stage[s+1] = amt[s] ? (stage[s] << (1 << s)) : stage[s];
    dout = stage[SW];
  end

endmodule

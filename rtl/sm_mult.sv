// sm_mult: sign-magnitude multiplier for the KLT datapath.
//
// Samples and coefficients are kept in sign-magnitude form, because in the
// over-clocked embedded multiplier negative two's complement operands show
// larger timing errors than positive ones. The magnitudes (W-1 bits each) go
// through one emb_mult; the product sign is the XOR of the operand signs.
// A zero product is always given sign 0 (this design's choice, so that
// there is a single zero).
//
// Interface: a, b are W-bit words {sign, magnitude}; p is a (2W-1)-bit word
// {sign, 2(W-1)-bit magnitude}. Combinational.
module sm_mult #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  output logic [2*W-2:0]   p
);
  logic [2*W-3:0] mag;

  emb_mult #(.W(W-1)) u_mult (
    .a (a[W-2:0]),
    .b (b[W-2:0]),
    .p (mag)
  );

  always_comb p = {(a[W-1] ^ b[W-1]) & (|mag), mag};
endmodule

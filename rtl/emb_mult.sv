// emb_mult: unsigned W x W multiplier, standing for one embedded hard
// multiplier of the FPGA.
//
// It is the unit that is over-clocked: in the KLT datapath it forms the
// magnitude of each sample x coefficient product, and in the
// characterisation circuit it is the unit under test. It is purely
// combinational; the registers that launch its operands and capture its
// product belong to the modules around it, because the hard multiplier
// cannot be pipelined internally. W = 8 matches the 8x8 unsigned multiplier
// that is characterised (the magnitude part of a 9-bit sign-magnitude word).
//
// Interface: a, b (W bits, unsigned) -> p (2W bits, unsigned), no clock.
module emb_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  always_comb p = a * b;
endmodule

// char_datapath: the measured path of the characterisation circuit.
//
// Operand registers A and B launch a new pair of operands into the
// multiplier under test on every edge of the data-path clock, and register R
// captures the product on the next edge. When the data-path clock is pushed
// beyond the multiplier's real delay, R captures a partly settled product:
// the difference to the exact product is the timing error that is being
// characterised. All three registers are on the data-path clock, as in the
// published schematic; nothing else sits in the A/B -> R path.
//
// Interface: a_in, b_in (W bits each, unsigned) come from the stimulus
// memory; r (2W bits) goes to the result memory. Latency: a pair present
// before edge n is in A/B after edge n and its product is in R after edge
// n+1. The registers have no reset (this design's choice): the first two
// outputs after start-up are not meaningful.
module char_datapath #(
  parameter int unsigned W = 8
) (
  input  logic           clk_dp,
  input  logic [W-1:0]   a_in,
  input  logic [W-1:0]   b_in,
  output logic [2*W-1:0] r
);
  logic [W-1:0]   a_q, b_q;
  logic [2*W-1:0] prod;

  always_ff @(posedge clk_dp) begin
    a_q <= a_in;
    b_q <= b_in;
  end

  emb_mult #(.W(W)) u_uut (
    .a (a_q),
    .b (b_q),
    .p (prod)
  );

  always_ff @(posedge clk_dp) r <= prod;
endmodule

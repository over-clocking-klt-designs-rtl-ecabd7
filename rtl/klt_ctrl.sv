// klt_ctrl: controller of the rolled KLT datapath.
//
// The input stream carries the P elements of each data vector one after the
// other. The controller counts the accepted samples modulo P, so that each
// sample is tagged with its dimension index p (which selects lambda_pk in
// every coefficient bank) and with the first / last flags that clear and
// close the accumulators. Samples may arrive with gaps: the index only moves
// on a cycle with x_valid = 1.
//
// Timing: idx, first and last describe the sample present in the current
// cycle (combinational from the counter); the counter advances at the rising
// edge of clk on which x_valid is 1. Active-low reset returns to index 0.
// The paper only names this FSM; the modulo-P counter is this design's
// simplest realisation of it.
module klt_ctrl #(
  parameter int unsigned P = klt_pkg::KLT_P,
  localparam int unsigned AW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  output logic [AW-1:0] idx,
  output logic          first,
  output logic          last
);
  logic [AW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt_q <= '0;
    else if (x_valid) cnt_q <= last ? '0 : cnt_q + 1'b1;
  end

  always_comb begin
    idx   = cnt_q;
    first = (cnt_q == '0);
    last  = (32'(cnt_q) == P - 1);
  end
endmodule

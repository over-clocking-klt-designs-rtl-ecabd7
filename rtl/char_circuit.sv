// char_circuit: the characterisation circuit for over-clocked embedded
// multipliers.
//
// The host loads operand pairs {A, B} into the input-stream memory
// (usually with B held at one constant coefficient m and A a stream of test
// data), sets the operating point (PLL frequency, core voltage,
// temperature) and raises the external trigger. The FSM then streams the
// operands through the launch registers A/B, the multiplier under test and
// the capture register R at full data-path clock rate and stores every
// captured product in the output-stream memory, which the host reads back
// to compute the error mean and variance per constant. The structure
// (memories, A/B/R registers, unit under test, FSM, two clocks from a PLL,
// external trigger) follows the published schematic; the PLL itself is
// outside this module, its two clocks are inputs.
//
// Interface:
//   clk_host                   clock of the host-side memory ports
//   clk_fsm, clk_dp            FSM clock and data-path clock (same
//                              frequency and phase assumed)
//   stim_we/stim_addr/stim_data  write port of the input-stream memory,
//                              stim_data = {A, B}
//   res_addr -> res_data       read port of the output-stream memory, one
//                              clk_host edge of latency
//   trigger, n_samples, busy, done: see char_fsm
module char_circuit #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 2000,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic           clk_host,
  input  logic           clk_fsm,
  input  logic           clk_dp,
  input  logic           rst_n,
  input  logic           stim_we,
  input  logic [AW-1:0]  stim_addr,
  input  logic [2*W-1:0] stim_data,
  input  logic [AW-1:0]  res_addr,
  output logic [2*W-1:0] res_data,
  input  logic           trigger,
  input  logic [CW-1:0]  n_samples,
  output logic           busy,
  output logic           done
);
  logic [AW-1:0]  stim_raddr, res_waddr;
  logic [2*W-1:0] stim_word, r;
  logic           res_we;

  stream_ram #(.DW(2 * W), .DEPTH(DEPTH)) u_input_stream (
    .wclk  (clk_host),
    .we    (stim_we),
    .waddr (stim_addr),
    .wdata (stim_data),
    .rclk  (clk_fsm),
    .raddr (stim_raddr),
    .rdata (stim_word)
  );

  char_datapath #(.W(W)) u_datapath (
    .clk_dp (clk_dp),
    .a_in   (stim_word[2*W-1:W]),
    .b_in   (stim_word[W-1:0]),
    .r      (r)
  );

  char_fsm #(.DEPTH(DEPTH), .LAT(3)) u_fsm (
    .clk        (clk_fsm),
    .rst_n      (rst_n),
    .trigger    (trigger),
    .n_samples  (n_samples),
    .stim_raddr (stim_raddr),
    .res_we     (res_we),
    .res_waddr  (res_waddr),
    .busy       (busy),
    .done       (done)
  );

  stream_ram #(.DW(2 * W), .DEPTH(DEPTH)) u_output_stream (
    .wclk  (clk_fsm),
    .we    (res_we),
    .waddr (res_waddr),
    .wdata (r),
    .rclk  (clk_host),
    .raddr (res_addr),
    .rdata (res_data)
  );
endmodule

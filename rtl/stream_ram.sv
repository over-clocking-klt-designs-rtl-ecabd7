// stream_ram: block RAM of the characterisation circuit, used both as the
// input-stream memory (stimulus operands) and the output-stream memory
// (captured products).
//
// A simple dual-port RAM with independent clocks: the host side loads the
// stimulus or reads back the results between runs, the test side is read or
// written by the characterisation FSM at the test clock. The circuit keeps
// the stimulus and results in block RAMs; the port arrangement and the depth
// are this design's choices. DEPTH = 2000 follows the run-time model of the
// characterisation, which grows in steps of 2000 test vectors, i.e. one
// memory load per 2000 samples.
//
// Timing: a write happens at the rising edge of wclk with we = 1. A read is
// synchronous: rdata shows mem[raddr] one rclk edge after raddr is applied,
// as in an FPGA block RAM. No reset; contents are undefined until written.
module stream_ram #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 2000,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rclk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end
endmodule

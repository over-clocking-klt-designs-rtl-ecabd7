// klt_coef_bank: coefficient store of one projection vector.
//
// Holds the P coefficients lambda_1k .. lambda_Pk of projection k, in
// sign-magnitude form, and the constant that is subtracted from the factor
// so that the mean timing error of the over-clocked multipliers becomes
// zero. The rolled dot product reads one coefficient per sample, addressed
// by the dimension index p from the controller.
//
// The optimisation flow produces a new coefficient set for every operating
// point (frequency, voltage, temperature, placement). Here the set is the
// reset value, taken from parameters, and a load port can replace it at run
// time; both are this design's choice of how the set reaches the circuit.
//
// Timing: rd_coef follows rd_addr combinationally. A write (wr_en or
// wr_off_en) takes effect at the next rising edge of clk. Reset is active-low
// and synchronous-to-clk (asynchronous assertion).
module klt_coef_bank #(
  parameter int unsigned P     = klt_pkg::KLT_P,
  parameter int unsigned W     = klt_pkg::SM_W,
  parameter int unsigned ACC_W = klt_pkg::ACC_W,
  parameter logic [P*W-1:0]   INIT_COEF   = klt_pkg::DEFAULT_LAMBDA[P*W-1:0],
  parameter logic [ACC_W-1:0] INIT_OFFSET = '0,
  localparam int unsigned AW = (P > 1) ? $clog2(P) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // load port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [W-1:0]     wr_data,
  input  logic             wr_off_en,
  input  logic [ACC_W-1:0] wr_offset,
  // read port
  input  logic [AW-1:0]    rd_addr,
  output logic [W-1:0]     rd_coef,
  output logic [ACC_W-1:0] offset
);
  logic [W-1:0] coef_q [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < P; i++) coef_q[i] <= INIT_COEF[i*W +: W];
      offset <= INIT_OFFSET;
    end else begin
      if (wr_en && (32'(wr_addr) < P)) coef_q[wr_addr] <= wr_data;
      if (wr_off_en) offset <= wr_offset;
    end
  end

  always_comb rd_coef = (32'(rd_addr) < P) ? coef_q[rd_addr] : '0;
endmodule

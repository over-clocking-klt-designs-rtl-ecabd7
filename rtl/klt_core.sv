// klt_core: the over-clocked KLT circuit, F = Lambda^T X, in the rolled
// architecture.
//
// The input stream X delivers the P elements of each data vector one per
// cycle. K dot-product units, one per projection vector (column of Lambda),
// see the same sample; each multiplies it by its own coefficient lambda_pk
// and accumulates. After the P-th element all K factors f_1..f_K appear
// together. With the default P = 6, K = 3 this is the Z^6 -> Z^3 projection
// using three 9x9 embedded multipliers, the configuration that is evaluated
// for over-clocking. Tolerance of timing errors does not come from extra
// circuitry: it comes from the coefficient set (chosen offline so that the
// multipliers, at the target frequency / voltage / temperature / placement,
// produce small errors) and from the per-factor offset that removes the
// mean error. Both live in the coefficient banks and can be reloaded.
//
// Interface:
//   x_valid, x      sample stream, sign-magnitude {sign, 8-bit magnitude};
//                   x_valid may drop between samples (the stream just waits)
//   coef_wr_*       writes lambda_pk (k = coef_wr_k, p = coef_wr_p)
//   off_wr_*        writes the offset of factor k
//   f_valid, f      the K factors, two's complement, f[k] = f_(k+1)
// Timing: f_valid pulses for one cycle, starting at the second clock edge
// after the edge that accepted the last element of a vector (three cycles
// from presenting it); f holds until the next vector.
module klt_core #(
  parameter int unsigned P     = klt_pkg::KLT_P,
  parameter int unsigned K     = klt_pkg::KLT_K,
  parameter int unsigned W     = klt_pkg::SM_W,
  parameter int unsigned ACC_W = 2 * (W - 1) + 1 + $clog2(P),
  parameter logic [K*P*W-1:0]   LAMBDA  = klt_pkg::DEFAULT_LAMBDA,
  parameter logic [K*ACC_W-1:0] OFFSETS = '0,
  localparam int unsigned PAW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned KAW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              x_valid,
  input  logic [W-1:0]                      x,
  input  logic                              coef_wr_en,
  input  logic [KAW-1:0]                    coef_wr_k,
  input  logic [PAW-1:0]                    coef_wr_p,
  input  logic [W-1:0]                      coef_wr_data,
  input  logic                              off_wr_en,
  input  logic [KAW-1:0]                    off_wr_k,
  input  logic [ACC_W-1:0]                  off_wr_data,
  output logic                              f_valid,
  output logic signed [K-1:0][ACC_W-1:0]    f
);
  logic [PAW-1:0] idx;
  logic           first, last;
  logic [K-1:0]   unit_valid;

  klt_ctrl #(.P(P)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .x_valid (x_valid),
    .idx     (idx),
    .first   (first),
    .last    (last)
  );

  for (genvar k = 0; k < K; k++) begin : g_proj
    logic [W-1:0]            coef;
    logic [ACC_W-1:0]        offset;
    logic signed [ACC_W-1:0] fk;

    klt_coef_bank #(
      .P           (P),
      .W           (W),
      .ACC_W       (ACC_W),
      .INIT_COEF   (LAMBDA[k*P*W +: P*W]),
      .INIT_OFFSET (OFFSETS[k*ACC_W +: ACC_W])
    ) u_bank (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (coef_wr_en && (32'(coef_wr_k) == k)),
      .wr_addr   (coef_wr_p),
      .wr_data   (coef_wr_data),
      .wr_off_en (off_wr_en && (32'(off_wr_k) == k)),
      .wr_offset (off_wr_data),
      .rd_addr   (idx),
      .rd_coef   (coef),
      .offset    (offset)
    );

    klt_dot_product #(.W(W), .ACC_W(ACC_W)) u_dot (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (x_valid),
      .first    (first),
      .last     (last),
      .x        (x),
      .coef     (coef),
      .offset   (offset),
      .f        (fk),
      .f_valid  (unit_valid[k])
    );

    assign f[k] = fk;
  end

  // all units run in lock step, so their valid flags are identical
  assign f_valid = &unit_valid;
endmodule

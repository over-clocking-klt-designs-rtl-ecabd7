// klt_overclock_top: the two circuits of the over-clocking method side by
// side.
//
//  * klt_core      the KLT datapath that is deployed over-clocked: a rolled
//                  Z^6 -> Z^3 projection with one embedded multiplier per
//                  projection vector and coefficients chosen for the
//                  measured error profile of those multipliers.
//  * char_circuit  the circuit that measures that error profile: it streams
//                  stimulus through one embedded multiplier at the test
//                  clock and records every product.
// In practice the two are separate FPGA configurations used one after the
// other (characterise, optimise offline, then deploy); here each keeps its
// own clocks and ports so that either can be used alone. The PLL that would
// generate klt_clk, char_clk_fsm and char_clk_dp is not part of the RTL.
//
// Ports are those of the two sub-circuits with klt_ / char_ prefixes; see
// klt_core and char_circuit for their timing.
module klt_overclock_top #(
  parameter int unsigned P          = klt_pkg::KLT_P,
  parameter int unsigned K          = klt_pkg::KLT_K,
  parameter int unsigned W          = klt_pkg::SM_W,
  parameter int unsigned CHAR_DEPTH = 2000,
  localparam int unsigned ACC_W = 2 * (W - 1) + 1 + $clog2(P),
  localparam int unsigned PAW   = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned KAW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned MW    = W - 1,
  localparam int unsigned CAW   = (CHAR_DEPTH > 1) ? $clog2(CHAR_DEPTH) : 1,
  localparam int unsigned CCW   = $clog2(CHAR_DEPTH + 1)
) (
  // KLT circuit
  input  logic                           klt_clk,
  input  logic                           klt_rst_n,
  input  logic                           klt_x_valid,
  input  logic [W-1:0]                   klt_x,
  input  logic                           klt_coef_wr_en,
  input  logic [KAW-1:0]                 klt_coef_wr_k,
  input  logic [PAW-1:0]                 klt_coef_wr_p,
  input  logic [W-1:0]                   klt_coef_wr_data,
  input  logic                           klt_off_wr_en,
  input  logic [KAW-1:0]                 klt_off_wr_k,
  input  logic [ACC_W-1:0]               klt_off_wr_data,
  output logic                           klt_f_valid,
  output logic signed [K-1:0][ACC_W-1:0] klt_f,
  // characterisation circuit
  input  logic                           char_clk_host,
  input  logic                           char_clk_fsm,
  input  logic                           char_clk_dp,
  input  logic                           char_rst_n,
  input  logic                           char_stim_we,
  input  logic [CAW-1:0]                 char_stim_addr,
  input  logic [2*MW-1:0]                char_stim_data,
  input  logic [CAW-1:0]                 char_res_addr,
  output logic [2*MW-1:0]                char_res_data,
  input  logic                           char_trigger,
  input  logic [CCW-1:0]                 char_n_samples,
  output logic                           char_busy,
  output logic                           char_done
);
  klt_core #(.P(P), .K(K), .W(W), .ACC_W(ACC_W)) u_klt (
    .clk          (klt_clk),
    .rst_n        (klt_rst_n),
    .x_valid      (klt_x_valid),
    .x            (klt_x),
    .coef_wr_en   (klt_coef_wr_en),
    .coef_wr_k    (klt_coef_wr_k),
    .coef_wr_p    (klt_coef_wr_p),
    .coef_wr_data (klt_coef_wr_data),
    .off_wr_en    (klt_off_wr_en),
    .off_wr_k     (klt_off_wr_k),
    .off_wr_data  (klt_off_wr_data),
    .f_valid      (klt_f_valid),
    .f            (klt_f)
  );

  char_circuit #(.W(MW), .DEPTH(CHAR_DEPTH)) u_char (
    .clk_host  (char_clk_host),
    .clk_fsm   (char_clk_fsm),
    .clk_dp    (char_clk_dp),
    .rst_n     (char_rst_n),
    .stim_we   (char_stim_we),
    .stim_addr (char_stim_addr),
    .stim_data (char_stim_data),
    .res_addr  (char_res_addr),
    .res_data  (char_res_data),
    .trigger   (char_trigger),
    .n_samples (char_n_samples),
    .busy      (char_busy),
    .done      (char_done)
  );
endmodule

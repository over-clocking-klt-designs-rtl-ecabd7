// klt_dot_product: rolled dot product for one projection vector of the KLT.
//
// f_k = sum_p x_p * lambda_pk - offset_k. One sample and its coefficient
// enter per cycle; a single sign-magnitude multiplier and an accumulator
// with feedback do the whole sum, so one multiplier serves all P dimensions.
// The offset is the constant subtracted so that the mean of the multipliers'
// over-clocking error becomes zero.
//
// Pipeline (this design's choice, matching an embedded multiplier with input
// and output registers):
//   edge 1: sample x and coefficient are registered (multiplier inputs)
//   edge 2: the sign-magnitude product is registered (multiplier output)
//   edge 3: the product is added to the accumulator; the first product of
//           a vector is added to -offset instead, so the offset costs no
//           extra adder. On the last element the finished sum is loaded into
//           f and f_valid is raised for 1 cycle.
// The accumulator stage is one adder: the sign-magnitude product enters it
// as (sign ? ~magnitude : magnitude) with the sign as carry-in, and -offset
// is kept in a register. This keeps the accumulator far shorter than the
// multiplier path, which must remain the only path that over-clocking
// stresses.
//
// So f_valid rises at the second clock edge after the edge that accepted
// the last sample of a vector (three cycles from presenting it), and a new
// vector can follow with no gap: throughput is one sample per cycle, one
// factor per P cycles. f is two's complement and
// holds its value until the next vector completes. The offset in force is
// the one present a cycle before the vector's first product reaches the
// accumulator (change it only between vectors).
//
// Interface: in_valid/first/last qualify x and coef in the same cycle
// (from klt_ctrl). Active-low reset clears the valid pipeline and f.
module klt_dot_product #(
  parameter int unsigned W     = klt_pkg::SM_W,
  parameter int unsigned ACC_W = klt_pkg::ACC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    first,
  input  logic                    last,
  input  logic [W-1:0]            x,
  input  logic [W-1:0]            coef,
  input  logic signed [ACC_W-1:0] offset,
  output logic signed [ACC_W-1:0] f,
  output logic                    f_valid
);
  localparam int unsigned PW = 2 * W - 1;   // sign-magnitude product width

  // stage 1: multiplier input registers
  logic [W-1:0] x_q, c_q;
  logic         v1_q, first1_q, last1_q;
  // stage 2: multiplier output register
  logic [PW-1:0] prod;
  logic [PW-1:0] prod_q;
  logic          v2_q, first2_q, last2_q;
  // stage 3: accumulator
  logic signed [ACC_W-1:0] term, sum, acc_q, neg_off_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0; first1_q <= 1'b0; last1_q <= 1'b0;
      x_q  <= '0;   c_q      <= '0;
    end else begin
      v1_q     <= in_valid;
      first1_q <= first;
      last1_q  <= last;
      if (in_valid) begin
        x_q <= x;
        c_q <= coef;
      end
    end
  end

  sm_mult #(.W(W)) u_mult (
    .a (x_q),
    .b (c_q),
    .p (prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2_q <= 1'b0; first2_q <= 1'b0; last2_q <= 1'b0;
      prod_q <= '0;
    end else begin
      v2_q     <= v1_q;
      first2_q <= first1_q;
      last2_q  <= last1_q;
      if (v1_q) prod_q <= prod;
    end
  end

  // -offset, registered so that it adds no carry chain to the accumulator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) neg_off_q <= '0;
    else        neg_off_q <= -offset;
  end

  // sign-magnitude product into the accumulator as a single addition
  always_comb begin
    term = ACC_W'(prod_q[PW-2:0]);
    if (prod_q[PW-1]) term = ~term;
    sum = (first2_q ? neg_off_q : acc_q) + term + ACC_W'(prod_q[PW-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      f       <= '0;
      f_valid <= 1'b0;
    end else begin
      f_valid <= v2_q && last2_q;
      if (v2_q) begin
        acc_q <= sum;
        if (last2_q) f <= sum;
      end
    end
  end
endmodule

// klt_pkg: constants and types shared by the over-clocked KLT datapath and
// the multiplier characterisation circuit.
//
// The KLT projects P = 6 input dimensions onto K = 3 factors, with samples
// and coefficients quantised to 9 bits in sign-magnitude form (1 sign bit,
// 8 magnitude bits). These three numbers are the evaluated configuration of
// the method; the accumulator width is this design's own choice: a 16-bit
// product magnitude, a sign bit and ceil(log2(P)) growth bits.
package klt_pkg;
  localparam int unsigned KLT_P = 6;   // input dimensions (Z^6)
  localparam int unsigned KLT_K = 3;   // projected dimensions (Z^3)
  localparam int unsigned SM_W  = 9;   // sign-magnitude word width
  localparam int unsigned MAG_W = SM_W - 1;
  localparam int unsigned ACC_W = 2 * MAG_W + 1 + $clog2(KLT_P);  // 20 bits

  // default projection matrix: three orthonormal columns of +-1/sqrt(6),
  // scaled by 256 (0.408 * 256 = 104) and stored column after column,
  // element p of column k at bit offset (k*P + p)*SM_W
  localparam logic [SM_W-1:0] SM_POS = {1'b0, 8'd104};
  localparam logic [SM_W-1:0] SM_NEG = {1'b1, 8'd104};
  localparam logic [KLT_K*KLT_P*SM_W-1:0] DEFAULT_LAMBDA = {
    // column 2: + - + - + -  (element 5 first, as the MSBs)
    SM_NEG, SM_POS, SM_NEG, SM_POS, SM_NEG, SM_POS,
    // column 1: + + + - - -
    SM_NEG, SM_NEG, SM_NEG, SM_POS, SM_POS, SM_POS,
    // column 0: + + + + + +
    SM_POS, SM_POS, SM_POS, SM_POS, SM_POS, SM_POS
  };
endpackage

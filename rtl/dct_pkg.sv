// dct_pkg: widths, coefficients and shared types of the 8-point
// distributed-arithmetic (DA) DCT.
//
// The 1-D DCT is F(u) = 1/2 C(u) sum_i X(i) cos((2i+1)u pi/16), with
// C(0) = 1/sqrt(2) and C(u) = 1 otherwise. After the butterfly the seven
// distinct coefficients are COS_K = 1/2 cos(k pi/16), k = 1..7:
//   A = COS_1, B = COS_3, C = COS_5, D = COS_7   (odd outputs)
//   M = COS_2, N = COS_6                        (F(2), F(6))
//   P = COS_4                                   (F(0), F(4))
// Each is held as a COEF_W = 13 bit signed number with COEF_FRAC = 12
// fractional bits: COS_K = round(4096 * cos(k pi/16) / 2).
// The 13-bit width of the coefficient and of the serialised operand is
// the one printed in the DA figure; the 12 fractional bits are this
// design's choice (the largest coefficient, 0.49, then uses the full
// signed range). Samples and results are 8 bits wide, as in the
// simulation waveforms.
package dct_pkg;

  localparam int unsigned X_W       = 8;   // input sample width
  localparam int unsigned COEF_W    = 13;  // DA coefficient width ("A")
  localparam int unsigned DATA_W    = 13;  // serialised operand width ("B")
  localparam int unsigned COEF_FRAC = 12;  // fractional bits of a coefficient
  localparam int unsigned OUT_W     = 8;   // output coefficient width
  localparam int unsigned N_PTS     = 8;   // transform length

  // 1/2 cos(k pi/16) in Q1.12
  localparam logic signed [COEF_W-1:0] COS_1 = 13'sd2009; // A
  localparam logic signed [COEF_W-1:0] COS_2 = 13'sd1892; // M
  localparam logic signed [COEF_W-1:0] COS_3 = 13'sd1703; // B
  localparam logic signed [COEF_W-1:0] COS_4 = 13'sd1448; // P
  localparam logic signed [COEF_W-1:0] COS_5 = 13'sd1138; // C
  localparam logic signed [COEF_W-1:0] COS_6 = 13'sd784;  // N
  localparam logic signed [COEF_W-1:0] COS_7 = 13'sd400;  // D

endpackage

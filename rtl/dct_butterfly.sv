// dct_butterfly: pre-adder network of the 8-point DCT.
//
// Purely combinational. The first rank forms the pair sums and
// differences of mirrored samples (S11 = X0+X7, S12 = X3+X4,
// S13 = X2+X5, S14 = X1+X6 and D11 = X0-X7, D12 = X1-X6, D14 = X2-X5,
// D13 = X3-X4). The second rank combines the sums (S21 = S11+S12,
// D21 = S11-S12, S22 = S13+S14, D22 = S14-S13) and the third gives
// S31 = S21+S22 and D31 = S21-S22. These are the operands a1 = S31,
// a2 = D31, c1 = D21, c2 = D22 and b1..b4 of the DCT equations, so that
// every output is a sum of at most four constant products.
//
// Interface: x[0..7] signed X_W-bit samples in, one partials_t out, every
// field sign-extended to DATA_W bits. The node names follow the overall
// architecture figure; the sign of D22 follows the equation for c2
// (X1-X2-X5+X6), since the figure does not print which input is
// subtracted.
module dct_butterfly
  import dct_pkg::*;
#(
  parameter int unsigned XW = X_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic signed [XW-1:0] x [N_PTS],
  output logic signed [DW-1:0] a1, a2, c1, c2, b1, b2, b3, b4
);

  // rank 1: XW+1 bits, rank 2: XW+2 bits, rank 3: XW+3 bits
  logic signed [XW:0]   s11, s12, s13, s14, d11, d12, d13, d14;
  logic signed [XW+1:0] s21, d21, s22, d22;
  logic signed [XW+2:0] s31, d31;

  always_comb begin
    s11 = (XW+1)'(x[0]) + (XW+1)'(x[7]);
    s12 = (XW+1)'(x[3]) + (XW+1)'(x[4]);
    s13 = (XW+1)'(x[2]) + (XW+1)'(x[5]);
    s14 = (XW+1)'(x[1]) + (XW+1)'(x[6]);
    d11 = (XW+1)'(x[0]) - (XW+1)'(x[7]);
    d12 = (XW+1)'(x[1]) - (XW+1)'(x[6]);
    d13 = (XW+1)'(x[3]) - (XW+1)'(x[4]);
    d14 = (XW+1)'(x[2]) - (XW+1)'(x[5]);

    s21 = (XW+2)'(s11) + (XW+2)'(s12);
    d21 = (XW+2)'(s11) - (XW+2)'(s12);
    s22 = (XW+2)'(s13) + (XW+2)'(s14);
    d22 = (XW+2)'(s14) - (XW+2)'(s13);

    s31 = (XW+3)'(s21) + (XW+3)'(s22);
    d31 = (XW+3)'(s21) - (XW+3)'(s22);

    a1 = DW'(s31);
    a2 = DW'(d31);
    c1 = DW'(d21);
    c2 = DW'(d22);
    b1 = DW'(d11);
    b2 = DW'(d12);
    b3 = DW'(d14);
    b4 = DW'(d13);
  end

  // The deepest sum needs XW+3 bits; it must fit the serialised operand.
  initial assert (DW >= XW + 3)
    else $error("dct_butterfly: DW=%0d too narrow for XW=%0d", DW, XW);

endmodule

// dct_out_adder: output adder of one DCT coefficient.
//
// Adds the N products of one output (N = 4 for the odd outputs, 2 for
// F(2) and F(6), 1 for F(0) and F(4)), each a Q.FRAC fixed-point number,
// and brings the sum to an OW-bit signed integer: it is rounded to the
// nearest integer (halves toward +infinity) and saturated to the OW-bit
// range. `sat` flags a result that was clipped.
//
// Purely combinational. The adders are the '+' blocks of the overall
// architecture figure; the rounding, saturation and the `sat` flag are
// this design's choice, because the figure gives 8-bit outputs but no
// scaling from the products to them.
module dct_out_adder #(
  parameter int unsigned N    = 4,   // products summed
  parameter int unsigned PW   = 26,  // product width
  parameter int unsigned FRAC = 12,  // fractional bits of a product
  parameter int unsigned OW   = 8    // output width
) (
  input  logic signed [PW-1:0] p [N],
  output logic signed [OW-1:0] y,
  output logic                 sat
);

  localparam int unsigned SW = PW + $clog2(N + 1);

  localparam logic signed [SW-FRAC-1:0] MAXV = (SW-FRAC)'((64'sd1 <<< (OW-1)) - 1);
  localparam logic signed [SW-FRAC-1:0] MINV = (SW-FRAC)'(-(64'sd1 <<< (OW-1)));

  logic signed [SW-1:0]      sum;
  logic signed [SW-FRAC-1:0] ival;

  always_comb begin
    sum = '0;
    for (int i = 0; i < int'(N); i++) sum += SW'(p[i]);
    ival = (SW-FRAC)'((sum + SW'(1 <<< (FRAC - 1))) >>> FRAC);
    sat  = 1'b0;
    if (ival > MAXV) begin
      y   = MAXV[OW-1:0];
      sat = 1'b1;
    end else if (ival < MINV) begin
      y   = MINV[OW-1:0];
      sat = 1'b1;
    end else begin
      y = ival[OW-1:0];
    end
  end

endmodule

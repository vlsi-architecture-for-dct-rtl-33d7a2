// da_dct8: 8-point 1-D DCT built from distributed arithmetic, without
// multipliers.
//
// Datapath (overall architecture figure): a butterfly of adders and
// subtractors turns the eight samples into eight partial sums
// (a1, a2, c1, c2, b1..b4). Each output needs at most four constant
// products of these, so 22 bit-serial DA units (Z0..Z21) each multiply
// one partial sum by one coefficient, all in parallel:
//   F(0) = a1 P                F(4) = a2 P
//   F(2) = c1 M + c2 N         F(6) = c1 N - c2 M
//   F(1) = b1 A + b2 B + b3 C + b4 D
//   F(3) = b1 B - b2 D - b3 A - b4 C
//   F(5) = b1 C - b2 A + b3 D + b4 B
//   F(7) = b1 D - b2 C + b3 B - b4 A
// A negative term is a DA unit loaded with the negated coefficient, so
// the output adders only add. Unit numbering follows the figure: Z0 for
// Y0, Z1 for Y4, Z2/Z3 for Y2, Z4/Z5 for Y6, Z6..Z9 for Y7, Z10..Z13 for
// Y5, Z14..Z17 for Y1, Z18..Z21 for Y3.
//
// Interface: a valid/ready input. A transform starts on a clock edge
// where in_valid and in_ready are both high; x is sampled on that edge
// only. The DA units then work for DW clocks, and on the clock after the
// last one y[0..7] (signed OW-bit, rounded and saturated) is registered
// and out_valid pulses for one cycle; y holds until the next result.
// Latency is DW+1 = 14 clocks from the accepting edge to out_valid, and
// in_ready returns in time for a new transform every DW+1 clocks.
// y_sat[u] flags an output that was clipped to the OW-bit range.
//
// The butterfly, the DA units and the output adders follow the document;
// the handshake, the Q1.12 coefficients, the rounding and the saturation
// are this design's choices.
module da_dct8
  import dct_pkg::*;
#(
  parameter int unsigned XW = X_W,     // sample width
  parameter int unsigned DW = DATA_W,  // serialised operand width
  parameter int unsigned OW = OUT_W    // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] x [N_PTS],
  output logic                 out_valid,
  output logic signed [OW-1:0] y [N_PTS],
  output logic [N_PTS-1:0]     y_sat
);

  localparam int unsigned CW    = COEF_W;
  localparam int unsigned PW    = CW + DW;
  localparam int unsigned NUNIT = 22;

  // operand selectors
  localparam int unsigned OP_A1 = 0, OP_A2 = 1, OP_C1 = 2, OP_C2 = 3,
                          OP_B1 = 4, OP_B2 = 5, OP_B3 = 6, OP_B4 = 7;

  localparam logic signed [CW-1:0] A = COS_1, B = COS_3, C = COS_5, D = COS_7;
  localparam logic signed [CW-1:0] M = COS_2, N = COS_6, P = COS_4;

  // operand and coefficient of each DA unit Z0..Z21
  localparam int unsigned UNIT_OP [NUNIT] = '{
    OP_A1, OP_A2,                         // Z0, Z1
    OP_C1, OP_C2, OP_C1, OP_C2,           // Z2..Z5
    OP_B1, OP_B2, OP_B3, OP_B4,           // Z6..Z9   -> Y7
    OP_B1, OP_B2, OP_B3, OP_B4,           // Z10..Z13 -> Y5
    OP_B1, OP_B2, OP_B3, OP_B4,           // Z14..Z17 -> Y1
    OP_B1, OP_B2, OP_B3, OP_B4            // Z18..Z21 -> Y3
  };
  localparam logic signed [CW-1:0] UNIT_COEF [NUNIT] = '{
    P, P,
    M, N, N, -M,
    D, -C, B, -A,
    C, -A, D, B,
    A, B, C, D,
    B, -D, -A, -C
  };

  logic signed [DW-1:0] op [8];
  logic signed [PW-1:0] z [NUNIT];
  logic [NUNIT-1:0]     busy, done;
  logic                 start;

  logic signed [OW-1:0] y_next [N_PTS];
  logic [N_PTS-1:0]     sat_next;

  dct_butterfly #(.XW(XW), .DW(DW)) u_bfly (
    .x  (x),
    .a1 (op[OP_A1]), .a2 (op[OP_A2]), .c1 (op[OP_C1]), .c2 (op[OP_C2]),
    .b1 (op[OP_B1]), .b2 (op[OP_B2]), .b3 (op[OP_B3]), .b4 (op[OP_B4])
  );

  assign in_ready = ~busy[0];
  assign start    = in_valid & in_ready;

  for (genvar k = 0; k < NUNIT; k++) begin : g_da
    da_unit #(.CW(CW), .DW(DW)) u_da (
      .clk   (clk),
      .rst_n (rst_n),
      .start (start),
      .coef  (UNIT_COEF[k]),
      .data  (op[UNIT_OP[k]]),
      .busy  (busy[k]),
      .done  (done[k]),
      .prod  (z[k])
    );
  end

  // output adders
  dct_out_adder #(.N(1), .PW(PW), .FRAC(COEF_FRAC), .OW(OW)) u_add0 (
    .p ('{z[0]}), .y (y_next[0]), .sat (sat_next[0]));
  dct_out_adder #(.N(1), .PW(PW), .FRAC(COEF_FRAC), .OW(OW)) u_add4 (
    .p ('{z[1]}), .y (y_next[4]), .sat (sat_next[4]));
  dct_out_adder #(.N(2), .PW(PW), .FRAC(COEF_FRAC), .OW(OW)) u_add2 (
    .p ('{z[2], z[3]}), .y (y_next[2]), .sat (sat_next[2]));
  dct_out_adder #(.N(2), .PW(PW), .FRAC(COEF_FRAC), .OW(OW)) u_add6 (
    .p ('{z[4], z[5]}), .y (y_next[6]), .sat (sat_next[6]));
  dct_out_adder #(.N(4), .PW(PW), .FRAC(COEF_FRAC), .OW(OW)) u_add7 (
    .p ('{z[6], z[7], z[8], z[9]}), .y (y_next[7]), .sat (sat_next[7]));
  dct_out_adder #(.N(4), .PW(PW), .FRAC(COEF_FRAC), .OW(OW)) u_add5 (
    .p ('{z[10], z[11], z[12], z[13]}), .y (y_next[5]), .sat (sat_next[5]));
  dct_out_adder #(.N(4), .PW(PW), .FRAC(COEF_FRAC), .OW(OW)) u_add1 (
    .p ('{z[14], z[15], z[16], z[17]}), .y (y_next[1]), .sat (sat_next[1]));
  dct_out_adder #(.N(4), .PW(PW), .FRAC(COEF_FRAC), .OW(OW)) u_add3 (
    .p ('{z[18], z[19], z[20], z[21]}), .y (y_next[3]), .sat (sat_next[3]));

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_sat     <= '0;
      for (int u = 0; u < int'(N_PTS); u++) y[u] <= '0;
    end else begin
      out_valid <= done[0];
      if (done[0]) begin
        y     <= y_next;
        y_sat <= sat_next;
      end
    end
  end

  // All DA units run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (busy == '0 || busy == '1) && (done == '0 || done == '1));

endmodule

// da_unit: bit-serial distributed-arithmetic constant multiplier.
//
// Computes prod = coef * data, both signed, without a multiplier. On
// `start` the operand is loaded into a parallel-to-serial shift register,
// the accumulator is cleared and a bit counter is set to DW. On each of
// the next DW clocks the most significant remaining operand bit selects
// either the coefficient or zeros (the 2:1 mux of the DA figure), and the
// accumulator takes twice its old value plus the selection. The first bit
// is the two's-complement sign bit, whose weight is negative, so on that
// step the selection is subtracted instead of added. After DW steps the
// accumulator ("memory buffer") holds the exact product.
//
// Timing: start is sampled at edge 0; `busy` is high from edge 0 to edge
// DW; `done` is a one-cycle pulse after edge DW, when `prod` is valid.
// `prod` holds its value until the next start. A start while busy is
// ignored. `coef` is read on every step and must stay constant while
// busy (in the DCT it is a constant); `data` is read only at start.
//
// The mux, adder, accumulator, counter and parallel-to-serial register
// follow the DA figure. Shifting MSB first and subtracting on the sign
// bit is this design's choice: the figure does not print a bit order or
// how a negative operand is handled.
module da_unit #(
  parameter int unsigned CW = 13,  // coefficient width ("A")
  parameter int unsigned DW = 13   // serialised operand width ("B")
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [CW-1:0]    coef,
  input  logic signed [DW-1:0]    data,
  output logic                    busy,
  output logic                    done,
  output logic signed [CW+DW-1:0] prod
);

  localparam int unsigned PW   = CW + DW;
  localparam int unsigned CNTW = $clog2(DW + 1);

  logic [DW-1:0]          shreg;   // parallel-to-serial register
  logic [CNTW-1:0]        cnt;     // bits still to process
  logic signed [PW-1:0]   sel;     // mux output: coef or zeros
  logic                   first;   // current bit is the sign bit

  always_comb begin
    sel   = shreg[DW-1] ? PW'(coef) : '0;
    first = (cnt == CNTW'(DW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      prod  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          shreg <= data;
          cnt   <= CNTW'(DW);
          prod  <= '0;
          busy  <= 1'b1;
        end
      end else begin
        prod  <= first ? (prod <<< 1) - sel : (prod <<< 1) + sel;
        shreg <= shreg << 1;
        cnt   <= cnt - 1'b1;
        if (cnt == CNTW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule

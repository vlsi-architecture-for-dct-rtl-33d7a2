// tb_da_unit: self-checking testbench of the bit-serial DA multiplier.
//
// Starts the unit with directed extremes (most negative and positive
// operands and coefficients, zero) and random operands, and compares the
// product with the product computed by the testbench. It also checks that
// `done` arrives exactly DW clocks after the start edge, that busy is
// high all that time, and that a start raised while busy is ignored.
module tb_da_unit;
  localparam int CW = 13;
  localparam int DW = 13;

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic                    start;
  logic signed [CW-1:0]    coef;
  logic signed [DW-1:0]    data;
  logic                    busy, done;
  logic signed [CW+DW-1:0] prod;

  int checks = 0, failures = 0;

  da_unit #(.CW(CW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic signed [CW-1:0] c, input logic signed [DW-1:0] d);
    longint expected;
    int cycles;
    expected = longint'(c) * longint'(d);
    @(negedge clk);
    coef  = c;
    data  = d;
    start = 1'b1;
    @(negedge clk);
    cycles = 0;  // clock edges since the start edge
    // a second start while busy must be ignored; scramble the operand too
    // (the coefficient is a constant of the unit and is held)
    data = DW'($urandom);
    while (!done) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("busy dropped early after %0d cycles", cycles);
      end
      @(negedge clk);
      cycles++;
      if (cycles > DW + 5) break;
    end
    start = 1'b0;
    checks++;
    if (cycles != DW) begin
      failures++;
      $display("done after %0d cycles, expected %0d", cycles, DW);
    end
    checks++;
    if (longint'(prod) != expected) begin
      failures++;
      $display("coef=%0d data=%0d prod=%0d expected=%0d", c, d, prod, expected);
    end
    // the product holds after done
    @(negedge clk);
    checks++;
    if (longint'(prod) != expected) begin
      failures++;
      $display("product did not hold");
    end
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    coef  = '0;
    data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy || done) begin
      failures++;
      $display("busy or done after reset");
    end
    run(13'sd2009, 13'sd12);
    run(-13'sd4096, -13'sd4096);
    run(13'sd4095, -13'sd4096);
    run(-13'sd4096, 13'sd4095);
    run(13'sd4095, 13'sd4095);
    run(13'sd0, -13'sd1);
    run(-13'sd1, -13'sd1);
    run(13'sd1448, 13'sd0);
    for (int i = 0; i < 300; i++) run(CW'($urandom), DW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dct_out_adder: self-checking testbench of the output adder.
//
// Four-input instance with Q.12 products. The expected result is the sum
// scaled by 2^-12 in real arithmetic, rounded to the nearest integer
// (halves upward) and clipped to [-128, 127]; `sat` must flag exactly
// the clipped cases. Directed cases cover the rounding halves and both
// saturation limits; random cases cover the rest.
module tb_dct_out_adder;
  localparam int N = 4, PW = 26, FRAC = 12, OW = 8;

  logic signed [PW-1:0] p [N];
  logic signed [OW-1:0] y;
  logic                 sat;
  logic clk = 1'b0;

  int checks = 0, failures = 0;
  int nsat = 0;

  dct_out_adder #(.N(N), .PW(PW), .FRAC(FRAC), .OW(OW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    real s;
    longint e;
    logic esat;
    s = 0.0;
    for (int i = 0; i < N; i++) s += real'(longint'(p[i]));
    s = s / 4096.0;
    e = longint'($floor(s + 0.5));
    esat = 1'b0;
    if (e > 127)  begin e = 127;  esat = 1'b1; end
    if (e < -128) begin e = -128; esat = 1'b1; end
    #1;
    checks++;
    if (longint'(y) != e || sat != esat) begin
      failures++;
      $display("p=%0d %0d %0d %0d: y=%0d sat=%0b, expected %0d sat=%0b",
               p[0], p[1], p[2], p[3], y, sat, e, esat);
    end
    if (sat) nsat++;
    @(posedge clk);
  endtask

  initial begin
    // rounding halves
    p = '{2048, 0, 0, 0};          check();   // 0.5  -> 1
    p = '{-2048, 0, 0, 0};         check();   // -0.5 -> 0
    p = '{2047, 0, 0, 0};          check();
    p = '{-2049, 0, 0, 0};         check();
    p = '{4096*3 + 2048, 0, 0, 0}; check();
    // saturation limits
    p = '{127*4096 + 2047, 0, 0, 0};   check();  // 127.49 -> 127
    p = '{127*4096 + 2048, 0, 0, 0};   check();  // 127.5  -> sat
    p = '{-128*4096 - 2048, 0, 0, 0};  check();  // -128.5 -> -128
    p = '{-128*4096 - 2049, 0, 0, 0};  check();  // sat
    p = '{(1 <<< 25) - 1, (1 <<< 25) - 1, (1 <<< 25) - 1, (1 <<< 25) - 1}; check();
    p = '{-(1 <<< 25), -(1 <<< 25), -(1 <<< 25), -(1 <<< 25)};             check();
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N; i++) begin
        // mix of small and full-range products
        if (n % 2 == 0) p[i] = PW'($signed(20'($urandom)));
        else            p[i] = PW'($urandom);
      end
      check();
    end
    checks++;
    if (nsat == 0) begin
      failures++;
      $display("saturation never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

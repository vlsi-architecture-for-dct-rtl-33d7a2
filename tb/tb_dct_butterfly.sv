// tb_dct_butterfly: self-checking testbench of the DCT pre-adder network.
//
// Drives extreme and random signed 8-bit samples and compares every
// partial sum with its definition written out over the eight samples:
// a1 = sum of all, a2 = X0-X1-X2+X3+X4-X5-X6+X7, c1 = X0-X3-X4+X7,
// c2 = X1-X2-X5+X6, b1 = X0-X7, b2 = X1-X6, b3 = X2-X5, b4 = X3-X4.
module tb_dct_butterfly;
  localparam int XW = 8;
  localparam int DW = 13;

  logic signed [XW-1:0] x [8];
  logic signed [DW-1:0] a1, a2, c1, c2, b1, b2, b3, b4;
  logic clk = 1'b0;

  int checks = 0, failures = 0;

  dct_butterfly #(.XW(XW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string name, input logic signed [DW-1:0] got, input int exp);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("%s = %0d, expected %0d", name, got, exp);
    end
  endtask

  task automatic check_all();
    int v [8];
    for (int i = 0; i < 8; i++) v[i] = int'(x[i]);
    #1;
    cmp("a1", a1, v[0]+v[1]+v[2]+v[3]+v[4]+v[5]+v[6]+v[7]);
    cmp("a2", a2, v[0]-v[1]-v[2]+v[3]+v[4]-v[5]-v[6]+v[7]);
    cmp("c1", c1, v[0]-v[3]-v[4]+v[7]);
    cmp("c2", c2, v[1]-v[2]-v[5]+v[6]);
    cmp("b1", b1, v[0]-v[7]);
    cmp("b2", b2, v[1]-v[6]);
    cmp("b3", b3, v[2]-v[5]);
    cmp("b4", b4, v[3]-v[4]);
    @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 8; i++) x[i] = -8'sd128;
    check_all();
    for (int i = 0; i < 8; i++) x[i] = 8'sd127;
    check_all();
    for (int i = 0; i < 8; i++) x[i] = (i % 2 == 0) ? 8'sd127 : -8'sd128;
    check_all();
    x = '{12, 16, 19, 12, 11, 27, 51, 47};
    check_all();
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 8; i++) x[i] = XW'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

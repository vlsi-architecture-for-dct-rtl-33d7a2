// tb_da_dct8: end-to-end testbench of the 8-point DA DCT, at the
// default parameters.
//
// The reference is equation (2) evaluated directly over the eight
// samples, F(u) = sum_i x(i) q(u,i), where q(u,i) is
// 1/2 C(u) cos((2i+1) u pi/16) computed with $cos and quantized to Q1.12
// (rounded to nearest, magnitude first). The sum is scaled by 2^-12,
// rounded with halves upward and clipped to [-128, 127], which the
// design must match exactly; unclipped results must also be within one
// unit of the unquantized real DCT. The testbench further checks:
//   - the latency of 14 clocks from the accepting edge to out_valid,
//   - a new transform accepted every 14 clocks when input is waiting,
//   - that x changing while a transform runs does not disturb it,
//   - y_sat against the clipping of the reference.
// Mechanisms counted (each must occur): back-to-back transforms, a
// stalled input (in_valid high while in_ready is low), idle gaps between
// transforms and saturated outputs.
module tb_da_dct8;
  import dct_pkg::*;

  localparam int LAT = DATA_W + 1;

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic                    in_valid;
  logic                    in_ready;
  logic signed [X_W-1:0]   x [N_PTS];
  logic                    out_valid;
  logic signed [OUT_W-1:0] y [N_PTS];
  logic [N_PTS-1:0]        y_sat;

  int checks = 0, failures = 0;
  int n_b2b = 0, n_stall = 0, n_gap = 0, n_sat = 0, n_done = 0;

  da_dct8 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model --------------------------------------------------
  longint q [N_PTS][N_PTS];

  function automatic longint qcoef(int u, int i);
    real v;
    v = 2048.0 * $cos(real'((2*i+1)*u) * 3.14159265358979323846 / 16.0);
    if (u == 0) v = v / $sqrt(2.0);
    return (v < 0.0) ? -longint'($floor(-v + 0.5)) : longint'($floor(v + 0.5));
  endfunction

  typedef logic [N_PTS-1:0][X_W-1:0] vec_t;  // packed sample block

  longint ry   [N_PTS];   // reference result
  logic   rsat [N_PTS];   // reference clipping flag
  real    rf   [N_PTS];   // unquantized DCT

  task automatic model(input vec_t s);
    for (int u = 0; u < N_PTS; u++) begin
      longint acc;
      real fr;
      acc = 0;
      fr  = 0.0;
      for (int i = 0; i < N_PTS; i++) begin
        acc += longint'($signed(s[i])) * q[u][i];
        fr  += real'($signed(s[i])) * 0.5
               * $cos(real'((2*i+1)*u) * 3.14159265358979323846 / 16.0)
               * ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0);
      end
      acc = (acc + 2048) >>> 12;
      rsat[u] = 1'b0;
      if (acc > 127)  begin acc = 127;  rsat[u] = 1'b1; end
      if (acc < -128) begin acc = -128; rsat[u] = 1'b1; end
      ry[u] = acc;
      rf[u] = fr;
    end
  endtask

  // ---- stimulus --------------------------------------------------------
  vec_t                  vec_q [$];  // vectors still to send
  vec_t                  sent_q [$]; // accepted, awaiting output
  int                    accept_cycle [$];
  int                    cycle = 0;
  int                    last_accept = -100;
  int                    mode;              // 0: back-to-back, 1: gaps
  // `cycle` counts rising edges; read at a falling edge it is the index
  // of the rising edge just passed.

  always @(posedge clk) cycle <= cycle + 1;

  function automatic vec_t pack(input int v [N_PTS]);
    vec_t r;
    for (int i = 0; i < N_PTS; i++) r[i] = X_W'(v[i]);
    return r;
  endfunction

  task automatic push_vec(input int kind);
    vec_t v;
    for (int i = 0; i < N_PTS; i++) begin
      case (kind)
        0: v[i] = X_W'($urandom);                       // full range
        1: v[i] = X_W'($signed(5'($urandom)));          // small
        2: v[i] = $urandom_range(1) ? 8'sd127 : -8'sd128; // extremes
        default: v[i] = 8'sd0;
      endcase
    end
    vec_q.push_back(v);
  endtask

  // driver: presents the next vector, holding it until accepted
  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < N_PTS; i++) x[i] = '0;
    for (int u = 0; u < N_PTS; u++)
      for (int i = 0; i < N_PTS; i++) q[u][i] = qcoef(u, i);
    // quantized coefficients must be those of the design
    checks++;
    if (q[0][0] != longint'(COS_4) || q[1][0] != longint'(COS_1) || q[2][0] != longint'(COS_2)
        || q[3][0] != longint'(COS_3) || q[5][0] != longint'(COS_5)
        || q[6][0] != longint'(COS_6) || q[7][0] != longint'(COS_7)) begin
      failures++;
      $display("coefficient table differs from the design's");
    end
    // vectors: the sample block of the simulation waveforms, directed
    // extremes, then random ones
    vec_q.push_back(pack('{12, 16, 19, 12, 11, 27, 51, 47}));
    vec_q.push_back(pack('{-4, -106, -117, -86, -43, -91, -107, -106}));
    begin
      vec_t v;
      for (int i = 0; i < N_PTS; i++) v[i] = 8'sd127;   vec_q.push_back(v);
      for (int i = 0; i < N_PTS; i++) v[i] = -8'sd128;  vec_q.push_back(v);
      for (int i = 0; i < N_PTS; i++) v[i] = (i % 2) ? -8'sd128 : 8'sd127; vec_q.push_back(v);
      for (int i = 0; i < N_PTS; i++) v[i] = 8'sd0;     vec_q.push_back(v);
    end
    for (int n = 0; n < 400; n++) push_vec(n % 3);

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    while (vec_q.size() > 0) begin
      @(negedge clk);
      mode = (vec_q.size() / 50) % 2;
      if (!in_valid) begin
        if (mode == 1 && $urandom_range(1) == 0) begin
          repeat ($urandom_range(20)) @(negedge clk);
          // idle cycle; wiggle x to show it is ignored
          for (int i = 0; i < N_PTS; i++) x[i] = X_W'($urandom);
          continue;
        end
        for (int i = 0; i < N_PTS; i++) x[i] = vec_q[0][i];
        in_valid = 1'b1;
      end
      // in_ready is a register output: stable from here to the next edge
      if (in_ready) begin
        if (cycle + 1 - last_accept == LAT) n_b2b++;
        else if (cycle + 1 - last_accept > LAT) n_gap++;
        else begin
          failures++;
          $display("accepted %0d cycles after the previous one", cycle + 1 - last_accept);
        end
        checks++;
        last_accept = cycle + 1;
        sent_q.push_back(vec_q.pop_front());
        accept_cycle.push_back(cycle + 1);
        @(posedge clk);
        #1 in_valid = 1'b0;
        for (int i = 0; i < N_PTS; i++) x[i] = X_W'($urandom);
      end else begin
        n_stall++;  // hold the vector until accepted
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (sent_q.size() > 0) @(posedge clk);
    repeat (4) @(posedge clk);

    checks++; if (n_b2b == 0)   begin failures++; $display("no back-to-back transform"); end
    checks++; if (n_stall == 0) begin failures++; $display("no stalled input"); end
    checks++; if (n_gap == 0)   begin failures++; $display("no idle gap"); end
    checks++; if (n_sat == 0)   begin failures++; $display("no saturated output"); end
    checks++; if (n_done != 406) begin failures++; $display("%0d results, expected 406", n_done); end
    $display("transforms=%0d back_to_back=%0d stalls=%0d gaps=%0d saturated_outputs=%0d",
             n_done, n_b2b, n_stall, n_gap, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: compares each result with the reference
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int lat;
      if (sent_q.size() == 0) begin
        failures++;
        $display("out_valid with no transform pending");
      end else begin
        model(sent_q.pop_front());
        lat = cycle - accept_cycle.pop_front();
        n_done++;
        checks++;
        if (lat != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", lat, LAT);
        end
        for (int u = 0; u < N_PTS; u++) begin
          checks++;
          if (longint'(y[u]) != ry[u] || y_sat[u] != rsat[u]) begin
            failures++;
            $display("transform %0d: y[%0d]=%0d sat=%0b, expected %0d sat=%0b",
                     n_done, u, y[u], y_sat[u], ry[u], rsat[u]);
          end
          if (rsat[u]) n_sat++;
          else begin
            checks++;
            if (real'(y[u]) - rf[u] > 1.0 || rf[u] - real'(y[u]) > 1.0) begin
              failures++;
              $display("y[%0d]=%0d is more than 1 from the real DCT %f", u, y[u], rf[u]);
            end
          end
        end
        if (n_done == 1)
          $display("sample block: y = %0d %0d %0d %0d %0d %0d %0d %0d",
                   y[0], y[1], y[2], y[3], y[4], y[5], y[6], y[7]);
      end
    end
  end

endmodule

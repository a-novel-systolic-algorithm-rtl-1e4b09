// tb_dst4_postproc: checks the post-processing stage for N = 11, G = 2.
//
// For random sample blocks x the test computes, in floating point, the
// auxiliary sequence x'(i) = 16 * sum_{j>=i} x(j) sin((2j+1) pi/44) and the
// convolution outputs T(k) = sum_j x'(j) sin(kj pi/11), and feeds x'(0) and
// the rounded T(k) in the permuted order of the two arrays (even array
// T(2), T(4), T(8), T(6), T(10); odd array T(9), T(7), T(3), T(5), T(1)),
// one pair per cycle, a block every N cycles. The outputs must be the DST-IV
// of x computed from its definition, within 2 LSB, in natural order with
// out_idx and out_last, Y(0) sampled three clock edges after the edge that
// takes in the last T pair.
module tb_dst4_postproc;
  localparam int N = 11, G = 2, L = 5, XW = 24, AW = 29, OUT_W = 20, IDXW = 3;
  localparam int NB = 10;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [XW-1:0] xp0_in = '0;
  logic ev_valid = 1'b0, od_valid = 1'b0;
  logic [IDXW-1:0] ev_idx = '0, od_idx = '0;
  logic signed [AW-1:0] ev_t = '0, od_t = '0;
  logic out_valid, out_last;
  logic [3:0] out_idx;
  logic signed [OUT_W-1:0] out_data;

  dst4_postproc #(.N(N), .G(G), .XW(XW), .AW(AW), .GUARD(4), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  real yref [NB][N];
  int signed tq [NB][N];
  int signed xp0q [NB];
  int unsigned done_cyc [NB];
  int ke [L] = '{2, 4, 8, 6, 10};
  int ko [L] = '{9, 7, 3, 5, 1};

  initial begin
    for (int b = 0; b < NB; b++) begin
      real x [N];
      real xp [N + 1];
      for (int i = 0; i < N; i++) x[i] = real'(int'($urandom_range(65535)) - 32768);
      xp[N] = 0.0;
      for (int i = N - 1; i >= 0; i--)
        xp[i] = xp[i + 1] + 16.0 * x[i] * $sin(PI * real'(2 * i + 1) / real'(4 * N));
      xp0q[b] = int'($floor(xp[0] + 0.5));
      for (int k = 1; k < N; k++) begin
        real t;
        t = 0.0;
        for (int j = 1; j < N; j++) t += xp[j] * $sin(PI * real'(k * j) / real'(N));
        tq[b][k] = int'($floor(t + 0.5));
      end
      for (int k = 0; k < N; k++) begin
        yref[b][k] = 0.0;
        for (int i = 0; i < N; i++)
          yref[b][k] += x[i] * $sin(PI * real'((2 * i + 1) * (2 * k + 1)) / real'(4 * N));
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      for (int c = 0; c < N; c++) begin
        if (c < L) begin
          ev_valid <= 1'b1; od_valid <= 1'b1;
          ev_idx <= IDXW'(c); od_idx <= IDXW'(c);
          ev_t <= AW'(tq[b][ke[c]]); od_t <= AW'(tq[b][ko[c]]);
          xp0_in <= XW'(xp0q[b]);
        end else begin
          ev_valid <= 1'b0; od_valid <= 1'b0;
        end
        @(posedge clk);
        if (c == L - 1) done_cyc[b] = cyc;
      end
    end
  end

  int ob = 0, ok = 0;
  real max_err = 0.0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e;
      e = real'(out_data) - yref[ob][ok];
      if (e < 0.0) e = -e;
      if (e > max_err) max_err = e;
      checks++;
      if (e > 2.0 || out_idx != 4'(ok) || out_last != (ok == N - 1)) begin
        failures++;
        $display("block %0d Y(%0d) = %0d, expected %f", ob, ok, out_data, yref[ob][ok]);
      end
      if (ok == 0) begin
        checks++;
        if (cyc - done_cyc[ob] != 3) begin
          failures++;
          $display("block %0d: Y(0) %0d edges after the last write", ob, cyc - done_cyc[ob]);
        end
      end
      if (ok == N - 1) begin ok = 0; ob++; end else ok++;
    end
  end

  initial begin
    wait (ob == NB);
    repeat (2) @(posedge clk);
    $display("max error %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dst4_top_run: helper for tb_dst4_top_sizes. Runs one dst4_top instance
// of size N with primitive root G over NBLK back-to-back random blocks and
// checks every output against the DST-IV computed from its definition in
// floating point (tolerance TOL LSB, by default 1 + N/4: the output
// recursion adds up rounding errors over N terms), the out_idx/out_last sequence and the
// latency of N + 3L + 6 clock edges. It raises done when all outputs have
// been seen and reports its counts on its ports.
module tb_dst4_top_run #(
  parameter int  N    = 7,
  parameter int  G    = 3,
  parameter int  NBLK = 12,
  parameter real TOL  = 1.0 + real'(N) / 4.0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output real  max_err
);
  localparam int L = (N - 1) / 2;
  localparam int DATA_W = 16;
  localparam int OUT_W = DATA_W + $clog2(N);
  localparam int LATENCY = N + 3 * L + 6;
  localparam real PI = 3.14159265358979323846;

  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid, out_last;
  logic [$clog2(N)-1:0] out_idx;
  logic signed [OUT_W-1:0] out_data;

  dst4_top #(.N(N), .G(G)) dut (.*);

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int signed xin [NBLK][N];
  real yref [NBLK][N];
  int unsigned last_in [NBLK];

  initial begin
    done = 1'b0; checks = 0; failures = 0; max_err = 0.0;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < N; i++)
        xin[b][i] = (b == 0) ? 32767 : (b == 1) ? -32768 : int'($urandom_range(65535)) - 32768;
      for (int k = 0; k < N; k++) begin
        yref[b][k] = 0.0;
        for (int i = 0; i < N; i++)
          yref[b][k] += real'(xin[b][i]) * $sin(PI * real'((2 * i + 1) * (2 * k + 1)) / real'(4 * N));
      end
    end
    wait (rst_n);
    @(posedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < N; i++) begin
        in_valid <= 1'b1;
        in_data  <= DATA_W'(xin[b][i]);
        @(posedge clk);
      end
    in_valid <= 1'b0;
  end

  int ib = 0, ii = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (ii == N - 1) begin last_in[ib] = cyc; ib++; ii = 0; end
      else ii++;
    end
  end

  int ob = 0, ok = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && ob < NBLK) begin
      real e;
      e = real'(out_data) - yref[ob][ok];
      if (e < 0.0) e = -e;
      if (e > max_err) max_err = e;
      checks++;
      if (e > TOL || out_idx != ok[$clog2(N)-1:0] || out_last != (ok == N - 1)) begin
        failures++;
        if (failures < 5)
          $display("N=%0d block %0d Y(%0d) = %0d, expected %f", N, ob, ok, out_data, yref[ob][ok]);
      end
      if (ok == 0) begin
        checks++;
        if (cyc - last_in[ob] != LATENCY) begin
          failures++;
          $display("N=%0d block %0d latency %0d, expected %0d", N, ob, cyc - last_in[ob], LATENCY);
        end
      end
      if (ok == N - 1) begin
        ok = 0; ob++;
        if (ob == NBLK) done = 1'b1;
      end else ok++;
    end
  end
endmodule

// tb_dst4_preproc: checks the pre-processing stage on its own.
//
// Blocks of random 16-bit samples (one full-scale block among them) are sent
// both back to back and with idle cycles. For every block the test collects
// the N written values x'(i) and compares each with
//   x'(i) = 16 * sum_{j >= i} x(j) sin((2j+1) pi/(4N))
// (16 = 2^GUARD) computed in floating point, within the rounding of the
// design's 18-bit constants. It also checks that every index is written once
// per block in the order N-1 .. 0, that done comes with x'(0) and the right
// bank, that banks alternate, and that done follows the last input sample by
// N+2 cycles.
module tb_dst4_preproc;
  localparam int N = 11, DATA_W = 16, GUARD = 4;
  localparam int XW = DATA_W + GUARD + $clog2(N), IW = $clog2(N);
  localparam int NBLK = 12;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 2.0 + N * (32768.0 * 16.0 / 131072.0 + 0.5);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic xp_we, xp_bank, done, done_bank;
  logic [IW-1:0] xp_idx;
  logic signed [XW-1:0] xp_data, xp0;

  dst4_preproc #(.N(N), .DATA_W(DATA_W), .GUARD(GUARD)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int signed xin [NBLK][N];
  real ref_xp [NBLK][N];
  int unsigned last_cyc [NBLK];

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < N; i++)
        xin[b][i] = (b == 1) ? 32767 : int'($urandom_range(65535)) - 32768;
      for (int i = N - 1; i >= 0; i--)
        ref_xp[b][i] = 16.0 * real'(xin[b][i]) * $sin(PI * real'(2 * i + 1) / real'(4 * N))
                       + ((i == N - 1) ? 0.0 : ref_xp[b][i + 1]);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < N; i++) begin
        if (b >= NBLK / 2) repeat ($urandom_range(2)) begin
          in_valid <= 1'b0; @(posedge clk);
        end
        in_valid <= 1'b1;
        in_data  <= DATA_W'(xin[b][i]);
        @(posedge clk);
        if (i == N - 1) last_cyc[b] = cyc;
      end
    end
    in_valid <= 1'b0;
  end

  int ob = 0, exp_i = N - 1;
  always @(posedge clk) begin
    if (rst_n && xp_we) begin
      real e;
      e = real'(xp_data) - ref_xp[ob][exp_i];
      if (e < 0.0) e = -e;
      checks++;
      if (e > TOL || xp_idx != IW'(exp_i) || xp_bank != ob[0]) begin
        failures++;
        $display("block %0d x'(%0d): got %0d at idx %0d bank %0b, expected %f", ob, exp_i,
                 xp_data, xp_idx, xp_bank, ref_xp[ob][exp_i]);
      end
      if (exp_i == 0) begin
        checks++;
        if (!done || done_bank != ob[0] || cyc - last_cyc[ob] != N + 2) begin
          failures++;
          $display("block %0d: done %0b bank %0b after %0d cycles", ob, done, done_bank,
                   cyc - last_cyc[ob]);
        end
        exp_i = N - 1; ob++;
      end else exp_i--;
    end
    if (rst_n && done) begin
      real e;
      checks++;
      e = real'(xp0) - ref_xp[ob - 1][0];
      if (!(e < TOL && e > -TOL)) begin
        failures++;
        $display("x'(0) output %0d, expected %f", xp0, ref_xp[ob - 1][0]);
      end
    end
  end

  initial begin
    wait (ob == NBLK);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dst4_top: end-to-end test of the DST-IV processor at its default size
// (N = 11, G = 2, 16-bit samples).
//
// Blocks of samples (random values, full-scale extremes, impulses and a ramp)
// are sent through the design, partly back to back at one sample per clock
// and partly with random idle cycles inside and between blocks. Every output
// Y(k) is compared with the transform computed directly from its definition
//   Y(k) = sum_i x(i) sin((2i+1)(2k+1) pi/(4N))
// in floating point, within a tolerance that covers the fixed-point rounding
// of the design. The test also checks out_idx and out_last, that the
// latency from the last sample of a block to its Y(0) is N + 3L + 6 clock
// edges,
// and that back-to-back blocks come out with no idle cycle (one transform
// every N clocks). It counts how often the mechanisms of the design were
// exercised: back-to-back and gapped blocks, both RAM banks, and additions and
// subtractions chosen by the sign tags in both systolic arrays.
module tb_dst4_top;
  localparam int N = 11;
  localparam int L = (N - 1) / 2;
  localparam int DATA_W = 16;
  localparam int OUT_W = DATA_W + $clog2(N);
  localparam int NBLK = 60;
  localparam int LATENCY = N + 3 * L + 6;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 3.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid, out_last;
  logic [$clog2(N)-1:0] out_idx;
  logic signed [OUT_W-1:0] out_data;

  dst4_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // stimulus and expected results
  int signed xin [NBLK][N];
  real       yref [NBLK][N];
  int unsigned last_in_cyc [NBLK];
  bit        b2b [NBLK];

  function automatic void make_block(int b);
    for (int i = 0; i < N; i++) begin
      case (b)
        0: xin[b][i] = (i == 0) ? 32767 : 0;
        1: xin[b][i] = 32767;
        2: xin[b][i] = -32768;
        3: xin[b][i] = (i % 2 == 0) ? 32767 : -32768;
        4: xin[b][i] = (i == N - 1) ? -32768 : 0;
        5: xin[b][i] = (i - 5) * 6000;
        default: xin[b][i] = int'($urandom_range(65535)) - 32768;
      endcase
    end
    for (int k = 0; k < N; k++) begin
      yref[b][k] = 0.0;
      for (int i = 0; i < N; i++)
        yref[b][k] += real'(xin[b][i]) * $sin(PI * real'((2 * i + 1) * (2 * k + 1)) / real'(4 * N));
    end
  endfunction

  // ---- driver ----
  int n_b2b = 0, n_gap = 0;
  initial begin
    for (int b = 0; b < NBLK; b++) make_block(b);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      // blocks 0..29 back to back; later blocks with random gaps
      b2b[b] = (b < 30);
      if (b2b[b]) n_b2b++; else n_gap++;
      for (int i = 0; i < N; i++) begin
        if (!b2b[b]) begin
          int g;
          g = int'($urandom_range(3));
          repeat (g) begin
            in_valid <= 1'b0;
            @(posedge clk);
          end
        end
        in_valid <= 1'b1;
        in_data  <= DATA_W'(xin[b][i]);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // ---- input monitor: clock edge at which each block's last sample is taken ----
  int ib = 0, ii = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (ii == N - 1) begin last_in_cyc[ib] = cyc; ib++; ii = 0; end
      else ii++;
    end
  end

  // ---- checker ----
  int ob = 0, ok = 0;
  int unsigned first_out_cyc [NBLK];
  real max_err = 0.0;
  int n_cont = 0;
  int unsigned prev_out_cyc = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e;
      e = real'(out_data) - yref[ob][ok];
      if (e < 0.0) e = -e;
      if (e > max_err) max_err = e;
      checks++;
      if (e > TOL || out_idx != ok[$clog2(N)-1:0] || out_last != (ok == N - 1)) begin
        failures++;
        if (failures < 10)
          $display("block %0d Y(%0d): got %0d idx %0d last %0b, expected %f", ob, ok,
                   out_data, out_idx, out_last, yref[ob][ok]);
      end
      if (ok == 0) begin
        first_out_cyc[ob] = cyc;
        checks++;
        if (cyc - last_in_cyc[ob] != LATENCY) begin
          failures++;
          $display("block %0d latency %0d, expected %0d", ob, cyc - last_in_cyc[ob], LATENCY);
        end
      end
      // back-to-back input must give gap-free output
      if (ob > 0 && b2b[ob] && b2b[ob - 1] && cyc == prev_out_cyc + 1) n_cont++;
      else if (ob > 0 && b2b[ob] && b2b[ob - 1]) begin
        checks++; failures++;
        $display("idle output cycle inside back-to-back stream at block %0d", ob);
      end
      prev_out_cyc = cyc;
      if (ok == N - 1) begin ok = 0; ob++; end
      else ok++;
    end
  end

  // ---- mechanism counters (sign multiplexer use, bank use) ----
  int n_sub = 0, n_add = 0, n_bank1 = 0;
  always @(posedge clk) begin
    if (dut.u_arr_even.v_c[0]) begin
      if (dut.u_arr_even.n_c[0][0]) n_sub++; else n_add++;
    end
    if (dut.u_arr_odd.v_c[2]) begin
      if (dut.u_arr_odd.n_c[2][0]) n_sub++; else n_add++;
    end
    if (dut.xp_we && dut.xp_bank) n_bank1++;
  end

  task automatic mech(string name, int count);
    checks++;
    $display("mechanism %-28s : %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("mechanism %s never happened", name);
    end
  endtask

  initial begin
    wait (ob == NBLK);
    repeat (5) @(posedge clk);
    $display("max |error| = %f LSB over %0d outputs", max_err, NBLK * N);
    mech("back-to-back blocks", n_b2b);
    mech("blocks with input gaps", n_gap);
    mech("gap-free back-to-back outputs", n_cont);
    mech("PE subtract (sign tag 1)", n_sub);
    mech("PE add (sign tag 0)", n_add);
    mech("second RAM bank written", n_bank1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: only %0d of %0d blocks seen", ob, NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

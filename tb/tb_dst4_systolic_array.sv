// tb_dst4_systolic_array: checks the linear systolic array for N = 11
// (L = 5 PEs) in both of its uses.
//
// Two instances receive the same random input vectors u_0 .. u_4 in the
// stream order the array expects, one with the sign tags of the even-output
// convolution and one with those of the odd-output convolution. The test
// works the kernel out from its definition: output m of the even array is
//   T(k_m) = sum_j sin(pi k_m p_j / 11) u_j ,  p_j = 2^(j+1) mod 11,
// with k_m the even member of {p_m, 11-p_m} (odd member for the odd array);
// the tags are taken from the signs of these sines. Each output must match
// within the rounding of the five products, come out with its index, and
// appear 2L-1+m cycles after the first sample of its stream. Twenty
// transforms are streamed back to back, one every 2L-1 cycles.
module tb_dst4_systolic_array;
  localparam int N = 11, G = 2, L = 5, UW = 25, AW = 29, IDXW = 3;
  localparam int SL = 2 * L - 1;
  localparam int NT = 20;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [UW-1:0] u_in = '0;
  logic y_valid_in = 1'b0;
  logic [L-1:0] neg_e = '0, neg_o = '0;
  logic [IDXW-1:0] y_idx_in = '0;
  logic ve, vo;
  logic [IDXW-1:0] ie, io;
  logic signed [AW-1:0] ye, yo;

  dst4_systolic_array #(.N(N), .G(G), .UW(UW), .AW(AW)) dut_e (
    .clk, .rst_n, .u_in, .y_valid_in, .y_neg_in(neg_e), .y_idx_in,
    .y_valid_out(ve), .y_idx_out(ie), .y_out(ye));
  dst4_systolic_array #(.N(N), .G(G), .UW(UW), .AW(AW)) dut_o (
    .clk, .rst_n, .u_in, .y_valid_in, .y_neg_in(neg_o), .y_idx_in,
    .y_valid_out(vo), .y_idx_out(io), .y_out(yo));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int pj [L], ke [L], ko [L];
  real kern_e [L][L], kern_o [L][L];
  int signed uvec [NT][L];
  real exp_e [NT][L], exp_o [NT][L];
  int unsigned t0 [NT];

  function automatic int pw(int e);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * G) % N;
    return r;
  endfunction

  initial begin
    for (int j = 0; j < L; j++) begin
      pj[j] = pw(j + 1);
      ke[j] = (pj[j] % 2 == 0) ? pj[j] : N - pj[j];
      ko[j] = N - ke[j];
    end
    for (int m = 0; m < L; m++)
      for (int j = 0; j < L; j++) begin
        kern_e[m][j] = $sin(PI * real'(ke[m] * pj[j]) / real'(N));
        kern_o[m][j] = $sin(PI * real'(ko[m] * pj[j]) / real'(N));
      end
    for (int t = 0; t < NT; t++) begin
      for (int j = 0; j < L; j++) uvec[t][j] = int'($urandom_range(2 ** 24 - 1)) - 2 ** 23;
      for (int m = 0; m < L; m++) begin
        exp_e[t][m] = 0.0; exp_o[t][m] = 0.0;
        for (int j = 0; j < L; j++) begin
          exp_e[t][m] += kern_e[m][j] * real'(uvec[t][j]);
          exp_o[t][m] += kern_o[m][j] * real'(uvec[t][j]);
        end
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      for (int c = 0; c < SL; c++) begin
        u_in <= UW'(uvec[t][((L - 1 - c) % L + L) % L]);
        if (c >= L - 1) begin
          int m;
          logic [L-1:0] te, to;
          m = c - (L - 1);
          for (int q = 0; q < L; q++) begin
            te[q] = kern_e[m][((q - m) % L + L) % L] < 0.0;
            to[q] = kern_o[m][((q - m) % L + L) % L] < 0.0;
          end
          y_valid_in <= 1'b1; y_idx_in <= IDXW'(m); neg_e <= te; neg_o <= to;
        end else y_valid_in <= 1'b0;
        @(posedge clk);
        if (c == 0) t0[t] = cyc;
      end
    end
    y_valid_in <= 1'b0;
  end

  int ot = 0, om = 0;
  always @(posedge clk) begin
    if (rst_n && ve) begin
      real de, dd;
      de = real'(ye) - exp_e[ot][om];
      dd = real'(yo) - exp_o[ot][om];
      checks += 3;
      if (de > 3.0 || de < -3.0 || dd > 3.0 || dd < -3.0 || !vo ||
          ie != IDXW'(om) || io != IDXW'(om)) begin
        failures++;
        $display("transform %0d m %0d: even %0d (exp %f) odd %0d (exp %f)", ot, om, ye,
                 exp_e[ot][om], yo, exp_o[ot][om]);
      end
      if (cyc - t0[ot] != SL + om) begin
        failures++;
        $display("transform %0d m %0d: after %0d cycles, expected %0d", ot, om, cyc - t0[ot], SL + om);
      end
      if (om == L - 1) begin om = 0; ot++; end else om++;
    end
  end

  initial begin
    wait (ot == NT);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// dst4_systolic_array: linear systolic array that computes one length-L
// pseudo-cyclic convolution
//   T_m = sum_{j=0}^{L-1} s(m,j) * C[(m+j) mod L] * u_j ,   m = 0..L-1,
// where the magnitudes C[q] = |sin(pi * (G^(q+2) mod N) / N)| form a cyclic
// (Hankel) pattern and the signs s(m,j) = +/-1 break the cycle. For N = 11 this
// is exactly the 5x5 matrix product of eq. (7) (difference inputs, even
// outputs) or eq. (8) (sum inputs, odd outputs); the two arrays of the design
// are this same module, told apart only by the sign tags they are fed.
//
// Structure: L identical PEs in a chain, PE q holding weight C[q]. All I/O is
// at the two ends: samples and result tags enter PE 0, results leave PE L-1.
//
// Timing (cycle 0 = first sample at u_in): the caller presents the stream
// u~_n = u_{(n+1) mod L} in decreasing n, n = 2L-2 .. 0, one per cycle, i.e.
// u~ at cycle c is u_{(L-1-c) mod L} (2L-1 samples). The partial result for
// output m is injected (y_valid_in with its L-bit sign tag and its index m)
// at cycle L-1+m. Output m leaves y_out at cycle 2L-1+m, so one output per
// cycle after a latency of L cycles from its injection. A new transform may
// start 2L-1 cycles after the previous one; the pipelining across PEs lets
// the streams of successive transforms follow each other without a gap.
// Bit q of the sign tag of output m is s(m, (q-m) mod L) (1 = subtract).
module dst4_systolic_array #(
  parameter int N    = 11,
  parameter int G    = 2,
  parameter int UW   = 25,
  parameter int AW   = 28,
  parameter int L    = (N - 1) / 2,
  parameter int IDXW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [UW-1:0]   u_in,
  input  logic                   y_valid_in,
  input  logic [L-1:0]           y_neg_in,
  input  logic [IDXW-1:0]        y_idx_in,
  output logic                   y_valid_out,
  output logic [IDXW-1:0]        y_idx_out,
  output logic signed [AW-1:0]   y_out
);
  import dst4_pkg::*;

  logic signed [UW-1:0] u_c [L+1];
  logic                 v_c [L+1];
  logic [L-1:0]         n_c [L+1];
  logic [IDXW-1:0]      i_c [L+1];
  logic signed [AW-1:0] y_c [L+1];

  assign u_c[0] = u_in;
  assign v_c[0] = y_valid_in;
  assign n_c[0] = y_neg_in;
  assign i_c[0] = y_idx_in;
  assign y_c[0] = '0;

  for (genvar q = 0; q < L; q++) begin : g_pe
    dst4_pe #(.UW(UW), .AW(AW), .L(L), .IDXW(IDXW), .W(pe_coef(N, G, q))) u_pe (
      .clk, .rst_n,
      .u_in(u_c[q]),        .u_out(u_c[q+1]),
      .y_valid_in(v_c[q]),  .y_neg_in(n_c[q]),  .y_idx_in(i_c[q]),  .y_in(y_c[q]),
      .y_valid_out(v_c[q+1]), .y_neg_out(n_c[q+1]), .y_idx_out(i_c[q+1]), .y_out(y_c[q+1])
    );
  end

  assign y_valid_out = v_c[L];
  assign y_idx_out   = i_c[L];
  assign y_out       = y_c[L];

  // the tag has been consumed completely when it leaves the last PE
  logic unused_tag;
  assign unused_tag = ^n_c[L] ^ ^u_c[L];

endmodule

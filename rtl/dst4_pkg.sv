// dst4_pkg: constants and elaboration-time functions shared by the DST-IV
// processor.
//
// The transform computed by the design is the length-N type IV DST
//   Y(k) = sum_{i=0}^{N-1} x(i) * sin((2i+1)(2k+1)*alpha),  alpha = pi/(4N).
// For a prime N with primitive root G it is rebuilt, as in the systolic
// algorithm this design follows, from an auxiliary input sequence x'(i), two
// pseudo-cyclic convolutions of length L = (N-1)/2 and a short output
// recursion. Every constant of the datapath (the pre-multiplier, the PE
// weights, the sign tags, the index permutations and the output rotation
// factors) is computed here from N and G when the design is elaborated, so no
// table file is needed and any prime N works.
//
// Fixed point: all trigonometric constants are signed COEF_W-bit numbers
// with COEF_FRAC fraction bits (Q2.22); this word size is a choice of this
// design. 24-bit constants keep the output within about 2 LSB of the exact
// transform for 16-bit input at N = 11; with 18-bit constants the error grows
// to tens of LSB, because the output recursion adds up the rounding of N-1
// terms.
package dst4_pkg;

  localparam int COEF_W    = 24;
  localparam int COEF_FRAC = 22;
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [COEF_W-1:0] coef_t;

  // b^e mod n, for small integers
  function automatic int modpow(input int b, input int e, input int n);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % n;
    return r;
  endfunction

  function automatic bit is_prime(input int n);
    if (n < 3) return 1'b0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  // G is a primitive root of N when G^e != 1 for 0 < e < N-1
  function automatic bit is_primitive_root(input int g, input int n);
    for (int e = 1; e < n - 1; e++) if (modpow(g, e, n) == 1) return 1'b0;
    return (modpow(g, n - 1, n) == 1);
  endfunction

  // round a real in [-2,2) to the coefficient format
  function automatic coef_t to_coef(input real v);
    real s = v * (2.0 ** COEF_FRAC);
    return coef_t'((s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5));
  endfunction

  // pre-multiplier of x(i): sin((2i+1)*alpha)
  function automatic coef_t pre_coef(input int n, input int i);
    return to_coef($sin(PI * real'(2 * i + 1) / real'(4 * n)));
  endfunction

  // output rotation factors of eq. (6): cos(2k*alpha) and sin(2k*alpha)
  function automatic coef_t rot_cos(input int n, input int k);
    return to_coef($cos(PI * real'(k) / real'(2 * n)));
  endfunction
  function automatic coef_t rot_sin(input int n, input int k);
    return to_coef($sin(PI * real'(k) / real'(2 * n)));
  endfunction

  // Input pair j (j = 0..L-1) combines x'(p_j) and x'(N-p_j), p_j = G^(j+1) mod N
  function automatic int pair_index(input int n, input int g, input int j);
    return modpow(g, j + 1, n);
  endfunction

  // Output m (m = 0..L-1) of an array: the even (odd_grp=0) or odd (odd_grp=1)
  // member of the index pair {G^(m+1), N-G^(m+1)}
  function automatic int out_index(input int n, input int g, input int m, input bit odd_grp);
    int r = modpow(g, m + 1, n);
    if ((r % 2 == 1) == odd_grp) return r;
    return n - r;
  endfunction

  // Weight of PE q: |sin(pi * (G^(q+2) mod N) / N)| (the same in both arrays)
  function automatic coef_t pe_coef(input int n, input int g, input int q);
    return to_coef($sin(PI * real'(modpow(g, q + 2, n)) / real'(n)));
  endfunction

  // Sign of the kernel entry of output m and input pair j: the kernel is
  // sin(pi*k*p/N), negative when floor(k*p/N) is odd. 1 means subtract.
  function automatic bit kernel_neg(input int n, input int g, input int m, input int j,
                                    input bit odd_grp);
    int k = out_index(n, g, m, odd_grp);
    int p = pair_index(n, g, j);
    return ((k * p) / n) % 2 == 1;
  endfunction

endpackage

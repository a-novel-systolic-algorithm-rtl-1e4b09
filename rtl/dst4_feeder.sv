// dst4_feeder: permutes the auxiliary input sequence into the order the two
// systolic arrays consume it, forms the input pairs and issues the control
// tags.
//
// The convolutions combine x'(p) with x'(N-p) for the L index pairs
// p_j = G^(j+1) mod N (for N = 11, G = 2: 2, 4, 8, 5, 10): the array that
// produces the even-indexed T(k) takes x'(p_j) - x'(N-p_j), the one that
// produces the odd-indexed T(k) takes x'(p_j) + x'(N-p_j) (eqs. (7), (8)).
// Because N is odd, p_j and N-p_j always have opposite parity, so x' is kept
// in two RAMs, one for even and one for odd indices, and both members of a
// pair are read in the same cycle with single-port RAMs. That split is this
// design's choice.
//
// Per block the feeder reads 2L-1 pairs in the order the arrays need (pair
// (L-1-c) mod L in cycle c) and, from the L-th pair on, injects one result
// per cycle into each array with its index m and its L-bit sign tag. The tags
// encode the sign pattern of the pseudo-cyclic kernels (1 = subtract in that
// PE); they are constants computed from N and G, so the PEs never need to know
// which output they are working on.
//
// Timing: start (with the bank just written and x'(0)) launches a block; RAM
// addresses are issued in the following 2L-1 cycles and the array inputs
// (u_*, y_*) follow the addresses by two cycles. xp0_out changes to x'(0) of
// a block together with the injection of its first result (m = 0) and holds
// it until the next block's first result. A new start is allowed 2L-1 cycles after the previous.
module dst4_feeder #(
  parameter int N    = 11,
  parameter int G    = 2,
  parameter int XW   = 24,
  parameter int L    = (N - 1) / 2,
  parameter int IDXW = (L > 1) ? $clog2(L) : 1,
  parameter int EAW  = $clog2((N + 1) / 2),          // even RAM address width
  parameter int OAW  = (L > 1) ? $clog2(L) : 1       // odd RAM address width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  start_bank,
  input  logic signed [XW-1:0]  xp0_in,
  // x' RAM read ports (even indices at address i/2, odd indices at (i-1)/2)
  output logic                  rd_bank,
  output logic [EAW-1:0]        ev_addr,
  output logic [OAW-1:0]        od_addr,
  input  logic signed [XW-1:0]  ev_data,
  input  logic signed [XW-1:0]  od_data,
  // array inputs
  output logic signed [XW:0]    u_diff,     // to the even-output array
  output logic signed [XW:0]    u_sum,      // to the odd-output array
  output logic                  y_valid,
  output logic [IDXW-1:0]       y_idx,
  output logic [L-1:0]          neg_even,
  output logic [L-1:0]          neg_odd,
  output logic signed [XW-1:0]  xp0_out
);
  import dst4_pkg::*;

  localparam int SL = 2 * L - 1;           // stream length
  localparam int CW = $clog2(SL + 1);

  typedef int        seq_t [SL];
  typedef logic [L-1:0] tag_tab_t [L];

  // pair read in stream cycle c
  function automatic seq_t mk_pair();
    seq_t t;
    for (int c = 0; c < SL; c++) t[c] = pair_index(N, G, ((L - 1 - c) % L + L) % L);
    return t;
  endfunction
  localparam seq_t PAIR = mk_pair();

  function automatic tag_tab_t mk_tag(input bit odd_grp);
    tag_tab_t t;
    for (int m = 0; m < L; m++) begin
      logic [L-1:0] v = '0;
      for (int q = 0; q < L; q++)
        if (kernel_neg(N, G, m, ((q - m) % L + L) % L, odd_grp)) v = v | (L'(1) << q);
      t[m] = v;
    end
    return t;
  endfunction
  localparam tag_tab_t TAG_EVEN = mk_tag(1'b0);
  localparam tag_tab_t TAG_ODD  = mk_tag(1'b1);

  // ---- stream counter ----
  logic          act;
  logic [CW-1:0] c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act     <= 1'b0;
      c       <= '0;
      rd_bank <= 1'b0;
    end else if (start) begin
      act     <= 1'b1;
      c       <= '0;
      rd_bank <= start_bank;
    end else if (act) begin
      if (c == CW'(SL - 1)) act <= 1'b0;
      else                  c   <= c + 1'b1;
    end
  end

  logic signed [XW-1:0] xp0_hold;
  always_ff @(posedge clk) if (start) xp0_hold <= xp0_in;

  // ---- address generation (permutation) ----
  logic p_even;
  always_comb begin
    int p, e, o;
    p = 1;
    for (int i = 0; i < SL; i++) if (c == CW'(i)) p = PAIR[i];
    p_even  = (p % 2 == 0);
    e       = p_even ? p : N - p;
    o       = p_even ? N - p : p;
    ev_addr = EAW'(e / 2);
    od_addr = OAW'(o / 2);
  end

  // ---- stage 1: RAM data arrives ----
  logic          s1v, s1_peven;
  logic [CW-1:0] s1c;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1v <= 1'b0;
    else        s1v <= act;
  end
  always_ff @(posedge clk) begin
    s1c      <= c;
    s1_peven <= p_even;
  end

  // ---- stage 2: pair sum / difference and tags ----
  logic signed [XW:0] xa, xb;      // x'(p_j), x'(N-p_j)
  logic               inj;
  logic [IDXW-1:0]    m_now;
  always_comb begin
    xa    = s1_peven ? (XW+1)'(ev_data) : (XW+1)'(od_data);
    xb    = s1_peven ? (XW+1)'(od_data) : (XW+1)'(ev_data);
    inj   = s1v && (s1c >= CW'(L - 1));
    m_now = IDXW'(s1c - CW'(L - 1));
  end

  always_ff @(posedge clk) begin
    u_diff   <= s1v ? (xa - xb) : '0;
    u_sum    <= s1v ? (xa + xb) : '0;
    y_idx    <= m_now;
    neg_even <= TAG_EVEN[m_now];
    neg_odd  <= TAG_ODD[m_now];
    // x'(0) moves on with the first result of the block, so that it stays
    // valid while the block is in the arrays even if the next one starts
    if (inj && m_now == '0) xp0_out <= xp0_hold;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= inj;
  end

  // a new block may only start when the previous stream has been issued
  a_start_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (!act || c == CW'(SL - 1)))
    else $error("dst4_feeder: start while a stream is still being issued");

endmodule

// dst4_postproc: post-processing stage, turns the two arrays' results into
// the DST-IV output sequence.
//
// The arrays deliver the auxiliary outputs T(k) in permuted order (the even
// array T(2), T(4), T(8), T(6), T(10) and the odd array T(9), T(7), T(3),
// T(5), T(1) for N = 11). They are written by index into two double-banked
// RAMs (one for even k, one for odd k, so both arrays can write in the same
// cycle) and read back in natural order k = 0 .. N-1, while the output
// recursion of eqs. (4)-(6) runs:
//   Y(0)  = x'(0)
//   Tc(k) = x'(0) cos(2k*alpha) - 2 T(k) sin(2k*alpha)
//   Y(k)  = 2 Tc(k) + Y(k-1)                           k = 1 .. N-1
// Here T(k) = sum_j x'(j) sin(4kj*alpha) is the plain convolution output, so
// the factor 2 in Tc(k) appears explicitly; both factors of 2 are shifts
// folded into the rounding of the two products.
//
// Fixed point (this design's choice): x'(0) and T(k) carry GUARD fraction
// bits; Y is accumulated with them and rounded to an OUT_W-bit integer on
// output.
//
// Timing: a block is complete when output m = L-1 of the even array has been
// written; the next cycle the read-out starts and Y(0) .. Y(N-1) leave on
// consecutive cycles, Y(0) two cycles after the completing write. out_last
// marks Y(N-1). The banks let the next block's T(k) be written during this
// read-out.
module dst4_postproc #(
  parameter int N      = 11,
  parameter int G      = 2,
  parameter int XW     = 24,
  parameter int AW     = 28,
  parameter int GUARD  = 4,
  parameter int OUT_W  = 20,
  parameter int L      = (N - 1) / 2,
  parameter int IDXW   = (L > 1) ? $clog2(L) : 1,
  parameter int IW     = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [XW-1:0]    xp0_in,
  input  logic                    ev_valid,
  input  logic [IDXW-1:0]         ev_idx,
  input  logic signed [AW-1:0]    ev_t,
  input  logic                    od_valid,
  input  logic [IDXW-1:0]         od_idx,
  input  logic signed [AW-1:0]    od_t,
  output logic                    out_valid,
  output logic [IW-1:0]           out_idx,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_data
);
  import dst4_pkg::*;

  localparam int YW  = AW + 3;
  localparam int TAW = (L > 1) ? $clog2(L) : 1;
  localparam logic [IW-1:0] LAST = IW'(N - 1);

  typedef logic [TAW-1:0] waddr_tab_t [L];
  typedef coef_t          rot_tab_t   [N];

  // RAM address of output m of each array (its T(k) index is out_index)
  function automatic waddr_tab_t mk_waddr(input bit odd_grp);
    waddr_tab_t t;
    for (int m = 0; m < L; m++)
      t[m] = odd_grp ? TAW'(out_index(N, G, m, 1'b1) / 2)
                     : TAW'(out_index(N, G, m, 1'b0) / 2 - 1);
    return t;
  endfunction
  function automatic rot_tab_t mk_rot(input bit is_sin);
    rot_tab_t t;
    for (int k = 0; k < N; k++) t[k] = is_sin ? rot_sin(N, k) : rot_cos(N, k);
    return t;
  endfunction
  localparam waddr_tab_t WA_EVEN = mk_waddr(1'b0);
  localparam waddr_tab_t WA_ODD  = mk_waddr(1'b1);
  localparam rot_tab_t   COS_T   = mk_rot(1'b0);
  localparam rot_tab_t   SIN_T   = mk_rot(1'b1);

  // ---- collection of T(k) ----
  logic                 wbank;
  logic signed [XW-1:0] xp0_bank [2];
  logic                 blk_done;

  assign blk_done = ev_valid && (ev_idx == IDXW'(L - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        wbank <= 1'b0;
    else if (blk_done) wbank <= ~wbank;
  end
  always_ff @(posedge clk)
    if (ev_valid && ev_idx == '0) xp0_bank[wbank] <= xp0_in;

  // ---- natural-order read-out ----
  logic          oact, obank;
  logic [IW-1:0] ocnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oact  <= 1'b0;
      ocnt  <= '0;
      obank <= 1'b0;
    end else if (blk_done) begin
      oact  <= 1'b1;
      ocnt  <= '0;
      obank <= wbank;
    end else if (oact) begin
      if (ocnt == LAST) oact <= 1'b0;
      else              ocnt <= ocnt + 1'b1;
    end
  end

  logic [TAW-1:0] te_raddr, to_raddr;
  logic [AW-1:0]  te_rdata, to_rdata;
  always_comb begin
    te_raddr = TAW'((ocnt >> 1) - 1'b1);   // even k: k/2 - 1
    to_raddr = TAW'(ocnt >> 1);            // odd k: (k-1)/2
  end

  dst4_pp_ram #(.W(AW), .DEPTH(L), .AW(TAW)) u_t_even (
    .clk,
    .wr_en(ev_valid), .wr_bank(wbank), .wr_addr(WA_EVEN[ev_idx]), .wr_data(ev_t),
    .rd_bank(obank),  .rd_addr(te_raddr), .rd_data(te_rdata)
  );
  dst4_pp_ram #(.W(AW), .DEPTH(L), .AW(TAW)) u_t_odd (
    .clk,
    .wr_en(od_valid), .wr_bank(wbank), .wr_addr(WA_ODD[od_idx]), .wr_data(od_t),
    .rd_bank(obank),  .rd_addr(to_raddr), .rd_data(to_rdata)
  );

  // ---- stage B: recursion ----
  logic          bv, bbank;
  logic [IW-1:0] bk;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bv <= 1'b0;
    else        bv <= oact;
  end
  always_ff @(posedge clk) begin
    bk    <= ocnt;
    bbank <= obank;
  end

  localparam int P1W = XW + COEF_W;
  localparam int P2W = AW + COEF_W;

  logic signed [XW-1:0]  xp0;
  logic signed [AW-1:0]  tk;
  logic signed [P1W-1:0] p1;
  logic signed [P2W-1:0] p2;
  logic signed [YW-1:0]  t1, t2, y_acc, y_next;
  logic signed [OUT_W-1:0] y_round;

  always_comb begin
    xp0    = xp0_bank[bbank];
    tk     = bk[0] ? signed'(to_rdata) : signed'(te_rdata);
    p1     = P1W'(xp0) * P1W'(COS_T[bk]);
    p2     = P2W'(tk)  * P2W'(SIN_T[bk]);
    // 2 x'(0) cos(2k alpha) and 4 T(k) sin(2k alpha), rounded
    t1     = YW'((p1 + P1W'(1 <<< (COEF_FRAC - 2))) >>> (COEF_FRAC - 1));
    t2     = YW'((p2 + P2W'(1 <<< (COEF_FRAC - 3))) >>> (COEF_FRAC - 2));
    y_next = (bk == '0) ? YW'(xp0) : (y_acc + t1 - t2);
    y_round = OUT_W'((y_next + YW'(1 <<< (GUARD - 1))) >>> GUARD);
  end

  always_ff @(posedge clk) begin
    if (bv) y_acc <= y_next;
    out_idx  <= bk;
    out_data <= y_round;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= bv;
      out_last  <= bv && (bk == LAST);
    end
  end

  // the next block's T(k) must not complete before the read-out has ended
  a_readout_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    blk_done |-> (!oact || ocnt == LAST))
    else $error("dst4_postproc: block completed during the read-out of the previous one");
  // both arrays deliver their results in the same cycles
  a_arrays_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    ev_valid == od_valid && (!ev_valid || ev_idx == od_idx))
    else $error("dst4_postproc: even and odd array results out of step");

endmodule

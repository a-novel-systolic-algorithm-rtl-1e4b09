// dst4_top: streaming processor for the length-N type IV discrete sine
// transform,
//   Y(k) = sum_{i=0}^{N-1} x(i) sin((2i+1)(2k+1) pi/(4N)),   k = 0 .. N-1,
// for a prime N (default 11) with primitive root G (default 2).
//
// The transform is split into three stages:
//   1. pre-processing (dst4_preproc): the samples of a block are buffered,
//      read back in reverse and summed into the auxiliary sequence x'(i);
//      x' is stored in two RAMs by index parity;
//   2. two linear systolic arrays of L = (N-1)/2 PEs (dst4_systolic_array),
//      fed by dst4_feeder with the pairs x'(p) -/+ x'(N-p) in the order of
//      the powers of G, compute the two pseudo-cyclic convolutions that
//      produce the even- and the odd-indexed T(k) in parallel;
//   3. post-processing (dst4_postproc): T(k) is put back into natural order
//      and Y(k) is produced by a first-order recursion.
// The split, the two arrays and the three stages follow the systolic
// algorithm this design implements; the word sizes, the handshake and the
// double-banked RAMs that let blocks stream are this design's choices.
//
// Interface: in_valid/in_data accept x(0) .. x(N-1) of one block after the
// other, at most one sample per cycle, gaps allowed; there is no
// back-pressure. out_valid/out_data deliver Y(0) .. Y(N-1) of each block on
// N consecutive cycles, with out_idx = k and out_last on Y(N-1).
//
// Timing: with back-to-back input the design accepts and delivers one sample
// per cycle, i.e. one transform every N cycles. Y(0) of a block is presented
// N + 3L + 6 clock edges (32 for N = 11) after the edge that takes in the
// block's last sample.
module dst4_top #(
  parameter int N      = 11,
  parameter int G      = 2,
  parameter int DATA_W = 16,
  parameter int GUARD  = 4,
  parameter int OUT_W  = DATA_W + $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                    out_valid,
  output logic [$clog2(N)-1:0]    out_idx,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_data
);
  import dst4_pkg::*;

  localparam int L    = (N - 1) / 2;
  localparam int IW   = $clog2(N);
  localparam int XW   = DATA_W + GUARD + $clog2(N);     // x' width
  localparam int UW   = XW + 1;                         // pair sum / difference
  localparam int AW   = UW + $clog2(N);                 // T(k) width
  localparam int IDXW = (L > 1) ? $clog2(L) : 1;
  localparam int EAW  = $clog2((N + 1) / 2);
  localparam int OAW  = (L > 1) ? $clog2(L) : 1;

  if (!is_prime(N) || !is_primitive_root(G, N)) begin : g_bad_cfg
    $error("dst4_top: N must be an odd prime and G a primitive root of N");
  end
  if (GUARD < 1) begin : g_bad_guard
    $error("dst4_top: GUARD must be at least 1");
  end

  // ---- stage 1: auxiliary input sequence ----
  logic                 xp_we, xp_bank, pre_done, pre_bank;
  logic [IW-1:0]        xp_idx;
  logic signed [XW-1:0] xp_data, pre_xp0;

  dst4_preproc #(.N(N), .DATA_W(DATA_W), .GUARD(GUARD), .XW(XW), .IW(IW)) u_pre (
    .clk, .rst_n, .in_valid, .in_data,
    .xp_we, .xp_bank, .xp_idx, .xp_data,
    .done(pre_done), .done_bank(pre_bank), .xp0(pre_xp0)
  );

  // x' storage, split by index parity
  logic                 rd_bank;
  logic [EAW-1:0]       ev_addr;
  logic [OAW-1:0]       od_addr;
  logic [XW-1:0]        ev_data, od_data;

  dst4_pp_ram #(.W(XW), .DEPTH((N + 1) / 2), .AW(EAW)) u_xp_even (
    .clk,
    .wr_en(xp_we && !xp_idx[0]), .wr_bank(xp_bank), .wr_addr(EAW'(xp_idx >> 1)),
    .wr_data(xp_data),
    .rd_bank(rd_bank), .rd_addr(ev_addr), .rd_data(ev_data)
  );
  dst4_pp_ram #(.W(XW), .DEPTH(L), .AW(OAW)) u_xp_odd (
    .clk,
    .wr_en(xp_we && xp_idx[0]), .wr_bank(xp_bank), .wr_addr(OAW'(xp_idx >> 1)),
    .wr_data(xp_data),
    .rd_bank(rd_bank), .rd_addr(od_addr), .rd_data(od_data)
  );

  // ---- stage 2: feeder and the two systolic arrays ----
  logic signed [UW-1:0] u_diff, u_sum;
  logic                 y_valid;
  logic [IDXW-1:0]      y_idx;
  logic [L-1:0]         neg_even, neg_odd;
  logic signed [XW-1:0] feed_xp0;

  dst4_feeder #(.N(N), .G(G), .XW(XW), .L(L), .IDXW(IDXW), .EAW(EAW), .OAW(OAW)) u_feed (
    .clk, .rst_n,
    .start(pre_done), .start_bank(pre_bank), .xp0_in(pre_xp0),
    .rd_bank, .ev_addr, .od_addr, .ev_data(signed'(ev_data)), .od_data(signed'(od_data)),
    .u_diff, .u_sum, .y_valid, .y_idx, .neg_even, .neg_odd, .xp0_out(feed_xp0)
  );

  logic                 ev_valid, od_valid;
  logic [IDXW-1:0]      ev_idx, od_idx;
  logic signed [AW-1:0] ev_t, od_t;

  dst4_systolic_array #(.N(N), .G(G), .UW(UW), .AW(AW), .L(L), .IDXW(IDXW)) u_arr_even (
    .clk, .rst_n, .u_in(u_diff), .y_valid_in(y_valid), .y_neg_in(neg_even), .y_idx_in(y_idx),
    .y_valid_out(ev_valid), .y_idx_out(ev_idx), .y_out(ev_t)
  );
  dst4_systolic_array #(.N(N), .G(G), .UW(UW), .AW(AW), .L(L), .IDXW(IDXW)) u_arr_odd (
    .clk, .rst_n, .u_in(u_sum), .y_valid_in(y_valid), .y_neg_in(neg_odd), .y_idx_in(y_idx),
    .y_valid_out(od_valid), .y_idx_out(od_idx), .y_out(od_t)
  );

  // ---- stage 3: output recursion ----
  dst4_postproc #(.N(N), .G(G), .XW(XW), .AW(AW), .GUARD(GUARD), .OUT_W(OUT_W),
                  .L(L), .IDXW(IDXW), .IW(IW)) u_post (
    .clk, .rst_n, .xp0_in(feed_xp0),
    .ev_valid, .ev_idx, .ev_t, .od_valid, .od_idx, .od_t,
    .out_valid, .out_idx, .out_last, .out_data
  );

endmodule

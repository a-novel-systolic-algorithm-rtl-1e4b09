// dst4_preproc: pre-processing stage, builds the auxiliary input sequence.
//
// Input samples x(0), x(1), ..., x(N-1) arrive in natural order (in_valid may
// have gaps) and are written into an N-word input RAM. The auxiliary sequence
// is a suffix sum that has to be formed from the last sample backwards,
//   x'(N-1) = w(N-1),   x'(i) = w(i) + x'(i+1)  for i = N-2 .. 0,
//   w(i)    = x(i) * sin((2i+1)*alpha),  alpha = pi/(4N),
// so once a block is complete the RAM is read back in reverse order, each
// sample is multiplied by its constant and accumulated. This is the recursion
// of eqs. (2) and (3) of the algorithm with the weight of each sample taken as
// sin((2i+1)alpha): with that weight the output equations (4)-(6) and the
// convolutions (7), (8) reproduce the DST-IV exactly, and x'(0) is Y(0).
//
// Each x'(i) is written out (xp_we/xp_idx/xp_data) to the RAMs that feed the
// systolic arrays. done pulses in the cycle x'(0) is written, together with
// xp0 = x'(0) and the bank of the block.
//
// Fixed point (this design's choice): samples are DATA_W-bit integers; the
// sequence x' carries GUARD extra fraction bits and log2(N) growth bits.
//
// Timing: the reverse read of a block starts the cycle after its last sample
// is accepted and takes N cycles; x'(i) appears two cycles after its read, so
// done follows the last input sample by N+2 cycles. The input RAM has two
// banks, so a new block can be accepted at full rate (one sample per cycle)
// while the previous one is being read back.
module dst4_preproc #(
  parameter int N      = 11,
  parameter int DATA_W = 16,
  parameter int GUARD  = 4,
  parameter int XW     = DATA_W + GUARD + $clog2(N),
  parameter int IW     = $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     xp_we,
  output logic                     xp_bank,
  output logic [IW-1:0]            xp_idx,
  output logic signed [XW-1:0]     xp_data,
  output logic                     done,
  output logic                     done_bank,
  output logic signed [XW-1:0]     xp0
);
  import dst4_pkg::*;

  typedef coef_t pre_tab_t [N];
  function automatic pre_tab_t mk_pre();
    pre_tab_t t;
    for (int i = 0; i < N; i++) t[i] = pre_coef(N, i);
    return t;
  endfunction
  localparam pre_tab_t PRE = mk_pre();

  localparam int SW = DATA_W + GUARD;      // scaled sample width
  localparam int PW = SW + COEF_W;         // product width
  localparam logic [IW-1:0] LAST = IW'(N - 1);

  // ---- input collection ----
  logic [IW-1:0] wcnt;
  logic          wbank;
  logic          blk_full;

  assign blk_full = in_valid && (wcnt == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt  <= '0;
      wbank <= 1'b0;
    end else if (in_valid) begin
      if (wcnt == LAST) begin
        wcnt  <= '0;
        wbank <= ~wbank;
      end else begin
        wcnt <= wcnt + 1'b1;
      end
    end
  end

  // ---- reverse read-out ----
  logic          ra;       // read-out active
  logic [IW-1:0] rcnt;
  logic          rbank;
  logic [DATA_W-1:0] rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra    <= 1'b0;
      rcnt  <= '0;
      rbank <= 1'b0;
    end else if (blk_full) begin
      ra    <= 1'b1;
      rcnt  <= LAST;
      rbank <= wbank;
    end else if (ra) begin
      if (rcnt == '0) ra <= 1'b0;
      else            rcnt <= rcnt - 1'b1;
    end
  end

  dst4_pp_ram #(.W(DATA_W), .DEPTH(N), .AW(IW)) u_in_ram (
    .clk,
    .wr_en(in_valid), .wr_bank(wbank), .wr_addr(wcnt), .wr_data(in_data),
    .rd_bank(rbank),  .rd_addr(rcnt),  .rd_data(rd_data)
  );

  // ---- multiply and accumulate (stage B: RAM data available) ----
  logic          bv;
  logic [IW-1:0] bidx;
  logic          bbank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bv <= 1'b0;
    else        bv <= ra;
  end
  always_ff @(posedge clk) begin
    bidx  <= rcnt;
    bbank <= rbank;
  end

  logic signed [SW-1:0] xs;
  logic signed [PW-1:0] prod;
  logic signed [XW-1:0] w, acc, acc_next;

  always_comb begin
    xs       = SW'(signed'(rd_data)) <<< GUARD;
    prod     = PW'(xs) * PW'(PRE[bidx]);
    w        = XW'((prod + PW'(1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC);
    acc_next = ((bidx == LAST) ? XW'(0) : acc) + w;
  end

  always_ff @(posedge clk) begin
    if (bv) acc <= acc_next;
    xp_idx  <= bidx;
    xp_data <= acc_next;
    xp_bank <= bbank;
    if (bv && bidx == '0) begin
      xp0       <= acc_next;
      done_bank <= bbank;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xp_we <= 1'b0;
      done  <= 1'b0;
    end else begin
      xp_we <= bv;
      done  <= bv && (bidx == '0);
    end
  end

  // a block can only be complete once the previous one has been read out
  a_reverse_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    blk_full |-> (!ra || rcnt == '0))
    else $error("dst4_preproc: new block complete during the reverse read-out");

endmodule

// tb_dst4_feeder: checks the array feeder for N = 11, G = 2.
//
// The test models the two x' RAMs (even and odd indices, two banks each) with
// random contents and starts the feeder on alternating banks, back to back
// (one every 2L+2 cycles). For stream cycle c = 0 .. 2L-2 it expects, from its own
// list of index pairs p_j = 2^(j+1) mod 11 with j = (L-1-c) mod L, the values
// x'(p_j) - x'(11-p_j) on u_diff and x'(p_j) + x'(11-p_j) on u_sum; from
// c = L-1 on, a result injection with m = c-(L-1) and sign tags whose bit q
// is the sign of sin(pi k p / 11) for output m and pair (q-m) mod L; and
// x'(0) on xp0_out from the first injection. The sample stream must appear
// two cycles after the clock edge that takes in start.
module tb_dst4_feeder;
  localparam int N = 11, G = 2, L = 5, XW = 24, IDXW = 3, EAW = 3, OAW = 3;
  localparam int SL = 2 * L - 1;
  localparam int NB = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, start_bank = 1'b0;
  logic signed [XW-1:0] xp0_in = '0, ev_data, od_data, xp0_out;
  logic rd_bank;
  logic [EAW-1:0] ev_addr;
  logic [OAW-1:0] od_addr;
  logic signed [XW:0] u_diff, u_sum;
  logic y_valid;
  logic [IDXW-1:0] y_idx;
  logic [L-1:0] neg_even, neg_odd;

  dst4_feeder #(.N(N), .G(G), .XW(XW)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // x'(i) of each bank; a block b uses bank b%2 and is refilled before reuse
  int signed xpm [NB][N];
  always_ff @(posedge clk) begin
    ev_data <= XW'(xpm[cur_blk_rd][2 * ev_addr]);
    od_data <= XW'(xpm[cur_blk_rd][2 * od_addr + 1]);
  end
  int cur_blk_rd = 0;

  int pj [L];
  function automatic int pw(int e);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * G) % N;
    return r;
  endfunction
  function automatic bit negk(int m, int j, bit odd);
    int k;
    k = (pj[m] % 2 == 0) ? pj[m] : N - pj[m];
    if (odd) k = N - k;
    return $sin(PI * real'(k * pj[j]) / real'(N)) < 0.0;
  endfunction

  int n_streams = 0;
  initial begin
    for (int j = 0; j < L; j++) pj[j] = pw(j + 1);
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++) xpm[b][i] = int'($urandom_range(2 ** 22)) - 2 ** 21;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      start <= 1'b1; start_bank <= b[0]; xp0_in <= XW'(xpm[b][0]);
      @(posedge clk);
      start <= 1'b0;
      cur_blk_rd = b;
      // stream cycle c appears at the outputs 3 + c cycles after start
      for (int t = 1; t <= SL + 2; t++) begin
        #1;
        if (t >= 3 && t < 3 + SL) begin
          int c, j, m, a, bb;
          logic [L-1:0] te, to;
          c = t - 3;
          j = ((L - 1 - c) % L + L) % L;
          a = xpm[b][pj[j]]; bb = xpm[b][N - pj[j]];
          checks++;
          if (int'(u_diff) != a - bb || int'(u_sum) != a + bb) begin
            failures++;
            $display("block %0d c %0d: diff %0d sum %0d, expected %0d %0d", b, c, u_diff, u_sum,
                     a - bb, a + bb);
          end
          if (c >= L - 1) begin
            m = c - (L - 1);
            for (int q = 0; q < L; q++) begin
              te[q] = negk(m, ((q - m) % L + L) % L, 1'b0);
              to[q] = negk(m, ((q - m) % L + L) % L, 1'b1);
            end
            checks++;
            if (!y_valid || y_idx != IDXW'(m) || neg_even != te || neg_odd != to ||
                xp0_out != XW'(xpm[b][0])) begin
              failures++;
              $display("block %0d m %0d: v %0b idx %0d tags %b %b (exp %b %b) xp0 %0d", b, m,
                       y_valid, y_idx, neg_even, neg_odd, te, to, xp0_out);
            end
            if (m == L - 1) n_streams++;
          end else begin
            checks++;
            if (y_valid) begin failures++; $display("early injection"); end
          end
        end
        @(posedge clk);
      end
    end
    checks++;
    if (n_streams != NB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

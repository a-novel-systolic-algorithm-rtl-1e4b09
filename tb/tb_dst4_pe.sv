// tb_dst4_pe: checks one processing element.
//
// Random samples, partial results and sign tags are applied every cycle to a
// PE whose weight is 0.75. Each partial result must come out one cycle later
// as y_in + round(0.75 u) or y_in - round(0.75 u), chosen by bit 0 of the tag;
// the tag must come out shifted right by one, the index and valid bit
// unchanged, and the sample must come out two cycles later.
module tb_dst4_pe;
  localparam int UW = 25, AW = 29, L = 5, IDXW = 3;
  localparam dst4_pkg::coef_t W = dst4_pkg::coef_t'(3 <<< (dst4_pkg::COEF_FRAC - 2));

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [UW-1:0] u_in = '0, u_out;
  logic y_valid_in = 1'b0, y_valid_out;
  logic [L-1:0] y_neg_in = '0, y_neg_out;
  logic [IDXW-1:0] y_idx_in = '0, y_idx_out;
  logic signed [AW-1:0] y_in = '0, y_out;

  dst4_pe #(.UW(UW), .AW(AW), .L(L), .IDXW(IDXW), .W(W)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // history of applied inputs
  int signed hu [$];
  int signed hy [$];
  int hn [$];
  int hi [$];
  int hv [$];
  int n_sub = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 400; t++) begin
      u_in       <= UW'($signed($urandom_range(2 ** 24 - 1)) - 2 ** 23);
      y_in       <= AW'($signed($urandom_range(2 ** 26 - 1)) - 2 ** 25);
      y_neg_in   <= L'($urandom_range(31));
      y_idx_in   <= IDXW'($urandom_range(7));
      y_valid_in <= 1'($urandom_range(1));
      @(posedge clk);
      #1;
      hu.push_back(int'(u_in)); hy.push_back(int'(y_in));
      hn.push_back(int'(y_neg_in)); hi.push_back(int'(y_idx_in)); hv.push_back(int'(y_valid_in));
      if (t >= 1) begin
        real term;
        int signed expy;
        term = $floor(0.75 * real'(hu[t]) + 0.5);
        expy = (hn[t] % 2 == 1) ? hy[t] - int'(term) : hy[t] + int'(term);
        if (hn[t] % 2 == 1) n_sub++;
        checks++;
        if (int'(y_out) != expy || int'(y_neg_out) != (hn[t] >> 1) ||
            int'(y_idx_out) != hi[t] || int'(y_valid_out) != hv[t]) begin
          failures++;
          $display("t=%0d y_out %0d expected %0d (tag %0d idx %0d v %0d)", t, y_out, expy,
                   y_neg_out, y_idx_out, y_valid_out);
        end
      end
      if (t >= 2) begin
        checks++;
        if (int'(u_out) != hu[t - 1]) begin
          failures++;
          $display("t=%0d u_out %0d expected %0d", t, u_out, hu[t - 1]);
        end
      end
    end
    checks++;
    if (n_sub == 0) failures++;
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

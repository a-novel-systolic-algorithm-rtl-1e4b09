// tb_dst4_top_sizes: runs the DST-IV processor at other prime lengths than
// the default N = 11, to show that the index permutations, sign tags and
// constants generated from N and G are right in general: N = 5, 7, 13, 17,
// 19, 23 and 31 with a primitive root each. Every size gets back-to-back
// random blocks and full-scale blocks; see tb_dst4_top_run for the checks.
module tb_dst4_top_sizes;
  localparam int NS = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [NS];
  int   chk [NS], fl [NS];
  real  me [NS];

  tb_dst4_top_run #(.N(5),  .G(2)) r0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .max_err(me[0]));
  tb_dst4_top_run #(.N(7),  .G(3)) r1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .max_err(me[1]));
  tb_dst4_top_run #(.N(13), .G(2)) r2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .max_err(me[2]));
  tb_dst4_top_run #(.N(17), .G(3)) r3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .max_err(me[3]));
  tb_dst4_top_run #(.N(19), .G(2)) r4 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]), .max_err(me[4]));
  tb_dst4_top_run #(.N(23), .G(5)) r5 (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fl[5]), .max_err(me[5]));
  tb_dst4_top_run #(.N(31), .G(3)) r6 (.clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fl[6]), .max_err(me[6]));

  int checks = 0, failures = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < NS; i++) wait (done[i]);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      $display("size %0d: checks %0d failures %0d max error %f LSB", i, chk[i], fl[i], me[i]);
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
